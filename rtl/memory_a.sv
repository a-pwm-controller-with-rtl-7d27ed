// memory_a - first look-up table of the multiple-access PID compensator.
//
// A 4096 x CODE_W RAM addressed by {e(n), e(n-1), e(n-2)} (12 bits). Each word
// is the code of e'(n) = a*e(n) + b*e(n-1) + c*e(n-2): the index of the
// rounded value in the ascending list of values reachable from the 71
// possible error triples (see pwm_pkg). The contents are computed at
// start-up; the write port lets an external host reload them, as the tables
// are meant to be externally accessible RAMs.
//
// Timing: synchronous read. With `re` high at a clock edge, `code` shows
// the word at `addr` after that edge (stage (ii)). A write to the address
// being read returns the old word.
module memory_a
  import pwm_pkg::*;
#(
  parameter int AW = A_AW,   // address width: three 4-bit errors
  parameter int CW = CODE_W  // data width: e'(n) code
) (
  input  logic          clk,
  input  logic          re,
  input  logic [AW-1:0] addr,
  output logic [CW-1:0] code,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [CW-1:0] wdata
);
  timeunit 1ns; timeprecision 1ps;

  logic [CW-1:0] mem [2**AW];

  // Table contents: code_lut[v + EP_BOUND] counts the reachable values below
  // v, which is the code of v.
  initial begin
    value_set_t  set;
    int          code_lut [2*EP_BOUND+1];
    int          n;
    err_triple_t t;
    set = reachable_values();
    n = 0;
    for (int w = 0; w <= 2*EP_BOUND; w++) begin
      code_lut[w] = n;
      if (set[w]) n++;
    end
    for (int a = 0; a < 2**AW; a++) begin
      t = err_triple_t'(A_AW'(a));
      if (triple_reachable(int'(t.e_n), int'(t.e_n1), int'(t.e_n2)))
        mem[a] = CW'(code_lut[eprime(int'(t.e_n), int'(t.e_n1), int'(t.e_n2)) + EP_BOUND]);
      else
        mem[a] = CW'(code_lut[EP_BOUND]);
    end
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) code <= mem[addr];
  end
endmodule
