// memory_b - second look-up table of the multiple-access PID compensator.
//
// A 2^(CODE_W+8) x 8 RAM addressed by {code of e'(n), d(n-1)}. Each word is
// d(n) = d(n-1) + e'(n), limited to 1..254, so that one read finishes the PID
// update. The range 1..254 and the 8-bit duty word follow the published
// design; the contents are computed at start-up from the same code list as
// Memory-A and can be rewritten through the write port.
//
// Timing: synchronous read (stage (iii)). The read register resets to
// D_INIT and then holds d(n) between reads; it serves as the compensator's
// d(n-1) delay. A write to the address being read returns the old word.
module memory_b
  import pwm_pkg::*;
#(
  parameter int    CW     = CODE_W,
  parameter int    DW     = D_W,
  parameter duty_t D_INIT = duty_t'(D_MIN)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             re,
  input  logic [CW-1:0]    code,
  input  logic [DW-1:0]    d_prev,
  output logic [DW-1:0]    d,
  input  logic             we,
  input  logic [CW+DW-1:0] waddr,
  input  logic [DW-1:0]    wdata
);
  timeunit 1ns; timeprecision 1ps;

  logic [DW-1:0] mem [2**(CW+DW)];

  // Table contents: value_lut[c] is the c-th reachable value in ascending
  // order, 0 for codes past the last one.
  initial begin
    value_set_t set;
    int         value_lut [2**CW];
    int         n;
    set = reachable_values();
    for (int c = 0; c < 2**CW; c++) value_lut[c] = 0;
    n = 0;
    for (int w = 0; w <= 2*EP_BOUND; w++)
      if (set[w]) begin
        if (n < 2**CW) value_lut[n] = w - EP_BOUND;
        n++;
      end
    for (int c = 0; c < 2**CW; c++)
      for (int dp = 0; dp < 2**DW; dp++)
        mem[c*(2**DW) + dp] = DW'(clamp_duty(dp + value_lut[c]));
  end

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  d <= DW'(D_INIT);
    else if (re) d <= mem[{code, d_prev}];
endmodule
