// error_delay - the compensator's delay element.
//
// Keeps the last three EPU states e(n), e(n-1), e(n-2), which together form
// the 12-bit Memory-A address. On `shift` (the EPU's Enable, which is stage
// (i) of the look-up) the current e(n) is taken in and the older samples move
// down by one. All three registers reset to 0, a reachable triple. The
// function is the published one; building it as a shift register is the
// simplest form of it.
module error_delay
  import pwm_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic shift,  // advance once per loop iteration
  input  err_t e_in,   // e(n) from the EPU
  output err_t e_n,    // e(n)
  output err_t e_n1,   // e(n-1)
  output err_t e_n2    // e(n-2)
);
  timeunit 1ns; timeprecision 1ps;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      e_n  <= '0;
      e_n1 <= '0;
      e_n2 <= '0;
    end else if (shift) begin
      e_n  <= e_in;
      e_n1 <= e_n;
      e_n2 <= e_n1;
    end
endmodule
