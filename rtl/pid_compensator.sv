// pid_compensator - multiple-access table look-up PID compensator.
//
// The delay element keeps e(n), e(n-1), e(n-2); the memory controller turns
// them and d(n-1) into d(n) with one Memory-A and one Memory-B read. A
// look-up starts when the EPU's `enable` is high and d(n) is updated three
// clock cycles later (three 4 MHz cycles = 750 ns, inside one 1 MHz period),
// marked by `d_valid`. The partition follows the published block diagram.
module pid_compensator
  import pwm_pkg::*;
#(
  parameter duty_t D_INIT = duty_t'(D_MIN)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            enable,     // from the EPU
  input  err_t            e,          // e(n) from the EPU
  output duty_t           d,          // d(n) to the DPWM
  output logic            d_valid,
  input  logic            tbl_we,
  input  logic            tbl_sel,
  input  logic [B_AW-1:0] tbl_addr,
  input  duty_t           tbl_wdata
);
  timeunit 1ns; timeprecision 1ps;

  err_triple_t err;

  error_delay u_delay (
    .clk   (clk),
    .rst_n (rst_n),
    .shift (enable),
    .e_in  (e),
    .e_n   (err.e_n),
    .e_n1  (err.e_n1),
    .e_n2  (err.e_n2)
  );

  memory_controller #(.D_INIT(D_INIT)) u_memctl (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (enable),
    .err       (err),
    .d         (d),
    .d_valid   (d_valid),
    .tbl_we    (tbl_we),
    .tbl_sel   (tbl_sel),
    .tbl_addr  (tbl_addr),
    .tbl_wdata (tbl_wdata)
  );
endmodule
