// pwm_controller - digital PWM controller for a DC-DC buck converter with a
// multiple-access table look-up PID compensator.
//
// Signal flow, once per 1 MHz switching period:
//   vout, vref -> hyst_comparators -> 2-bit error_voltage
//   error_voltage -> epu -> e(n) in -4..+4, plus an Enable pulse
//   e(n) -> pid_compensator: two table reads give
//           d(n) = d(n-1) + 12.5 e(n) - 23.5 e(n-1) + 11.5 e(n-2), in 1..254
//   d(n) -> dpwm (ring oscillator + hybrid DPWM) -> duty, 1 MHz, d(n)/256
// The structure, coefficients and ranges follow the published controller.
// The comparators and the ring oscillator are behavioural models of analog
// parts; everything else is synthesizable.
//
// Clocking: `clk` is the 4 MHz controller clock. timing_gen divides it into
// the 1 MHz period, in which the EPU updates, and the three look-up stages
// follow on the next three edges, so d(n) is ready 4 clk cycles after the
// comparator code is sampled (plus two synchroniser cycles). The DPWM runs
// from its own oscillator and picks up d(n) at the start of its next period.
//
// Table port: with tbl_we high at a clk edge, tbl_wdata is written to
// Memory-A (tbl_sel = 0, address tbl_addr[11:0], data bits [4:0]) or
// Memory-B (tbl_sel = 1, address tbl_addr = {code, d(n-1)}). Both tables
// start filled for a = 12.5, b = -23.5, c = 11.5.
module pwm_controller
  import pwm_pkg::*;
#(
  parameter real   VQ     = 0.010,             // V, comparator threshold Vq
  parameter real   VHYS   = 0.002,             // V, comparator hysteresis
  parameter duty_t D_INIT = duty_t'(D_MIN),    // d(n) after reset
  parameter int    TD_PS  = 3906               // ring oscillator stage delay
) (
  input  logic            clk,            // 4 MHz
  input  logic            rst_n,
  input  real             vref,           // reference voltage
  input  real             vout,           // converter output voltage
  input  logic            tbl_we,
  input  logic            tbl_sel,
  input  logic [B_AW-1:0] tbl_addr,
  input  duty_t           tbl_wdata,
  output logic            duty,           // Duty(t) to the power stage
  output logic [1:0]      error_voltage,
  output err_t            e_n,            // e(n)
  output duty_t           d_n,            // d(n)
  output logic            d_valid,
  output logic            clk_1m,
  output logic            clk_2m
);
  timeunit 1ns; timeprecision 1ps;

  logic step, enable;

  hyst_comparators #(.VQ(VQ), .VHYS(VHYS)) u_cmp (
    .vref          (vref),
    .vout          (vout),
    .error_voltage (error_voltage)
  );

  timing_gen u_timing (
    .clk    (clk),
    .rst_n  (rst_n),
    .step   (step),
    .clk_2m (clk_2m),
    .clk_1m (clk_1m)
  );

  epu u_epu (
    .clk           (clk),
    .rst_n         (rst_n),
    .step          (step),
    .error_voltage (error_voltage),
    .e             (e_n),
    .enable        (enable)
  );

  pid_compensator #(.D_INIT(D_INIT)) u_pid (
    .clk       (clk),
    .rst_n     (rst_n),
    .enable    (enable),
    .e         (e_n),
    .d         (d_n),
    .d_valid   (d_valid),
    .tbl_we    (tbl_we),
    .tbl_sel   (tbl_sel),
    .tbl_addr  (tbl_addr),
    .tbl_wdata (tbl_wdata)
  );

  dpwm #(.DW(D_W), .NPH(8), .TD_PS(TD_PS)) u_dpwm (
    .rst_n (rst_n),
    .d_in  (d_n),
    .duty  (duty)
  );
endmodule
