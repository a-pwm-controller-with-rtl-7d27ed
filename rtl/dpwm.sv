// dpwm - digital PWM with an embedded ring oscillator.
//
// The ring oscillator (a behavioural model) supplies the multi-phase clock
// bus and the hybrid DPWM turns the duty word d(n) into Duty(t), a 1 MHz
// pulse train with duty cycle d(n)/256. This is the published structure. The
// oscillator runs while rst_n is high. d_in may change at any time; it is
// resynchronised inside and takes effect at the next period start.
module dpwm #(
  parameter int DW    = 8,
  parameter int NPH   = 8,
  parameter int TD_PS = 3906
) (
  input  logic          rst_n,
  input  logic [DW-1:0] d_in,
  output logic          duty
);
  timeunit 1ns; timeprecision 1ps;

  logic [NPH-1:0] ph;

  ring_oscillator #(.NPH(NPH), .TD_PS(TD_PS)) u_osc (
    .en (rst_n),
    .ph (ph)
  );

  hybrid_dpwm #(.DW(DW), .NPH(NPH)) u_hdpwm (
    .rst_n (rst_n),
    .ph    (ph),
    .d_in  (d_in),
    .duty  (duty)
  );
endmodule
