// buck_model - behavioural model of the synchronous buck power stage and its
// load, for closed-loop simulation of the controller. Not synthesizable.
//
// While `duty` is high the switch node is at vg, otherwise at ground (ideal
// complementary switches). The inductor current and capacitor voltage are
// integrated with the forward Euler method every DT_NS nanoseconds:
//   dil/dt   = (v_sw - vout) / L
//   dvout/dt = (il - vout / rload) / C
// Defaults: L = 98 uH, C = 125 nF, as in the evaluated converter.
module buck_model #(
  parameter real L     = 98e-6,
  parameter real C     = 125e-9,
  parameter real DT_NS = 1.0
) (
  input  logic duty,
  input  real  vg,
  input  real  rload,
  output real  vout,
  output real  il
);
  timeunit 1ns; timeprecision 1ps;

  real vsw;

  initial begin
    vout = 0.0;
    il   = 0.0;
  end

  always begin
    #(DT_NS);
    vsw  = duty ? vg : 0.0;
    il   = il + (vsw - vout) / L * DT_NS * 1.0e-9;
    vout = vout + (il - vout / rload) / C * DT_NS * 1.0e-9;
  end
endmodule
