// hyst_comparators - behavioural model of the two analog comparators that
// compare the converter output with the reference. It is an analog block and
// is not synthesizable.
//
// With diff = vref - vout the 2-bit output follows the published rule:
//   00 when diff <= -VQ, 11 when diff >= VQ, in-band code otherwise.
// Bit 0 is a plain comparator, 1 while diff > -VQ. Bit 1 is a comparator with
// hysteresis: it rises when diff reaches VQ and falls only when diff drops
// below VQ - VHYS, which keeps it from chattering on ripple. The in-band code
// is therefore 01; inside the narrow window VQ - VHYS <= diff < VQ the code
// stays 11 if it was 11, which is the one departure from the rule above. Which of the two comparators carries the hysteresis, and
// the values of VQ (the output voltage resolution) and VHYS, are this design's
// choices. The output changes as soon as an input does.
module hyst_comparators #(
  parameter real VQ   = 0.010,  // V, threshold = resolution Vq
  parameter real VHYS = 0.002   // V, hysteresis of the upper comparator
) (
  input  real        vref,
  input  real        vout,
  output logic [1:0] error_voltage
);
  timeunit 1ns; timeprecision 1ps;

  logic hi;
  logic lo;

  // The hysteresis is a stored state: a latch by intent.
  always_latch begin
    if (vref - vout >= VQ)             hi = 1'b1;
    else if (vref - vout < VQ - VHYS)  hi = 1'b0;
  end

  assign lo = (vref - vout > -VQ);
  assign error_voltage = {hi, lo};
endmodule
