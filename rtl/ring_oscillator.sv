// ring_oscillator - behavioural model of the DPWM's embedded ring oscillator.
// It is an analog block and is not synthesizable.
//
// Models a ring of NPH/2 differential delay stages, each with delay TD_PS
// picoseconds. The true and complementary stage outputs give NPH clock phases
// of period NPH*TD_PS, equally spaced: the rising edge of ph[k] lags that of
// ph[0] by k*TD_PS. With the defaults (8 phases, 3.906 ns) 32 oscillator
// cycles last 1 us, which is what a 1 MHz DPWM with 256 steps needs. The
// published design names the oscillator and its multi-phase clock bus; the
// number of stages and their delay are this design's choice. While `en` is low
// the ring holds still with all stages at 0.
module ring_oscillator #(
  parameter int NPH   = 8,     // number of phases (even)
  parameter int TD_PS = 3906   // delay per stage, ps
) (
  input  logic           en,
  output logic [NPH-1:0] ph
);
  timeunit 1ns; timeprecision 1ps;

  localparam int NST = NPH / 2;

  logic [NST-1:0] stg;

  // Each stage follows its predecessor one stage delay later; the first stage
  // follows the inverted last stage, which closes the ring.
  always begin
    for (int k = 0; k < NST; k++) begin
      #(TD_PS * 1ps);
      if (!en)         stg = '0;
      else if (k == 0) stg[0] = ~stg[NST-1];
      else             stg[k] = stg[k-1];
    end
  end

  assign ph = {~stg, stg};
endmodule
