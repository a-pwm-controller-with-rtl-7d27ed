// timing_gen - loop timing of the multiple-access compensator.
//
// The controller runs from one 4 MHz clock. A 2-bit counter divides it into
// the 1 MHz switching period and gives the 2 MHz and 1 MHz square waves that
// frame the three look-up stages:
//
//   cnt      : 0      1      2      3      0 ...
//   step     : 0      0      0      1      0      (EPU updates at the edge after)
//   clk_2m   : 0      1      0      1      0
//   clk_1m   : 0      1      1      0      0
//
// The EPU updates e(n) on the clock edge that ends cycle 3 and raises its
// Enable for cycle 0. Stage (i) (latch the inputs) is the edge that ends cycle
// 0, stage (ii) (read Memory-A) the edge ending cycle 1 and stage (iii) (read
// Memory-B) the edge ending cycle 2, so clk_1m is high from stage (i) to stage
// (iii) and clk_2m toggles at every stage. The use of a 4 MHz clock and of
// three stages per 1 MHz period follows the published timing; the exact
// alignment of the stages to the clock edges is this design's choice.
module timing_gen (
  input  logic clk,     // 4 MHz
  input  logic rst_n,   // asynchronous, active low
  output logic step,    // one-cycle strobe per 1 MHz period
  output logic clk_2m,  // 2 MHz square wave
  output logic clk_1m   // 1 MHz square wave
);
  timeunit 1ns; timeprecision 1ps;

  logic [1:0] cnt;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) cnt <= 2'd0;
    else        cnt <= cnt + 2'd1;

  always_comb begin
    step   = (cnt == 2'd3);
    clk_2m = cnt[0];
    clk_1m = (cnt == 2'd1) || (cnt == 2'd2);
  end
endmodule
