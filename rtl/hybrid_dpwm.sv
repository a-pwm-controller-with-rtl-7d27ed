// hybrid_dpwm - hybrid counter / multi-phase digital pulse-width modulator.
//
// Produces Duty(t) with period NPH*2^(DW-LW) phase steps (1 us with the
// default oscillator) and a high time of d phase steps, i.e. a duty cycle of
// d/256. The upper DW-LW bits of d are counted by a counter clocked by ph[0]
// (one count per oscillator cycle); the lower LW = log2(NPH) bits pick which
// of the NPH oscillator phases ends the pulse, so the resolution is one stage
// delay while the counter runs at only 1/NPH of that rate. That split of the
// duty word between a counter and a phase selection is the published
// approach; the bit split (5 + 3) is this design's choice.
//
// How the edges are made (own choice, free of clock multiplexers):
//   * at the ph[0] edge where the counter wraps to 0, a start flip-flop
//     toggles (unless d = 0), which raises Duty;
//   * each phase k has a stop flip-flop clocked by ph[k] that toggles when k
//     equals the low bits of d and the counter has reached the high bits of
//     d (for k = 0 the edge sees the count before it increments, so it
//     compares with high bits - 1);
//   * Duty = start XOR all stop flip-flops; at most one of them changes at
//     a time, so Duty has no glitches.
// d_in comes from another clock domain. It passes two flip-flops in the ph[0]
// domain and is taken only when both agree; the value is loaded at the start
// of each period, so a period always uses one consistent d. d = 0 gives a
// constant low output.
module hybrid_dpwm #(
  parameter int DW  = 8,   // duty word width
  parameter int NPH = 8    // number of oscillator phases (power of two)
) (
  input  logic           rst_n,
  input  logic [NPH-1:0] ph,     // multi-phase clock bus
  input  logic [DW-1:0]  d_in,   // duty word d(n)
  output logic           duty    // Duty(t)
);
  timeunit 1ns; timeprecision 1ps;

  localparam int LW = $clog2(NPH);
  localparam int MW = DW - LW;

  logic [MW-1:0]  cnt;
  logic [DW-1:0]  d_s1, d_s2, d_stable, d_q;
  logic           start_t;
  logic [NPH-1:0] stop_t;
  logic [NPH-1:0] hit;

  // Counter, duty-word synchroniser and period start, all in the ph[0] domain.
  always_ff @(posedge ph[0] or negedge rst_n)
    if (!rst_n) begin
      cnt      <= '1;
      d_s1     <= '0;
      d_s2     <= '0;
      d_stable <= '0;
      d_q      <= '0;
      start_t  <= 1'b0;
    end else begin
      cnt  <= cnt + 1'b1;
      d_s1 <= d_in;
      d_s2 <= d_s1;
      if (d_s1 == d_s2) d_stable <= d_s2;
      if (cnt == '1) begin
        d_q <= d_stable;
        if (d_stable != '0) start_t <= ~start_t;
      end
    end

  for (genvar k = 0; k < NPH; k++) begin : g_phase
    if (k == 0) begin : g_first
      assign hit[k] = (d_q != '0) && (d_q[LW-1:0] == LW'(k)) &&
                      (cnt == d_q[DW-1:LW] - 1'b1);
    end else begin : g_other
      assign hit[k] = (d_q != '0) && (d_q[LW-1:0] == LW'(k)) &&
                      (cnt == d_q[DW-1:LW]);
    end

    logic stop_q;
    always_ff @(posedge ph[k] or negedge rst_n)
      if (!rst_n)      stop_q <= 1'b0;
      else if (hit[k]) stop_q <= ~stop_q;
    assign stop_t[k] = stop_q;
  end

  assign duty = start_t ^ (^stop_t);
endmodule
