// epu - error process unit.
//
// A saturating up/down state machine whose state is the error signal e(n),
// a 4-bit two's complement number in -4..+4. Once per 1 MHz period (input
// `step`) it looks at the comparator bus:
//   11 (output below Vref - Vq) : e(n) = e(n-1) + 1, held at +4
//   00 (output above Vref + Vq) : e(n) = e(n-1) - 1, held at -4
//   01 / 10 (inside the band)   : e(n) = e(n-1)
// This is the published state transition table and diagram. One clock after
// each update the unit pulses `enable`, which starts the table look-up of the
// compensator.
//
// Own choices: the comparator bus is asynchronous to the 4 MHz clock and
// passes two synchronising flip-flops first; the reset state is 0.
//
// Timing: e changes on the clock edge where `step` is high; `enable` is high
// for the following cycle.
module epu
  import pwm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       step,           // 1 MHz update strobe
  input  logic [1:0] error_voltage,  // comparator bus, asynchronous
  output err_t       e,              // e(n)
  output logic       enable          // compensator start pulse
);
  timeunit 1ns; timeprecision 1ps;

  logic [1:0] ev_meta, ev_sync;
  err_t       e_next;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      ev_meta <= 2'b01;
      ev_sync <= 2'b01;
    end else begin
      ev_meta <= error_voltage;
      ev_sync <= ev_meta;
    end

  // Next-state function of the transition table.
  always_comb begin
    e_next = e;
    unique case (err_volt_t'(ev_sync))
      EV_UP:   if (e != err_t'(E_MAX))  e_next = e + err_t'(1);
      EV_DOWN: if (e != err_t'(-E_MAX)) e_next = e - err_t'(1);
      default: e_next = e;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      e      <= '0;
      enable <= 1'b0;
    end else begin
      if (step) e <= e_next;
      enable <= step;
    end

  // The state never leaves -4..+4.
  a_range: assert property (@(posedge clk) disable iff (!rst_n)
                            (e <= err_t'(E_MAX)) && (e >= err_t'(-E_MAX)));
endmodule
