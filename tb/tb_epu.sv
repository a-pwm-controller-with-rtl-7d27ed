// tb_epu - drives random comparator codes into the EPU, once per 1 MHz
// period, and compares e(n) with a saturating counter model (+1 on 11, -1 on
// 00, hold on 01/10, limits +/-4). Also checks that Enable follows each
// update by one cycle, and that every (state, code) entry of the transition
// table was exercised.
module tb_epu;
  timeunit 1ns; timeprecision 1ps;
  import pwm_pkg::*;
  logic clk = 0, rst_n = 0, step = 0;
  logic [1:0] error_voltage = 2'b01;
  err_t e;
  logic enable;
  int checks = 0, failures = 0;
  int model = 0, at_max = 0, at_min = 0;
  int cov [9][4] = '{default: '{default: 0}};   // visits of each (state, comparator code) entry of the transition table

  epu dut (.*);

  always #125 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bias;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (e !== 0) begin failures++; $display("reset state %0d", e); end
    for (int it = 0; it < 1500; it++) begin
      // change the comparator code right after an update, hold it 4 cycles
      bias = (it / 150) % 3;   // runs that push up, down or at random
      case (bias)
        0: error_voltage = ($urandom_range(0, 3) != 0) ? 2'b11 : 2'(($urandom_range(0, 2)));
        1: error_voltage = ($urandom_range(0, 3) != 0) ? 2'b00 : 2'(($urandom_range(1, 3)));
        default: error_voltage = 2'($urandom_range(0, 3));
      endcase
      repeat (2) @(negedge clk);
      step = 1;
      @(negedge clk);
      step = 0;
      cov[model + 4][error_voltage]++;
      case (error_voltage)
        2'b11: if (model < 4) model++;
        2'b00: if (model > -4) model--;
        default: ;
      endcase
      checks++;
      if (int'(e) != model) begin failures++; $display("it %0d: e=%0d model=%0d", it, e, model); end
      checks++;
      if (enable !== 1'b1) begin failures++; $display("enable missing"); end
      if (model == 4) at_max++;
      if (model == -4) at_min++;
      @(negedge clk);
      checks++;
      if (enable !== 1'b0) begin failures++; $display("enable too long"); end
    end
    checks++;
    if (at_max == 0 || at_min == 0) begin failures++; $display("limits not reached"); end
    // every entry of the state transition table must have been exercised
    for (int st = 0; st < 9; st++)
      for (int c = 0; c < 4; c++) begin
        checks++;
        if (cov[st][c] == 0) begin failures++; $display("state %0d code %0d never tried", st - 4, c); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
