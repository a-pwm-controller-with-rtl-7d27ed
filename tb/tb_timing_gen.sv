// tb_timing_gen - checks the 1 MHz strobe and the 2 MHz / 1 MHz waveforms
// derived from the 4 MHz clock: one step every 4 cycles, clk_2m toggling at
// every stage edge, clk_1m high for the two cycles from stage (i) to (iii).
module tb_timing_gen;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst_n = 0;
  logic step, clk_2m, clk_1m;
  int checks = 0, failures = 0;

  timing_gen dut (.*);

  always #125 clk = ~clk;   // 4 MHz

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last_step, n;
    repeat (2) @(negedge clk);
    rst_n = 1;
    last_step = -1;
    for (n = 0; n < 400; n++) begin
      @(negedge clk);
      // n counts cycles since reset; cnt = (n+1) mod 4
      checks++;
      if (step !== (((n + 1) % 4) == 3)) begin failures++; $display("step wrong at %0d", n); end
      checks++;
      if (clk_2m !== (((n + 1) % 2) == 1)) begin failures++; $display("clk_2m wrong at %0d", n); end
      checks++;
      if (clk_1m !== ((((n + 1) % 4) == 1) || (((n + 1) % 4) == 2))) begin
        failures++; $display("clk_1m wrong at %0d", n);
      end
      if (step) begin
        if (last_step >= 0) begin
          checks++;
          if (n - last_step != 4) begin failures++; $display("step period %0d", n - last_step); end
        end
        last_step = n;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
