// tb_memory_b - checks Memory-B: after reset the output is 1; every word of
// the valid codes gives d(n-1) + e'(n) clamped to 1..254 (reference
// computed in floating point); the external write port works.
module tb_memory_b;
  timeunit 1ns; timeprecision 1ps;
  import pwm_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, re = 0, we = 0;
  logic [4:0] code = '0;
  logic [7:0] d_prev = '0, d, wdata = '0;
  logic [12:0] waddr = '0;
  int checks = 0, failures = 0, lo_clamps = 0, hi_clamps = 0;

  memory_b dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int want;
    build_list();
    @(negedge clk);
    checks++;
    if (d !== 8'd1) begin failures++; $display("reset value %0d", d); end
    rst_n = 1;
    for (int c = 0; c < vals.size(); c++)
      for (int dp = 0; dp < 256; dp++) begin
        code = 5'(c); d_prev = 8'(dp); re = 1;
        @(negedge clk);
        want = ref_clamp(dp + ref_value(c));
        if (dp + ref_value(c) < 1) lo_clamps++;
        if (dp + ref_value(c) > 254) hi_clamps++;
        checks++;
        if (int'(d) != want) begin
          failures++;
          if (failures < 10) $display("code %0d d_prev %0d: d %0d want %0d", c, dp, d, want);
        end
      end
    checks++;
    if (lo_clamps == 0 || hi_clamps == 0) begin failures++; $display("clamps not exercised"); end
    re = 0; we = 1; waddr = {5'd3, 8'd100}; wdata = 8'd77;
    @(negedge clk);
    we = 0; re = 1; code = 5'd3; d_prev = 8'd100;
    @(negedge clk);
    checks++;
    if (d !== 8'd77) begin failures++; $display("write/readback %0d", d); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
