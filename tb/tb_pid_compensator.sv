// tb_pid_compensator - feeds the compensator a random walk of EPU states,
// one per 1 MHz period (4 cycles of 4 MHz), and checks each d(n) against
// d(n) = clamp(d(n-1) + round(12.5 e(n) - 23.5 e(n-1) + 11.5 e(n-2))),
// with e(n-1) and e(n-2) tracked by the testbench; also checks the 3-cycle
// latency from Enable to d_valid and that both clamp limits are reached.
module tb_pid_compensator;
  timeunit 1ns; timeprecision 1ps;
  import pwm_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, enable = 0, d_valid;
  err_t e = '0;
  duty_t d, tbl_wdata = '0;
  logic tbl_we = 0, tbl_sel = 0;
  logic [12:0] tbl_addr = '0;
  int checks = 0, failures = 0, at_lo = 0, at_hi = 0;

  pid_compensator dut (.*);

  always #125 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e0, e1, e2, model, lat, dir;
    build_list();
    repeat (2) @(negedge clk);
    rst_n = 1;
    model = 1; e0 = 0; e1 = 0; e2 = 0; dir = 1;
    for (int i = 0; i < 3000; i++) begin
      if (i % 200 == 0) dir = -dir;
      e2 = e1; e1 = e0;
      e0 = e0 + (($urandom_range(0, 3) == 0) ? -dir : (($urandom_range(0, 1) == 0) ? 0 : dir));
      if (e0 > 4) e0 = 4;
      if (e0 < -4) e0 = -4;
      e = err_t'(e0);
      enable = 1;
      @(negedge clk);
      enable = 0;
      lat = 1;
      while (!d_valid && lat < 10) begin @(negedge clk); lat++; end
      model = ref_clamp(model + ref_eprime(e0, e1, e2));
      checks++;
      if (lat != 3) begin failures++; $display("latency %0d", lat); end
      checks++;
      if (int'(d) != model) begin failures++; $display("%0d: d %0d want %0d", i, d, model); end
      if (model == 1) at_lo++;
      if (model == 254) at_hi++;
      @(negedge clk);   // 4 cycles per iteration in all
    end
    checks++;
    if (at_lo == 0 || at_hi == 0) begin failures++; $display("clamp limits not reached %0d %0d", at_lo, at_hi); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
