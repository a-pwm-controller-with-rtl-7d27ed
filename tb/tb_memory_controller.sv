// tb_memory_controller - runs look-ups on random walks of error triples and
// checks that d(n) = clamp(d(n-1) + round(12.5 e(n) - 23.5 e(n-1) + 11.5
// e(n-2))) appears three cycles after start, with d_valid, and that d(n-1)
// is the previous result. Also checks the reset value and a table write.
module tb_memory_controller;
  timeunit 1ns; timeprecision 1ps;
  import pwm_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, d_valid;
  err_triple_t err = '0;
  duty_t d, tbl_wdata = '0;
  logic tbl_we = 0, tbl_sel = 0;
  logic [12:0] tbl_addr = '0;
  int checks = 0, failures = 0;

  memory_controller dut (.*);

  always #125 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic lookup(int en, int en1, int en2, output int result, output int latency);
    start = 1;
    @(negedge clk);
    start = 0;
    err.e_n = err_t'(en); err.e_n1 = err_t'(en1); err.e_n2 = err_t'(en2);
    latency = 1;
    while (!d_valid && latency < 10) begin @(negedge clk); latency++; end
    result = int'(d);
  endtask

  initial begin
    int e0, e1, e2, model, got, lat;
    build_list();
    repeat (2) @(negedge clk);
    checks++;
    if (d !== 8'd1) begin failures++; $display("reset d %0d", d); end
    rst_n = 1;
    model = 1; e0 = 0; e1 = 0; e2 = 0;
    for (int i = 0; i < 2000; i++) begin
      e2 = e1; e1 = e0;
      e0 = e0 + $urandom_range(0, 2) - 1;
      if (e0 > 4) e0 = 4;
      if (e0 < -4) e0 = -4;
      lookup(e0, e1, e2, got, lat);
      model = ref_clamp(model + ref_eprime(e0, e1, e2));
      checks++;
      if (got != model) begin failures++; $display("%0d: d %0d want %0d", i, got, model); end
      checks++;
      if (lat != 3) begin failures++; $display("latency %0d", lat); end
      @(negedge clk);
    end
    // reprogram Memory-B word {code of 0, d} to a marker and look it up
    tbl_we = 1; tbl_sel = 1; tbl_addr = {5'(ref_code(0)), 8'(model)}; tbl_wdata = 8'd200;
    @(negedge clk);
    tbl_we = 0;
    lookup(0, 0, 0, got, lat);
    checks++;
    if (got != 200) begin failures++; $display("table write not seen: %0d", got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
