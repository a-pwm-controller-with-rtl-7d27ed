// tb_memory_a - reads every Memory-A address and compares the stored code
// with a floating-point model of a*e(n)+b*e(n-1)+c*e(n-2); checks that the
// 71 reachable triples give codes that decode back to their own value, that
// the read is synchronous, and that the external write port works.
module tb_memory_a;
  timeunit 1ns; timeprecision 1ps;
  import pwm_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, re = 0, we = 0;
  logic [11:0] addr = '0, waddr = '0;
  logic [4:0] code, wdata = '0;
  int checks = 0, failures = 0, reach = 0;

  memory_a dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a, b, c, want;
    build_list();
    checks++;
    if (count_triples() != 71) begin failures++; $display("triples %0d", count_triples()); end
    $display("reachable rounded e' values: %0d", vals.size());
    @(negedge clk);
    for (int i = 0; i < 4096; i++) begin
      addr = 12'(i);
      re = 1;
      @(negedge clk);
      a = int'($signed(addr[11:8])); b = int'($signed(addr[7:4])); c = int'($signed(addr[3:0]));
      want = ref_reachable(a, b, c) ? ref_code(ref_eprime(a, b, c)) : ref_code(0);
      if (ref_reachable(a, b, c)) reach++;
      checks++;
      if (int'(code) != want) begin
        failures++;
        $display("addr %0d/%0d/%0d code %0d want %0d", a, b, c, code, want);
      end
    end
    checks++;
    if (reach != 71) begin failures++; $display("reachable addresses %0d", reach); end
    // read enable low holds the output
    addr = 12'h123; re = 0;
    begin
      logic [4:0] held;
      held = code;
      @(negedge clk);
      checks++;
      if (code !== held) begin failures++; $display("output changed without re"); end
    end
    // external write, then read back
    we = 1; waddr = 12'h345; wdata = 5'd19;
    @(negedge clk);
    we = 0; re = 1; addr = 12'h345;
    @(negedge clk);
    checks++;
    if (code !== 5'd19) begin failures++; $display("write/readback %0d", code); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
