// tb_error_delay - shifts random error values through the delay element on
// random shift strobes and checks e(n), e(n-1), e(n-2) against a model.
module tb_error_delay;
  timeunit 1ns; timeprecision 1ps;
  import pwm_pkg::*;
  logic clk = 0, rst_n = 0, shift = 0;
  err_t e_in = '0, e_n, e_n1, e_n2;
  int checks = 0, failures = 0;
  int m0 = 0, m1 = 0, m2 = 0;

  error_delay dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      e_in  = err_t'($urandom_range(0, 8) - 4);
      shift = ($urandom_range(0, 2) != 0);
      @(negedge clk);
      if (shift) begin m2 = m1; m1 = m0; m0 = int'(e_in); end
      checks++;
      if (int'(e_n) != m0 || int'(e_n1) != m1 || int'(e_n2) != m2) begin
        failures++;
        $display("%0d: got %0d %0d %0d want %0d %0d %0d", i, e_n, e_n1, e_n2, m0, m1, m2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
