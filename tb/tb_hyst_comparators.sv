// tb_hyst_comparators - sweeps vout around vref and checks the comparator
// code: 00 for vref - vout <= -Vq, 11 for >= Vq, 01 in between, and that
// the upper comparator keeps 11 down to Vq - Vhys on the way back.
module tb_hyst_comparators;
  timeunit 1ns; timeprecision 1ps;
  real vref = 1.8, vout = 1.8;
  logic [1:0] error_voltage;
  int checks = 0, failures = 0;
  localparam real VQ = 0.010, VH = 0.002;

  hyst_comparators dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input real diff, input logic [1:0] want);
    vout = vref - diff;
    #1;
    checks++;
    if (error_voltage !== want) begin
      failures++; $display("diff %f: code %b want %b", diff, error_voltage, want);
    end
  endtask

  initial begin
    real diff;
    // start well above the reference, then sweep upward in diff
    chk(-0.05, 2'b00);
    for (int i = -500; i <= 500; i++) begin
      diff = i * 0.0001;
      if (diff <= -VQ)                 chk(diff, 2'b00);
      else if (diff < VQ - 0.00005)    chk(diff, 2'b01);
      else if (diff >= VQ + 0.00005)   chk(diff, 2'b11);
    end
    // sweep back down: 11 is held inside the hysteresis window
    for (int i = 500; i >= -500; i--) begin
      diff = i * 0.0001;
      if (diff >= VQ - VH + 0.00005)      chk(diff, 2'b11);
      else if (diff < VQ - VH - 0.00005 && diff > -VQ + 0.00005) chk(diff, 2'b01);
      else if (diff <= -VQ - 0.00005)     chk(diff, 2'b00);
    end
    // a different reference level
    vref = 1.2;
    chk(0.05, 2'b11);
    chk(-0.05, 2'b00);
    chk(0.0, 2'b01);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
