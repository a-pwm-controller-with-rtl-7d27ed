// tb_ring_oscillator - measures the rising edges of all phases: the period
// must be 8 stage delays (31.248 ns) and ph[k] must lag ph[0] by k stage
// delays. Also checks that the ring stops while disabled.
module tb_ring_oscillator;
  timeunit 1ns; timeprecision 1ps;
  logic en = 0;
  logic [7:0] ph;
  int checks = 0, failures = 0;
  realtime rise [8];
  realtime prev0 = -1.0;

  ring_oscillator dut (.*);

  for (genvar k = 0; k < 8; k++) begin : g_mon
    always @(posedge ph[k]) rise[k] = $realtime;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t0, per;
    #100;
    checks++;
    if (ph !== 8'hF0) begin failures++; $display("disabled state %h", ph); end
    en = 1;
    repeat (5) @(posedge ph[0]);
    for (int n = 0; n < 50; n++) begin
      @(posedge ph[0]);
      t0 = $realtime;
      if (prev0 >= 0) begin
        per = t0 - prev0;
        checks++;
        if (per < 31.247 || per > 31.249) begin failures++; $display("period %f", per); end
      end
      prev0 = t0;
      @(posedge ph[7]);
      #0.001;
      for (int k = 1; k < 8; k++) begin
        checks++;
        if (rise[k] - t0 < k*3.906 - 0.0005 || rise[k] - t0 > k*3.906 + 0.0005) begin
          failures++; $display("phase %0d lag %f", k, rise[k] - t0);
        end
      end
    end
    en = 0;
    #100;
    checks++;
    if (ph !== 8'hF0) begin failures++; $display("did not stop: %h", ph); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
