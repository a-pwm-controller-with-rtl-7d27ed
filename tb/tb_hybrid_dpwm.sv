// tb_hybrid_dpwm - drives the hybrid DPWM with an ideal 8-phase clock
// (4 ns between phases, so one PWM period is 256 x 4 ns = 1024 ns) and
// checks, for every duty word 1..255, that the pulse lasts exactly d x 4 ns
// and the period 1024 ns. d = 0 must give no pulse. The duty word is changed
// at random times relative to the phases.
module tb_hybrid_dpwm;
  timeunit 1ns; timeprecision 1ps;
  logic rst_n = 1;
  logic [7:0] ph;
  logic [7:0] d_in = 8'd0;
  logic duty;
  logic [3:0] stg = '0;
  int checks = 0, failures = 0;

  hybrid_dpwm dut (.*);

  // ideal 4-stage differential ring, 4 ns per stage
  always begin
    for (int k = 0; k < 4; k++) begin
      #4;
      stg[k] = (k == 0) ? ~stg[3] : stg[k-1];
    end
  end
  assign ph = {~stg, stg};

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input int d);
    realtime tr, tf, tr2;
    #($urandom_range(0, 999) * 1.0 + 0.3);
    d_in = 8'(d);
    // let the new word pass the synchroniser and a period boundary
    repeat (2) @(posedge duty);
    tr = $realtime;
    @(negedge duty);
    tf = $realtime;
    @(posedge duty);
    tr2 = $realtime;
    checks++;
    if (tf - tr < d*4.0 - 0.001 || tf - tr > d*4.0 + 0.001) begin
      failures++; $display("d=%0d high %f want %f", d, tf - tr, d*4.0);
    end
    checks++;
    if (tr2 - tr < 1023.999 || tr2 - tr > 1024.001) begin
      failures++; $display("d=%0d period %f", d, tr2 - tr);
    end
  endtask

  initial begin
    #1 rst_n = 0;
    #50 rst_n = 1;
    for (int d = 1; d < 256; d++) measure(d);
    for (int i = 0; i < 100; i++) measure($urandom_range(1, 255));
    // d = 0: output stays low
    d_in = 8'd0;
    #3000;
    begin
      int rises = 0;
      fork
        begin #3000; end
        forever begin @(posedge duty); rises++; end
      join_any
      disable fork;
      checks++;
      if (rises != 0 || duty !== 1'b0) begin failures++; $display("pulse with d=0"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
