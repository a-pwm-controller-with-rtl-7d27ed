// tb_dpwm - the DPWM with its own ring oscillator: checks that the period is
// 256 stage delays (about 1 us, 1 MHz) and that the high time is d/256 of it
// for a set of duty words, including the extremes 1 and 254.
module tb_dpwm;
  timeunit 1ns; timeprecision 1ps;
  logic rst_n = 1;
  logic [7:0] d_in = 8'd128;
  logic duty;
  int checks = 0, failures = 0;
  localparam real TD = 3.906;

  dpwm dut (.*);

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input int d);
    realtime tr, tf, tr2;
    d_in = 8'(d);
    repeat (2) @(posedge duty);
    tr = $realtime;
    @(negedge duty);
    tf = $realtime;
    @(posedge duty);
    tr2 = $realtime;
    checks++;
    if (tf - tr < d*TD - 0.01 || tf - tr > d*TD + 0.01) begin
      failures++; $display("d=%0d high %f want %f", d, tf - tr, d*TD);
    end
    checks++;
    if (tr2 - tr < 256*TD - 0.01 || tr2 - tr > 256*TD + 0.01) begin
      failures++; $display("d=%0d period %f", d, tr2 - tr);
    end
  endtask

  initial begin
    int ds [] = '{1, 2, 7, 8, 9, 64, 128, 139, 200, 253, 254};
    #1 rst_n = 0;
    #100 rst_n = 1;
    foreach (ds[i]) measure(ds[i]);
    for (int i = 0; i < 40; i++) measure($urandom_range(1, 254));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
