// tb_pwm_controller - closed-loop test of the whole controller at its
// default parameters, driving a behavioural buck converter (Vg = 3.3 V,
// L = 98 uH, C = 125 nF, R = 18 ohm, target 1.8 V).
//
// Phases: power-up (vout must come within 50 mV of 1.8 V within 150 us); load step 18 -> 9 ohm; line steps Vg 3.3 -> 4.0 V and
// 3.3 -> 2.6 V; reference steps that drive the duty word to both clamp
// limits; a table rewrite through the external table port. After each
// regulation phase the mean output over 50 us must be within 50 mV of the
// reference. With the published coefficients the loop does not come to rest
// but keeps a limit cycle of several tens of mV around the reference, so the
// mean, not the peak deviation, is checked; the range is printed.
//
// Throughout, a monitor recomputes every d(n) from the observed e(n) history
// with a floating-point PID model, checks that d_valid comes once per 1 MHz
// period in the same 4 MHz slot, and that each Duty(t) pulse lasts d x 3.906
// ns for one of the recent d(n) and the period is 256 x 3.906 ns. It counts
// the mechanisms (EPU up / down / hold, both saturation limits, both clamp
// limits, table look-ups, a rewritten table word in use) and fails any that
// never happened.
module tb_pwm_controller;
  timeunit 1ns; timeprecision 1ps;
  import pwm_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 1;
  real vref = 1.8, vout, vg = 3.3, rload = 18.0, il;
  logic tbl_we = 0, tbl_sel = 0;
  logic [12:0] tbl_addr = '0;
  duty_t tbl_wdata = '0;
  logic duty, d_valid, clk_1m, clk_2m;
  logic [1:0] error_voltage;
  err_t e_n;
  duty_t d_n;

  int checks = 0, failures = 0;
  int n_up = 0, n_down = 0, n_hold = 0, n_sat_hi = 0, n_sat_lo = 0;
  int n_clamp_hi = 0, n_clamp_lo = 0, n_lookup = 0, n_override = 0, n_pulse = 0;
  bit override_444 = 0;
  int override_val = 0;
  localparam real TD = 3.906;

  pwm_controller dut (.*);

  buck_model plant (.duty(duty), .vg(vg), .rload(rload), .vout(vout), .il(il));

  always #125 clk = ~clk;   // 4 MHz

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- PID monitor -------------------------------------------------------
  int h0 = 0, h1 = 0, h2 = 0, dm = 1, last_valid = -1, cyc = 0;
  int drecent [4] = '{1, 1, 1, 1};
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (d_valid) begin
      int ep, raw;
      n_lookup++;
      if (last_valid >= 0) begin
        checks++;
        if (cyc - last_valid != 4) begin failures++; $display("d_valid spacing %0d", cyc - last_valid); end
      end
      last_valid = cyc;
      checks++;
      if (!(clk_2m && !clk_1m)) begin failures++; $display("d_valid out of its slot"); end
      h2 = h1; h1 = h0; h0 = int'(e_n);
      if (h0 > h1) n_up++;
      else if (h0 < h1) n_down++;
      else n_hold++;
      if (h0 == 4 && h1 == 4) n_sat_hi++;
      if (h0 == -4 && h1 == -4) n_sat_lo++;
      ep = ref_eprime(h0, h1, h2);
      if (override_444 && h0 == 4 && h1 == 4 && h2 == 4) begin
        ep = override_val;
        n_override++;
      end
      raw = dm + ep;
      if (raw > 254) n_clamp_hi++;
      if (raw < 1) n_clamp_lo++;
      dm = ref_clamp(raw);
      checks++;
      if (int'(d_n) != dm) begin
        failures++;
        if (failures < 20) $display("%t d(n)=%0d model %0d (e %0d %0d %0d)", $realtime, d_n, dm, h0, h1, h2);
        dm = int'(d_n);
      end
      drecent[3] = drecent[2];
      drecent[2] = drecent[1];
      drecent[1] = drecent[0];
      drecent[0] = dm;
    end
  end

  // ---- DPWM monitor ------------------------------------------------------
  realtime t_rise = -1.0;
  always @(posedge duty) begin
    if (t_rise > 0) begin
      checks++;
      if ($realtime - t_rise < 256*TD - 0.01 || $realtime - t_rise > 256*TD + 0.01) begin
        failures++; $display("%t PWM period %f", $realtime, $realtime - t_rise);
      end
    end
    t_rise = $realtime;
  end
  always @(negedge duty) if (t_rise > 0) begin
    real w;
    bit ok;
    w = ($realtime - t_rise) / TD;
    ok = 0;
    foreach (drecent[i]) if (w > drecent[i] - 0.01 && w < drecent[i] + 0.01) ok = 1;
    n_pulse++;
    checks++;
    if (!ok) begin failures++; $display("%t pulse of %f steps, recent d %p", $realtime, w, drecent); end
  end

  // ---- helpers -------------------------------------------------------------
  task automatic run_us(int us);
    #(us * 1000.0);
  endtask

  task automatic check_regulated(string what, real target);
    real sum = 0.0, vmin = 100.0, vmax = -100.0;
    for (int i = 0; i < 500; i++) begin
      #100;
      sum += vout;
      if (vout < vmin) vmin = vout;
      if (vout > vmax) vmax = vout;
    end
    checks++;
    if (sum / 500.0 < target - 0.05 || sum / 500.0 > target + 0.05) begin
      failures++;
      $display("%s: mean vout %f, target %f", what, sum / 500.0, target);
    end else
      $display("%s: mean vout %f V, range %f .. %f V", what, sum / 500.0, vmin, vmax);
  endtask

  initial begin
    realtime t0, tsettle;
    build_list();
    #1 rst_n = 0;
    #500 rst_n = 1;
    // power-up: time until vout first comes within 50 mV of the target
    t0 = $realtime;
    tsettle = -1;
    for (int i = 0; i < 3000 && tsettle < 0; i++) begin
      #100;
      if (vout > 1.75) tsettle = $realtime - t0;
    end
    $display("power-up: vout within 50 mV of 1.8 V after %0.1f us", tsettle / 1000.0);
    checks++;
    if (tsettle < 0 || tsettle > 150000) begin failures++; $display("power-up too slow"); end
    run_us(60);
    check_regulated("steady state, 18 ohm", 1.8);

    rload = 9.0;
    run_us(120);
    check_regulated("load step to 9 ohm", 1.8);
    rload = 18.0;

    vg = 4.0;
    run_us(120);
    check_regulated("line step to 4.0 V", 1.8);

    vg = 2.6;
    run_us(120);
    check_regulated("line step to 2.6 V", 1.8);
    vg = 3.3;

    vref = 1.0;
    run_us(180);
    check_regulated("reference 1.0 V", 1.0);

    // Rewrite the Memory-A word of the history (+4, +4, +4) from e' = +2 to
    // e' = +10 through the table port; the climb to the upper limit then
    // uses it. The word is restored afterwards.
    @(negedge clk);
    tbl_we = 1; tbl_sel = 0; tbl_addr = 13'h444; tbl_wdata = duty_t'(ref_code(10));
    @(negedge clk);
    tbl_we = 0;
    override_444 = 1; override_val = 10;
    vref = 3.6;          // above vg: duty word runs into its upper limit
    run_us(150);
    @(negedge clk);
    tbl_we = 1; tbl_addr = 13'h444; tbl_wdata = duty_t'(ref_code(2));
    @(negedge clk);
    tbl_we = 0;
    override_444 = 0;
    vref = 0.0;          // output cannot reach 0: duty word runs to its lower limit
    run_us(250);
    vref = 1.8;
    run_us(150);
    check_regulated("back to 1.8 V", 1.8);

    $display("mechanisms: up %0d down %0d hold %0d sat+4 %0d sat-4 %0d clamp254 %0d clamp1 %0d lookups %0d rewritten-word %0d pulses %0d",
             n_up, n_down, n_hold, n_sat_hi, n_sat_lo, n_clamp_hi, n_clamp_lo, n_lookup, n_override, n_pulse);
    checks++; if (n_up == 0)       begin failures++; $display("no EPU increment"); end
    checks++; if (n_down == 0)     begin failures++; $display("no EPU decrement"); end
    checks++; if (n_hold == 0)     begin failures++; $display("no EPU hold"); end
    checks++; if (n_sat_hi == 0)   begin failures++; $display("EPU never held at +4"); end
    checks++; if (n_sat_lo == 0)   begin failures++; $display("EPU never held at -4"); end
    checks++; if (n_clamp_hi == 0) begin failures++; $display("d never clamped at 254"); end
    checks++; if (n_clamp_lo == 0) begin failures++; $display("d never clamped at 1"); end
    checks++; if (n_lookup == 0)   begin failures++; $display("no look-ups"); end
    checks++; if (n_override == 0) begin failures++; $display("rewritten table word never used"); end
    checks++; if (n_pulse == 0)    begin failures++; $display("no PWM pulses"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
