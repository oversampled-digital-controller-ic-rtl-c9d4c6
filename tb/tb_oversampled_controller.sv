// End-to-end test of the oversampled controller closing the loop around a
// behavioural 12 V -> 1.8 V buck power stage (L = 325 nH, C = 600 uF,
// 500 kHz), with every controller parameter at its default.
//
// Sequence:
//   1. PID only (non-linear path disabled): settle, 30 A light-to-heavy load
//      step, record the largest undershoot, step back.
//   2. Non-linear path enabled: settle, same 30 A step, record the
//      undershoot, then a heavy-to-light step; a single-sample noise spike
//      on the measured voltage must be rejected by the maximum threshold.
//      The four thresholds are computed from the power stage by the
//      worst-case ripple rule (see program_thresholds).
//   3. Low input voltage (high duty, d >= 0.75): load steps in both
//      directions so corrections are glued as notches.
// Checked throughout: at most two turn-on edges of c(t) per switching period
// (a rise at count 0 belongs to the period before), four ADC samples and one
// PID update per period, and every correction acting exactly at the quarter
// boundary after it was issued. Checked per phase: the output settles to
// 1.8 V, no correction is issued in steady state (ripple rejected by
// the minimum thresholds), the non-linear path reduces the undershoot and the settling time
// (to within 40 mV) of the 30 A step while adding only one or two extra
// switching actions, and
// each mechanism (transient flag, correction, each glue case, both
// threshold rejections, each duty region with a correction) happens.
module tb_oversampled_controller;
  import ctrl_pkg::*;
  logic clk = 0, rst_n = 0;
  real  vout_meas, vout_pwr, il, vin, iload, spike;
  logic binit;

  logic [9:0]         vref;
  logic signed [15:0] ka, kb, kc;
  logic               nl_en;
  logic [6:0]         e_th;
  logic [9:0]         c1, c2;
  logic [7:0]         dd_min_p, dd_max_p, dd_min_n, dd_max_n;
  logic               c, period_start, e_valid, d_valid, upd, trans, rej_small, rej_large;
  logic [1:0]         quarter;
  logic [7:0]         cnt, d;
  logic signed [7:0]  e;
  logic signed [8:0]  dd;
  duty_region_e       region;
  glue_evt_t          evt;

  int checks = 0, failures = 0;

  oversampled_controller dut (
    .clk, .rst_n, .vout(vout_meas), .vref, .ka, .kb, .kc, .nl_en, .e_th, .c1, .c2,
    .dd_min_p, .dd_max_p, .dd_min_n, .dd_max_n, .c, .period_start, .quarter, .cnt, .e, .e_valid, .d, .d_valid,
    .dd, .upd, .trans, .rej_small, .rej_large, .region, .evt
  );

  buck_model plant (.clk, .c, .vin, .iload, .init(binit), .v0(1.8), .vout(vout_pwr), .il);

  assign vout_meas = vout_pwr + spike;

  always #3.90625 clk = ~clk;   // 128 MHz

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ---------------- continuous monitors ----------------
  int n_trans = 0, n_upd = 0, n_small = 0, n_large = 0;
  int n_edge = 0, n_mid = 0, n_pre = 0, n_notch = 0, n_drop = 0;
  int n_region [4] = '{0, 0, 0, 0};
  int rises = 0, max_rises = 0, samples = 0, pid_upd = 0, periods = 0;
  int rate_bad = 0, late_bad = 0, n_applied = 0;
  logic last_c = 0;
  int pend_at = -1;   // quarter boundary at which a pending correction must act
  int steady_upd = 0;
  bit monitor_steady = 0;
  bit log_upd = 0;

  always @(negedge clk) if (rst_n) begin
    if (rej_small) n_small++;
    if (rej_large) n_large++;
    if (upd) begin
      n_upd++;
      n_region[region]++;
      if (monitor_steady) steady_upd++;
      if (log_upd) $display("  period %0d quarter %0d: e=%0d dd=%0d on d=%0d", periods, quarter, e, dd, d);
      pend_at = (int'(cnt) / 64 + 1) * 64;
    end
    if (evt.edge_mod)  n_edge++;
    if (evt.mid_pulse) n_mid++;
    if (evt.pre_pulse) n_pre++;
    if (evt.notch)     n_notch++;
    if (evt.dropped)   n_drop++;
    if (evt != '0) begin
      n_applied++;
      if (pend_at != int'(cnt)) late_bad++;
      pend_at = -1;
    end
    if (e_valid) samples++;
    if (d_valid) pid_upd++;
    // turn-on edges per period; a rise at count 0 belongs to the period before
    if (c && !last_c) rises++;
    if (cnt == 8'd0) begin
      if (rises > max_rises) max_rises = rises;
      if (rises > 2) rate_bad++;
      rises = 0;
      if (periods > 0 && (samples != 4 || pid_upd != 1)) rate_bad++;
      samples = 0; pid_upd = 0;
      periods++;
    end
    last_c = c;
  end

  always @(posedge clk) if (rst_n && trans && dut.u_core.est_valid) n_trans++;

  initial begin
    #30000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_periods(int n);
    repeat (n) begin
      @(negedge clk);
      while (cnt != 8'd0) @(negedge clk);
    end
  endtask

  // mean output over n periods
  task automatic mean_vout(int n, output real m);
    real s = 0.0;
    int  k = 0;
    for (int i = 0; i < n * 256; i++) begin
      @(negedge clk);
      s += vout_pwr;
      k++;
    end
    m = s / real'(k);
  endtask

  // extreme of the output over n periods (sign < 0: minimum, > 0: maximum)
  // and the settling time: last moment the output was more than 40 mV
  // (ten ADC steps) away from 1.8 V, in microseconds after the call
  real settle_us;
  int  extra_on;    // turn-ons beyond one per period during the window
  task automatic extreme_vout(int n, int sgn, output real x);
    logic lc;
    int   ons;
    x = 1.8;
    settle_us = 0.0;
    lc = c;
    ons = 0;
    for (int i = 0; i < n * 256; i++) begin
      @(negedge clk);
      if (c && !lc) ons++;
      lc = c;
      if (sgn < 0 && vout_pwr < x) x = vout_pwr;
      if (sgn > 0 && vout_pwr > x) x = vout_pwr;
      if (vout_pwr < 1.76 || vout_pwr > 1.84) settle_us = real'(i + 1) * 7.8125e-3;
    end
    extra_on = ons - n;
  endtask

  task automatic settle_and_check(string what);
    real m;
    wait_periods(900);
    monitor_steady = 1;
    mean_vout(100, m);
    monitor_steady = 0;
    $display("%s: mean vout %f V, d=%0d", what, m, d);
    chk(m > 1.77 && m < 1.83, {what, ": output regulated at 1.8 V"});
  endtask

  // Correction thresholds from the worst-case ripple. Over one sample period
  // Ts the output moves at most dv/dt = ESR*diL/dt + ic/C; in ADC steps, with
  // one step of quantisation error, de_max = dv/dt * Ts / 4 mV + 1, and the
  // threshold is de_max times the gain of that sign (c1 rising, c2 falling).
  // The minimum uses half the inductor ripple as capacitor current, the
  // maximum the largest load step (60 W / 1.8 V) plus the full ripple, with
  // a step of zero rise time.
  localparam real ESR_T = 0.2e-3, L_T = 325.0e-9, C_T = 600.0e-6, TS_T = 0.5e-6, VQ_T = 0.004;
  localparam real ISTEP_MAX = 60.0 / 1.8;

  function automatic int thr(real dvdt, int gain);
    real de_max, t;
    de_max = dvdt * TS_T / VQ_T + 1.0;
    t = $ceil(de_max * real'(gain) / 16.0);
    return t > 255.0 ? 255 : int'(t);
  endfunction

  task automatic program_thresholds(real vi);
    real vo, ripple, rise, fall;
    vo = 1.8;
    rise = (vi - vo) / L_T;
    fall = vo / L_T;
    ripple = rise * (vo / vi) * 2.0e-6;
    dd_min_p = 8'(thr(ESR_T * rise + 0.5 * ripple / C_T, int'(c1)));
    dd_min_n = 8'(thr(ESR_T * fall + 0.5 * ripple / C_T, int'(c2)));
    dd_max_p = 8'(thr(ESR_T * rise + (ISTEP_MAX + ripple) / C_T, int'(c1)));
    dd_max_n = 8'(thr(ESR_T * fall + (ISTEP_MAX + ripple) / C_T, int'(c2)));
    $display("thresholds at %0.1f V in: +dd %0d..%0d, -dd %0d..%0d", vi,
             dd_min_p, dd_max_p, dd_min_n, dd_max_n);
  endtask

  real vmin_pid, vmin_nl, vmax_nl, vmin_hi, vmax_hi, ts_pid, ts_nl;
  int  upd0;

  initial begin
    vin = 12.0; iload = 1.0; spike = 0.0; binit = 1;
    vref = 10'd450;                        // 1.8 V / 4 mV
    ka = 16'sd700; kb = -16'sd1180; kc = 16'sd500;
    nl_en = 0; e_th = 7'd4;
    c1 = 10'd160; c2 = 10'd400;           // 10.0 and 25.0 duty counts per step
    program_thresholds(12.0);
    repeat (4) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    binit = 0;

    // ---- 1: PID only ----
    settle_and_check("PID only, 1 A");
    chk(steady_upd == 0, "no correction while the non-linear path is off");
    iload = 31.0;
    extreme_vout(60, -1, vmin_pid);
    ts_pid = settle_us;
    chk(extra_on == 0, "PID only: one turn-on per period");
    $display("PID only: 30 A step undershoot %0.1f mV, settled to 40 mV in %0.1f us",
             (1.8 - vmin_pid) * 1000.0, ts_pid);
    chk(n_upd == 0 && n_trans == 0, "non-linear path disabled: no corrections");
    iload = 1.0;

    // ---- 2: non-linear path on ----
    nl_en = 1;
    steady_upd = 0;
    settle_and_check("oversampled, 1 A");
    chk(steady_upd == 0, "ripple does not trigger corrections at light load");
    upd0 = n_upd;
    iload = 31.0;
    log_upd = 1;
    extreme_vout(60, -1, vmin_nl);
    log_upd = 0;
    ts_nl = settle_us;
    $display("oversampled: 30 A step undershoot %0.1f mV, settled to 40 mV in %0.1f us, %0d corrections, %0d extra turn-ons",
             (1.8 - vmin_nl) * 1000.0, ts_nl, n_upd - upd0, extra_on);
    chk(extra_on >= 1 && extra_on <= 2, "30 A step: one or two additional switching actions");
    chk(ts_nl < ts_pid, "oversampling shortens the settling time");
    chk(n_upd > upd0, "corrections issued on the light-to-heavy step");
    chk((1.8 - vmin_nl) < (1.8 - vmin_pid), "oversampling reduces the undershoot");
    settle_and_check("oversampled, 31 A");
    chk(steady_upd == 0, "ripple does not trigger corrections at heavy load");
    iload = 1.0;
    extreme_vout(60, 1, vmax_nl);
    $display("oversampled: 30 A release overshoot %0.1f mV", (vmax_nl - 1.8) * 1000.0);
    settle_and_check("oversampled, back at 1 A");
    // single-sample spike on the measurement: rejected as noise
    begin
      int l0, u0;
      l0 = n_large; u0 = n_upd;
      @(negedge clk); while (cnt != 8'd60) @(negedge clk);
      spike = -0.12;
      @(negedge clk); while (cnt != 8'd70) @(negedge clk);
      spike = 0.0;
      wait_periods(2);
      chk(n_large > l0, "noise spike rejected by the maximum threshold");
      chk(n_upd == u0, "no correction from the noise spike");
    end

    // ---- 3: high duty ----
    vin = 2.3;
    program_thresholds(2.3);
    settle_and_check("high duty, 1 A");
    iload = 21.0;
    extreme_vout(60, -1, vmin_hi);
    settle_and_check("high duty, 21 A");
    iload = 1.0;
    extreme_vout(60, 1, vmax_hi);
    $display("high duty: 20 A step %0.1f mV, release %0.1f mV",
             (1.8 - vmin_hi) * 1000.0, (vmax_hi - 1.8) * 1000.0);
    wait_periods(100);

    $display("mechanisms: trans=%0d upd=%0d rej_small=%0d rej_large=%0d edge=%0d mid=%0d pre=%0d notch=%0d drop=%0d",
             n_trans, n_upd, n_small, n_large, n_edge, n_mid, n_pre, n_notch, n_drop);
    $display("corrections per duty region: %0d %0d %0d %0d; max turn-ons per period %0d; periods %0d",
             n_region[0], n_region[1], n_region[2], n_region[3], max_rises, periods);
    chk(rate_bad == 0, "<= 2 turn-ons, 4 samples and 1 PID update per period");
    chk(late_bad == 0, "each correction acts at the next quarter boundary");
    chk(n_applied > 0, "corrections applied");
    chk(n_trans > 0, "mechanism: transient flag");
    chk(n_upd > 0, "mechanism: correction issued");
    chk(n_small > 0, "mechanism: minimum-threshold rejection");
    chk(n_large > 0, "mechanism: maximum-threshold rejection");
    chk(n_edge > 0, "mechanism: falling-edge glue");
    chk(n_mid > 0, "mechanism: merged mid-period pulse");
    chk(n_pre > 0, "mechanism: pre-pulse at next rising edge");
    chk(n_notch > 0, "mechanism: notch at high duty");
    chk(n_region[0] > 0, "mechanism: correction with d < 0.25");
    chk(n_region[3] > 0, "mechanism: correction with d >= 0.75");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
