// Self-checking test of the ODPWM.
//
// Directed periods reproduce each duty region of the glue scheme; the
// expected high intervals of c(t) were worked out by hand from the rules
// (T = 256 counts, corrections announced in quarters 0..2 act from the next
// quarter boundary 64, 128, 192):
//   d<0.25:        dd1|dd2 merged around T/2, dd3 before the next rising edge,
//                  or dd3 on the merged pulse's falling edge past 3T/4
//   0.25<=d<0.75:  dd1 (and dd2, dd3 while the pulse is on) on the falling
//                  edge, otherwise dd2|dd3 merged around 3T/4 or dd3 before T
//   d>=0.75:       negative dd1|dd2 cut a notch around T/2, positive ones
//                  move the falling edge, dd3 before T once the pulse is gone
// Random periods then check two properties that do not depend on the glue
// rules: c(t) rises at most twice per period (switching <= 2*f_sw; a rise at
// count 0 is charged to the period before, whose pre-pulse it may continue), and with
// positive corrections that fit in the period the on-time equals
// d + dd1 + dd2 + dd3 counts. The sampling strobe rate (4 per period) is
// checked as well.
module tb_odpwm;
  import ctrl_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0]   u;
  logic         upd;
  logic         c, sample, period_start;
  logic [1:0]   quarter;
  logic [7:0]   cnt;
  duty_region_e region;
  glue_evt_t    evt;
  int checks = 0, failures = 0;
  int n_edge = 0, n_mid = 0, n_pre = 0, n_notch = 0, n_drop = 0;
  logic got [256];
  logic last_c = 0;
  int   rises, ontime, samples;

  odpwm dut (.clk, .rst_n, .u, .upd, .c, .sample, .period_start, .quarter, .cnt, .region, .evt);

  always #4 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (evt.edge_mod)  n_edge++;
    if (evt.mid_pulse) n_mid++;
    if (evt.pre_pulse) n_pre++;
    if (evt.notch)     n_notch++;
    if (evt.dropped)   n_drop++;
  end

  // Runs one period with duty dd and corrections c1..c3; records c(t).
  task automatic run_period(int dv, int a1, int a2, int a3);
    do @(negedge clk); while (cnt != 8'd255);
    u = 8'(dv); upd = 0;
    rises = 0; ontime = 0; samples = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      got[cnt] = c;
      if (c && !last_c && cnt != 8'd0) rises++;
      if (c) ontime++;
      if (sample) samples++;
      last_c = c;
      upd = 0; u = 8'(dv);
      if (cnt == 8'd40  && a1 != 0) begin upd = 1; u = 8'(dv + a1); end
      if (cnt == 8'd104 && a2 != 0) begin upd = 1; u = 8'(dv + a2); end
      if (cnt == 8'd168 && a3 != 0) begin upd = 1; u = 8'(dv + a3); end
    end
    upd = 0; u = 8'(dv);
    // the next period's pulse starts a new switching action unless the
    // pre-pulse of this period runs into it
    if (!got[255] && dv > 0) rises++;
  endtask

  task automatic expect_wave(string name, int s0, int e0, int s1, int e1, int s2, int e2);
    int bad = 0;
    for (int p = 0; p < 256; p++) begin
      logic exp_c;
      exp_c = (p >= s0 && p < e0) || (p >= s1 && p < e1) || (p >= s2 && p < e2);
      if (got[p] != exp_c) begin
        if (bad < 4) $display("FAIL %s: c(%0d)=%0d expected %0d", name, p, got[p], exp_c);
        bad++;
      end
    end
    checks++;
    if (bad != 0) failures++;
    checks++;
    if (samples != 4) begin failures++; $display("FAIL %s: %0d samples", name, samples); end
  endtask

  initial begin
    u = 0; upd = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // d < 0.25
    run_period(30, 20, 10, 15);   expect_wave("low merge", 0, 30, 108, 138, 241, 256);
    run_period(30, 40, 64, 10);   expect_wave("low past 3T/4", 0, 30, 88, 202, 0, 0);
    run_period(30, -10, 10, 0);   expect_wave("low negative dropped", 0, 30, 182, 192, 0, 0);
    // 0.25 <= d < 0.5
    run_period(100, 10, 20, 15);  expect_wave("midlo 3T/4 merge", 0, 110, 172, 207, 0, 0);
    run_period(100, -10, 0, 0);   expect_wave("midlo shorten", 0, 90, 0, 0, 0, 0);
    run_period(100, 40, -10, 15); expect_wave("midlo edge+pre", 0, 130, 241, 256, 0, 0);
    run_period(120, 60, 30, -10); expect_wave("midlo all on edge", 0, 200, 0, 0, 0, 0);
    // 0.5 <= d < 0.75
    run_period(150, 5, -5, 10);   expect_wave("midhi", 0, 150, 246, 256, 0, 0);
    // d >= 0.75
    run_period(230, -20, -10, 15); expect_wave("high notch", 0, 108, 138, 245, 0, 0);
    run_period(200, -30, -64, -10); expect_wave("high notch swallows", 0, 98, 0, 0, 0, 0);
    run_period(192, -30, -64, 12); expect_wave("high notch + pre", 0, 98, 244, 256, 0, 0);
    run_period(240, 0, 0, 0);     expect_wave("plain", 0, 240, 0, 0, 0, 0);
    // random: switching rate and charge
    for (int i = 0; i < 300; i++) begin
      int dv, a1, a2, a3;
      bit pos;
      pos = 1'($urandom_range(1));
      dv = int'($urandom_range(255));
      if (pos) begin
        a1 = int'($urandom_range(64)); a2 = int'($urandom_range(64)); a3 = int'($urandom_range(64));
        if (dv + a1 + a2 + a3 > 255) dv = 255 - a1 - a2 - a3;
        if (dv < 0) dv = 0;
        if (dv + a1 + a2 + a3 > 255) a3 = 0;
        if (dv + a1 + a2 + a3 > 255) a2 = 0;
      end else begin
        a1 = int'($urandom_range(128)) - 64; a2 = int'($urandom_range(128)) - 64;
        a3 = int'($urandom_range(128)) - 64;
        if (dv + a1 < 0) a1 = -dv;  if (dv + a1 > 255) a1 = 255 - dv;
        if (dv + a2 < 0) a2 = -dv;  if (dv + a2 > 255) a2 = 255 - dv;
        if (dv + a3 < 0) a3 = -dv;  if (dv + a3 > 255) a3 = 255 - dv;
      end
      run_period(dv, a1, a2, a3);
      checks++;
      if (rises > 2) begin
        failures++;
        $display("FAIL %0d rising edges in a period d=%0d dd=%0d,%0d,%0d", rises, dv, a1, a2, a3);
      end
      if (pos) begin
        checks++;
        if (ontime != dv + a1 + a2 + a3) begin
          failures++;
          $display("FAIL on-time %0d expected %0d (d=%0d dd=%0d,%0d,%0d)", ontime, dv + a1 + a2 + a3, dv, a1, a2, a3);
        end
      end
    end
    checks++;
    if (n_edge == 0 || n_mid == 0 || n_pre == 0 || n_notch == 0 || n_drop == 0) begin
      failures++;
      $display("FAIL coverage edge=%0d mid=%0d pre=%0d notch=%0d drop=%0d", n_edge, n_mid, n_pre, n_notch, n_drop);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
