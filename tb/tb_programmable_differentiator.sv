// Self-checking test of programmable_differentiator. Random estimates, gains,
// thresholds, duties and quarters are compared with an integer model:
//   m = (|di| * (di > 0 ? c1 : c2)) >> 4
//   issue iff trans, quarter != 3, m != 0, min <= m <= max with the
//   thresholds of the correction's sign (dd_min_p/dd_max_p or
//   dd_min_n/dd_max_n), and the
//   correction limited to the PWM range is non-zero; dd = +-min(m, room).
// Directed cases cover each gain, both thresholds and the range limit.
module tb_programmable_differentiator;
  import ctrl_pkg::*;
  logic clk = 0, rst_n = 0;
  logic signed [8:0] di;
  logic              trans, in_valid;
  logic [1:0]        quarter;
  logic [7:0]        d;
  logic [9:0]        c1, c2;
  logic [7:0]        dd_min_p, dd_max_p, dd_min_n, dd_max_n;
  logic signed [8:0] dd;
  logic              upd, rej_small, rej_large;
  int checks = 0, failures = 0;
  int n_upd = 0, n_small = 0, n_large = 0, n_lim = 0;

  programmable_differentiator dut (.clk, .rst_n, .di, .trans, .in_valid, .quarter, .d,
                                   .c1, .c2, .dd_min_p, .dd_max_p, .dd_min_n, .dd_max_n, .dd, .upd, .rej_small, .rej_large);

  always #4 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(int vdi, bit vtr, int vq, int vd, int vc1, int vc2, int vmin, int vmax,
                      int vminn = -1, int vmaxn = -1);
    int m, room, lim, exp_dd, tmin, tmax;
    bit exp_upd, exp_small, exp_large, act;
    @(negedge clk);
    di = 9'(vdi); trans = vtr; in_valid = 1; quarter = 2'(vq); d = 8'(vd);
    if (vminn < 0) vminn = vmin;
    if (vmaxn < 0) vmaxn = vmax;
    c1 = 10'(vc1); c2 = 10'(vc2);
    dd_min_p = 8'(vmin); dd_max_p = 8'(vmax); dd_min_n = 8'(vminn); dd_max_n = 8'(vmaxn);
    @(negedge clk);
    in_valid = 0;
    m = ((vdi < 0 ? -vdi : vdi) * (vdi > 0 ? vc1 : vc2)) >> 4;
    room = vdi >= 0 ? 255 - vd : vd;
    lim = m > room ? room : m;
    act = vtr && vq != 3;
    tmin = vdi >= 0 ? vmin : vminn;
    tmax = vdi >= 0 ? vmax : vmaxn;
    exp_small = act && (m == 0 || m < tmin);
    exp_large = act && !exp_small && m > tmax;
    exp_upd = act && !exp_small && !exp_large && lim != 0;
    exp_dd = exp_upd ? (vdi >= 0 ? lim : -lim) : 0;
    checks++;
    if (upd != exp_upd || int'(dd) != exp_dd || rej_small != exp_small || rej_large != exp_large) begin
      failures++;
      $display("FAIL di=%0d tr=%0d q=%0d d=%0d c=%0d/%0d thr=%0d..%0d: upd=%0d/%0d dd=%0d/%0d rs=%0d/%0d rl=%0d/%0d",
               vdi, vtr, vq, vd, vc1, vc2, vmin, vmax, upd, exp_upd, dd, exp_dd,
               rej_small, exp_small, rej_large, exp_large);
    end
    if (upd) n_upd++;
    if (rej_small) n_small++;
    if (rej_large) n_large++;
    if (exp_upd && lim != m) n_lim++;
    @(negedge clk);
    checks++;
    if (upd || dd != 0) begin failures++; $display("FAIL upd/dd not cleared"); end
  endtask

  initial begin
    di = 0; trans = 0; in_valid = 0; quarter = 0; d = 0; c1 = 0; c2 = 0;
    dd_min_p = 0; dd_max_p = 0; dd_min_n = 0; dd_max_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // c1 = 3.0 for rising current, c2 = 1.5 for falling
    step(  5, 1, 0, 40, 48, 24, 4, 64);   // +15
    step( -5, 1, 1, 40, 48, 24, 4, 64);   // -7
    step(  1, 1, 2, 40, 48, 24, 4, 64);   // 3 < 4: ripple, rejected
    step( 30, 1, 0, 40, 48, 24, 4, 64);   // 90 > 64: noise, rejected
    step(  5, 1, 3, 40, 48, 24, 4, 64);   // PID quarter: nothing
    step(  5, 0, 1, 40, 48, 24, 4, 64);   // no transient: nothing
    step( 20, 1, 1, 250, 48, 24, 4, 64);  // limited to 255 - 250
    step(-20, 1, 1, 10, 48, 24, 4, 64);   // limited to 10
    step(-20, 1, 1, 0, 48, 24, 4, 64);    // nothing left to subtract
    // separate thresholds for each sign
    step(  3, 1, 0, 100, 48, 48, 10, 64, 5, 20);   // +9 < 10: rejected
    step( -3, 1, 0, 100, 48, 48, 10, 64, 5, 20);   // -9: 5 <= 9 <= 20, issued
    step(  8, 1, 1, 100, 48, 48, 10, 64, 5, 20);   // +24 issued
    step( -8, 1, 1, 100, 48, 48, 10, 64, 5, 20);   // -24 > 20: rejected
    step( 20, 1, 2, 100, 48, 200, 10, 64, 5, 255); // +60 issued
    step(-20, 1, 2, 100, 48, 200, 10, 64, 5, 255); // -250 limited to -100
    for (int i = 0; i < 3000; i++)
      step(int'($urandom_range(120)) - 60, 1'($urandom_range(1)), int'($urandom_range(3)),
           int'($urandom_range(255)), int'($urandom_range(600)), int'($urandom_range(600)),
           int'($urandom_range(20)), int'($urandom_range(255)),
           int'($urandom_range(20)), int'($urandom_range(255)));
    checks++;
    if (n_upd == 0 || n_small == 0 || n_large == 0 || n_lim == 0) begin
      failures++;
      $display("FAIL coverage upd=%0d small=%0d large=%0d limited=%0d", n_upd, n_small, n_large, n_lim);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
