// Self-checking test of pid_compensator. A sequence of error samples is fed,
// only every fourth marked as the PID sample; an integer model of
//   acc += KA*e[n] + KB*e[n-1] + KC*e[n-2], acc saturated to [0, 2^16)
// gives the expected duty acc >> 8 after each PID sample. Checks that
// non-PID samples leave d unchanged, that d_valid comes one clock after an
// accepted sample, and that both saturation limits work.
module tb_pid_compensator;
  import ctrl_pkg::*;
  logic clk = 0, rst_n = 0;
  logic signed [7:0]  e;
  logic               e_valid, pid_en;
  logic signed [15:0] ka, kb, kc;
  logic [7:0]         d;
  logic               d_valid;
  int checks = 0, failures = 0;
  int acc_m = 0, e1_m = 0, e2_m = 0;

  pid_compensator dut (.clk, .rst_n, .e, .e_valid, .pid_en, .ka, .kb, .kc, .d, .d_valid);

  always #4 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (d=%0d model=%0d)", what, d, acc_m >>> 8);
    end
  endtask

  // one sample; pid marks the PID sample
  task automatic feed(int ev, bit pid);
    logic [7:0] d_before;
    @(negedge clk);
    d_before = d;
    e = 8'(ev); e_valid = 1; pid_en = pid;
    @(negedge clk);
    e_valid = 0; pid_en = 0;
    if (pid) begin
      int s;
      s = acc_m + int'(ka) * ev + int'(kb) * e1_m + int'(kc) * e2_m;
      if (s < 0) s = 0;
      if (s > 65535) s = 65535;
      acc_m = s; e2_m = e1_m; e1_m = ev;
      chk(d_valid == 1'b1, "d_valid one clock after PID sample");
      chk(int'(d) == (acc_m >>> 8), "duty after PID sample");
    end else begin
      chk(d_valid == 1'b0, "no d_valid for non-PID sample");
      chk(d == d_before, "non-PID sample ignored");
    end
    repeat (3) @(negedge clk);
    chk(d_valid == 1'b0, "d_valid is one clock long");
  endtask

  initial begin
    e = 0; e_valid = 0; pid_en = 0;
    ka = 16'sd1800; kb = -16'sd3000; kc = 16'sd1250;   // 7.03, -11.72, 4.88
    repeat (3) @(negedge clk);
    rst_n = 1;
    chk(d == 0, "reset duty");
    // constant error: integral action ramps the duty
    for (int i = 0; i < 40; i++) feed(5, (i % 4) == 3);
    // step error in both directions
    for (int i = 0; i < 40; i++) feed(-12, (i % 4) == 3);
    for (int i = 0; i < 400; i++) feed(int'($urandom_range(60)) - 30, (i % 4) == 3);
    // drive into the upper then the lower limit
    ka = 16'sd20000; kb = 16'sd0; kc = 16'sd0;
    for (int i = 0; i < 16; i++) feed(100, 1);
    chk(d == 8'd255, "upper saturation");
    for (int i = 0; i < 16; i++) feed(-100, 1);
    chk(d == 8'd0, "lower saturation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
