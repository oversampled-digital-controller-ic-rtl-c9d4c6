// Self-checking test of transient_current_estimator: directed load-step
// shapes and random errors against di = e[n] - e[n-1] and
// trans = nl_en & |e| >= e_th & di != 0 & sign(di) == sign(e).
module tb_transient_current_estimator;
  import ctrl_pkg::*;
  logic clk = 0, rst_n = 0;
  logic signed [7:0] e;
  logic              e_valid, nl_en;
  logic [6:0]        e_th;
  logic signed [8:0] di;
  logic              trans, valid;
  int checks = 0, failures = 0, n_trans = 0;
  int prev = 0;
  bit have_prev = 0;

  transient_current_estimator dut (.clk, .rst_n, .e, .e_valid, .nl_en, .e_th, .di, .trans, .valid);

  always #4 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic feed(int ev);
    int exp_di, ea;
    bit exp_tr;
    @(negedge clk);
    e = 8'(ev); e_valid = 1;
    @(negedge clk);
    e_valid = 0;
    exp_di = have_prev ? ev - prev : 0;
    ea = ev < 0 ? -ev : ev;
    exp_tr = nl_en && have_prev && exp_di != 0 && ((exp_di > 0) == (ev >= 0)) && ea >= int'(e_th);
    checks++;
    if (!valid || int'(di) != exp_di || trans != exp_tr) begin
      failures++;
      $display("FAIL e=%0d di=%0d/%0d trans=%0d/%0d valid=%0d", ev, di, exp_di, trans, exp_tr, valid);
    end
    if (trans) n_trans++;
    prev = ev; have_prev = 1;
    repeat (2) @(negedge clk);
    checks++;
    if (valid) begin failures++; $display("FAIL valid not one clock"); end
  endtask

  initial begin
    e = 0; e_valid = 0; nl_en = 1; e_th = 7'd3;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // steady state with ripple of +-1 step: never a transient (|e| < 3)
    for (int i = 0; i < 12; i++) feed((i % 2 == 0) ? 1 : -1);
    checks++;
    if (n_trans != 0) begin failures++; $display("FAIL ripple triggered"); end
    // light-to-heavy step: error grows then stops and recovers
    feed(0); feed(4); feed(9); feed(13); feed(15); feed(15); feed(12); feed(6); feed(1);
    // heavy-to-light step: negative error
    feed(-5); feed(-11); feed(-14); feed(-13); feed(-8); feed(-2);
    // non-linear path disabled
    nl_en = 0;
    feed(0); feed(10); feed(20);
    nl_en = 1;
    for (int i = 0; i < 500; i++) begin
      e_th = 7'($urandom_range(10));
      feed(int'($urandom_range(255)) - 128);
    end
    checks++;
    if (n_trans == 0) begin failures++; $display("FAIL no transient seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
