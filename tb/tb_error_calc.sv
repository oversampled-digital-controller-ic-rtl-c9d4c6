// Self-checking test of error_calc: corner cases and random codes against
// e = clamp(vref - code, -128, 127) worked out with integers.
module tb_error_calc;
  import ctrl_pkg::*;
  logic [9:0]        vref, code;
  logic signed [7:0] e;
  int checks = 0, failures = 0;

  error_calc dut (.vref, .vout_code(code), .e);

  task automatic check(int r, int v);
    int exp_e;
    vref = 10'(r); code = 10'(v);
    #1;
    exp_e = r - v;
    if (exp_e > 127) exp_e = 127;
    if (exp_e < -128) exp_e = -128;
    checks++;
    if (int'(e) != exp_e) begin
      failures++;
      $display("FAIL vref=%0d code=%0d e=%0d expected %0d", r, v, e, exp_e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(450, 450); check(450, 449); check(450, 451);
    check(450, 323); check(450, 322); check(450, 0);
    check(450, 577); check(450, 578); check(0, 1023); check(1023, 0);
    for (int i = 0; i < 2000; i++) check(int'($urandom_range(1023)), int'($urandom_range(1023)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
