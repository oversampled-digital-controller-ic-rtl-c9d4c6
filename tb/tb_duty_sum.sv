// Self-checking test of duty_sum: every d (0..255) with every signed
// correction (-256..255), against u = clamp(d + dd, 0, 255).
module tb_duty_sum;
  import ctrl_pkg::*;
  logic [7:0]        d;
  logic signed [8:0] dd;
  logic [7:0]        u;
  int checks = 0, failures = 0;

  duty_sum dut (.d, .dd, .u);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a++)
      for (int b = -256; b < 256; b++) begin
        int s;
        d = 8'(a); dd = 9'(b);
        #1;
        s = a + b;
        if (s < 0) s = 0;
        if (s > 255) s = 255;
        checks++;
        if (int'(u) != s) begin
          failures++;
          if (failures < 10) $display("FAIL d=%0d dd=%0d u=%0d expected %0d", a, b, u, s);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
