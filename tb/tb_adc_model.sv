// Self-checking test of the ADC behavioural model: codes for voltages around
// 1.8 V and at both ends of the range (4 mV step, floor), and the conversion
// latency of CONV_CYCLES clocks from the start strobe to valid.
module tb_adc_model;
  import ctrl_pkg::*;
  logic clk = 0, rst_n = 0;
  logic       start;
  real        vin;
  logic [9:0] code;
  logic       valid;
  int checks = 0, failures = 0;

  adc_model dut (.clk, .rst_n, .start, .vin, .code, .valid);

  always #4 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic convert(real v, int exp_code);
    int lat;
    @(negedge clk);
    vin = v; start = 1;
    @(negedge clk);
    start = 0;
    vin = 0.0;          // the held sample must not follow the input
    lat = 0;          // clock edges after the one that took the start strobe
    while (!valid && lat < 200) begin
      @(negedge clk);
      lat++;
    end
    checks++;
    if (lat != 38 || int'(code) != exp_code) begin
      failures++;
      $display("FAIL v=%f code=%0d expected %0d latency=%0d expected 38", v, code, exp_code, lat);
    end
  endtask

  initial begin
    start = 0; vin = 0.0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    convert(1.8002, 450);
    convert(1.7999, 449);
    convert(1.7100, 427);
    convert(0.0021, 0);
    convert(-0.5, 0);
    convert(4.5, 1023);
    for (int i = 0; i < 50; i++) begin
      int k;
      k = int'($urandom_range(1023));
      convert(real'(k) * 0.004 + 0.002, k);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
