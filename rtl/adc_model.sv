// Behavioural model of the controller's output-voltage ADC (not synthesizable
// logic: the real part is an analog/mixed-signal converter).
//
// On each `start` strobe (4 per switching period, 2 MHz) the analog input
// `vin` (volts) is sampled; CONV_CYCLES clock cycles later the result appears
// on `code` with a one-cycle `valid`. code = floor(vin / LSB_V), clipped to
// 0 .. 2**AW-1. The 4 mV step and 300 ns conversion time (38 cycles of the
// 128 MHz PWM clock) are the converter's specified figures; the code width
// and the ideal uniform quantiser are this model's assumptions. A new start
// during a conversion restarts it.
module adc_model
  import ctrl_pkg::*;
#(
  parameter int unsigned AW          = ctrl_pkg::ADC_W,
  parameter real         LSB_V       = 0.004,
  parameter int unsigned CONV_CYCLES = 38
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  real           vin,
  output logic [AW-1:0] code,
  output logic          valid
);
  localparam int CMAX = 2 ** AW - 1;

  logic [AW-1:0] held;
  int unsigned remaining;
  logic        busy;

  function automatic int quantise(real v);
    real q;
    q = v / LSB_V;
    if (q < 0.0) return 0;
    if (q > real'(CMAX)) return CMAX;
    return int'($floor(q));
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      held <= 0; remaining <= 0; busy <= 1'b0; code <= '0; valid <= 1'b0;
    end else begin
      valid <= 1'b0;
      if (start) begin
        held      <= AW'(quantise(vin));
        remaining <= CONV_CYCLES - 1;
        busy      <= 1'b1;
      end else if (busy) begin
        if (remaining == 0) begin
          busy  <= 1'b0;
          valid <= 1'b1;
          code  <= held;
        end else begin
          remaining <= remaining - 1;
        end
      end
    end
  end
endmodule
