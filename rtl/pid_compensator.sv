// Digital PID compensator, evaluated once per switching period.
//
// Velocity (incremental) form:
//   acc[n] = acc[n-1] + KA*e[n] + KB*e[n-1] + KC*e[n-2],   d[n] = acc[n] >> FRAC
// with KA = Kp+Ki+Kd, KB = -(Kp+2Kd), KC = Kd in signed fixed point with FRAC
// fractional bits. The accumulator keeps FRAC fraction bits below the DW-bit
// duty and saturates to [0, 2**DW) so it never winds up past the PWM range.
//
// Only error samples with pid_en set (every fourth sample, the one taken in
// the last quarter of the period) are used, so the compensator runs at f_sw as
// in a conventional once-per-cycle controller. The coefficients are inputs so
// they can be programmed from outside the chip. d changes one clock after an
// accepted sample (d_valid pulses then). The once-per-period rate and the
// external coefficients follow the controller's description; the velocity form,
// formats and saturation are this design's own.
module pid_compensator
  import ctrl_pkg::*;
#(
  parameter int unsigned EW   = ctrl_pkg::ERR_W,
  parameter int unsigned DW   = ctrl_pkg::DPWM_W,
  parameter int unsigned KW   = ctrl_pkg::K_W,
  parameter int unsigned FRAC = ctrl_pkg::K_FRAC
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [EW-1:0] e,
  input  logic                 e_valid,
  input  logic                 pid_en,
  input  logic signed [KW-1:0] ka,
  input  logic signed [KW-1:0] kb,
  input  logic signed [KW-1:0] kc,
  output logic [DW-1:0]        d,
  output logic                 d_valid
);
  localparam int unsigned AW = DW + FRAC;        // accumulator bits
  localparam int unsigned SW = KW + EW + AW + 2; // sum width, no overflow

  logic [AW-1:0]        acc;
  logic signed [EW-1:0] e1, e2;
  logic signed [SW-1:0] sum;

  assign sum = $signed({{(SW - AW){1'b0}}, acc})
             + SW'(ka * e) + SW'(kb * e1) + SW'(kc * e2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0; e1 <= '0; e2 <= '0; d_valid <= 1'b0;
    end else begin
      d_valid <= 1'b0;
      if (e_valid && pid_en) begin
        e1 <= e;
        e2 <= e1;
        d_valid <= 1'b1;
        if (sum < 0)                                acc <= '0;
        else if (sum > $signed(SW'(2 ** AW - 1)))   acc <= '1;
        else                                        acc <= sum[AW-1:0];
      end
    end
  end

  assign d = acc[AW-1 -: DW];
endmodule
