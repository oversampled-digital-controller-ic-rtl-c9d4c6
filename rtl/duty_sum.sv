// Duty summing node: u = d[n] + dd[n].
//
// Adds the signed oversampled correction dd to the PID duty d and saturates
// the result to the PWM range 0 .. 2**DW-1. Combinational. The adder is the
// one of the controller block diagram; the saturation is this design's own.
module duty_sum
  import ctrl_pkg::*;
#(
  parameter int unsigned DW = ctrl_pkg::DPWM_W
) (
  input  logic [DW-1:0]        d,
  input  logic signed [DW:0]   dd,
  output logic [DW-1:0]        u
);
  logic signed [DW+1:0] s;
  assign s = $signed({2'b00, d}) + (DW + 2)'(dd);

  always_comb begin
    if (s < 0)                               u = '0;
    else if (s > $signed((DW + 2)'(2 ** DW - 1))) u = '1;
    else                                     u = s[DW-1:0];
  end
endmodule
