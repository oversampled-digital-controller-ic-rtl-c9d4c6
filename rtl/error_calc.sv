// Error former: e[n] = V_ref - v_out[n], both in ADC steps.
//
// Combinational subtractor. The difference is saturated to the signed ERR_W
// range, so a large deviation (start-up, short circuit) reads as the largest
// error instead of wrapping. The subtraction V_ref - v_out follows the
// controller block diagram; the saturation and widths are this design's own.
module error_calc
  import ctrl_pkg::*;
#(
  parameter int unsigned AW = ctrl_pkg::ADC_W,
  parameter int unsigned EW = ctrl_pkg::ERR_W
) (
  input  logic [AW-1:0]        vref,
  input  logic [AW-1:0]        vout_code,
  output logic signed [EW-1:0] e
);
  localparam logic signed [AW:0] EMAX = (AW + 1)'(2 ** (EW - 1) - 1);
  localparam logic signed [AW:0] EMIN = -(AW + 1)'(2 ** (EW - 1));

  logic signed [AW:0] diff;
  assign diff = $signed({1'b0, vref}) - $signed({1'b0, vout_code});

  always_comb begin
    if (diff > EMAX)      e = EMAX[EW-1:0];
    else if (diff < EMIN) e = EMIN[EW-1:0];
    else                  e = diff[EW-1:0];
  end
endmodule
