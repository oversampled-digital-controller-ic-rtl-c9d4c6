// Transient current estimator.
//
// Works on every error sample (4 per switching period). By capacitor charge
// balance the change of the output voltage between two samples is
// proportional to the capacitor current, i.e. to the part of the load current
// the inductor does not yet supply. The estimator therefore reports
//   di[n] = e[n] - e[n-1]      (ADC steps per sample period, signed)
// as the residual load-change estimate. Each new estimate already includes
// the effect of the corrections issued after the previous sample, which makes
// the estimation successive: as the inductor current catches up with the
// load, di goes to zero and the injection stops.
//
// trans is set for a sample when the non-linear path is enabled, |e| >= e_th
// and the deviation is still growing (di has the sign of e and is non-zero).
// It therefore drops as soon as the initial deviation has been stopped, after
// which the PID alone settles the output.
//
// Timing: di, trans and valid are registered, one clock after e_valid. The
// first sample after reset has no predecessor and gives di = 0, trans = 0.
// The difference form, the growth test and e_th are this design's choices.
module transient_current_estimator
  import ctrl_pkg::*;
#(
  parameter int unsigned EW = ctrl_pkg::ERR_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [EW-1:0] e,
  input  logic                 e_valid,
  input  logic                 nl_en,
  input  logic [EW-2:0]        e_th,
  output logic signed [EW:0]   di,
  output logic                 trans,
  output logic                 valid
);
  logic signed [EW-1:0] e_prev;
  logic                 have_prev;
  logic signed [EW:0]   di_n;
  logic [EW-1:0]        e_abs;
  logic                 growing;

  assign di_n    = (EW + 1)'(e) - (EW + 1)'(e_prev);
  assign e_abs   = e[EW-1] ? EW'(-e) : EW'(e);
  assign growing = (di_n != 0) && (di_n[EW] == e[EW-1]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_prev <= '0; have_prev <= 1'b0;
      di <= '0; trans <= 1'b0; valid <= 1'b0;
    end else begin
      valid <= e_valid;
      if (e_valid) begin
        e_prev    <= e;
        have_prev <= 1'b1;
        di        <= have_prev ? di_n : '0;
        trans     <= nl_en && have_prev && growing && (e_abs >= {1'b0, e_th});
      end
    end
  end
endmodule
