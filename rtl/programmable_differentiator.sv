// Programmable differentiator.
//
// Converts the load-change estimate di of the transient current estimator
// into a duty correction for the ODPWM:
//   |dd| = (|di| * c) >> CFRAC,  c = c1 for di > 0 (inductor current must rise),
//                                c = c2 for di < 0 (inductor current must fall),
// with the sign of di. c1 and c2 are programmed from the converter's
// inductor-current slopes by charge balance. A correction is only issued when
//   dd_min_p <= dd <= dd_max_p   (positive), or
//   dd_min_n <= -dd <= dd_max_n  (negative),
// where the minimum rejects output-voltage ripple and quantisation noise and
// the maximum rejects larger disturbances that a real load step cannot cause
// (including the first ESR step); all four are programmed, each side from its
// own inductor-current slope (de_max * c1 or de_max * c2). Corrections are only made while
// the estimator flags a transient and only for the samples of quarters 0..2;
// the last-quarter sample belongs to the PID. The result is limited so that
// d + dd stays inside the PWM range.
//
// Timing: one clock after in_valid, `upd` (the ODPWM's enable-update) pulses
// with dd valid; otherwise dd is held at zero so the summing node passes d.
// rej_small / rej_large pulse when a transient-time correction falls outside
// the thresholds. The gain selection by slope and the two thresholds follow
// the controller's description; the fixed-point formats, the discard (not
// clamp) above the maximum and the range limit are this design's own choices.
module programmable_differentiator
  import ctrl_pkg::*;
#(
  parameter int unsigned EW    = ctrl_pkg::ERR_W,
  parameter int unsigned DW    = ctrl_pkg::DPWM_W,
  parameter int unsigned CW    = ctrl_pkg::C_W,
  parameter int unsigned CFRAC = ctrl_pkg::C_FRAC
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [EW:0]   di,
  input  logic                 trans,
  input  logic                 in_valid,
  input  logic [1:0]           quarter,
  input  logic [DW-1:0]        d,
  input  logic [CW-1:0]        c1,
  input  logic [CW-1:0]        c2,
  input  logic [DW-1:0]        dd_min_p,
  input  logic [DW-1:0]        dd_max_p,
  input  logic [DW-1:0]        dd_min_n,
  input  logic [DW-1:0]        dd_max_n,
  output logic signed [DW:0]   dd,
  output logic                 upd,
  output logic                 rej_small,
  output logic                 rej_large
);
  localparam int unsigned PW = EW + 1 + CW;   // product width

  logic [EW:0]   di_abs;
  logic [PW-1:0] prod, mag;
  logic [DW-1:0] room;     // how far d may move in the correction's direction
  logic [DW-1:0] lim;
  logic          pos, active, too_small, too_large;

  assign pos    = !di[EW];
  assign di_abs = pos ? di : -di;
  assign prod   = PW'(di_abs) * PW'(pos ? c1 : c2);
  assign mag    = prod >> CFRAC;
  assign room   = pos ? ~d : d;
  assign lim    = (mag > PW'(room)) ? room : mag[DW-1:0];

  assign active = in_valid && trans && (quarter != 2'd3);
  assign too_small  = (mag < PW'(pos ? dd_min_p : dd_min_n)) || (mag == '0);
  assign too_large  = (mag > PW'(pos ? dd_max_p : dd_max_n));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dd <= '0; upd <= 1'b0; rej_small <= 1'b0; rej_large <= 1'b0;
    end else begin
      upd       <= 1'b0;
      dd        <= '0;
      rej_small <= active && too_small;
      rej_large <= active && !too_small && too_large;
      if (active && !too_small && !too_large && lim != '0) begin
        upd <= 1'b1;
        dd  <= pos ? $signed({1'b0, lim}) : -$signed({1'b0, lim});
      end
    end
  end
endmodule
