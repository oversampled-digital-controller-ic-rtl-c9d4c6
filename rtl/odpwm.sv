// Oversampled digital pulse-width modulator (ODPWM) with glue logic.
//
// A free-running N_DPWM-bit counter divides the switching period T into
// 2**N_DPWM steps; its quarter boundaries give the 4*f_sw ADC sampling strobe
// and the quarter index used by the rest of the controller (the PID sample is
// the one taken in the last quarter). At the start of each period the duty
// command u (then equal to the PID duty d[n]) is latched and the main pulse
// [0, d*T) is scheduled. During the period the estimator path may deliver up
// to three signed corrections dd1..dd3 (computed from the samples of quarters
// 0..2); each arrives with `upd` while u = d + dd, is held, and is applied at
// the next quarter boundary t = k*T/4 (k = 1..3), which is the causal point at
// which the sample's result can act.
//
// Instead of emitting one extra pulse per correction (up to 4*f_sw switching),
// each correction is glued onto an edge that already exists:
//   * if a pulse is on at t, or ends exactly at t, its falling edge moves by dd
//     (shortened no earlier than t);
//   * otherwise a positive dd opens a pulse [t+T/4-dd, t+T/4) that ends at the
//     next boundary, where the following correction can extend it, so dd1 and
//     dd2 merge around T/2 and dd2 and dd3 merge around 3T/4; for k = 3 the
//     pulse [T-dd3, T) joins the rising edge of the next period's pulse;
//   * for d >= 0.75 a negative dd cuts a notch out of the long pulse the same
//     way (dd1|dd2 around T/2, widened by the next negative correction), and
//     positive corrections move the final falling edge.
// Corrections are limited to +-T/4, which keeps every scheduled edge at or
// after the boundary where it is decided. At most two pulses occur per
// period, so the switching rate stays at or below 2*f_sw.
//
// The four duty regions, the merging around T/2 and T, the merge into the
// falling edge when a pulse reaches past 3T/4, and the notches at high duty
// follow the published waveforms; the case 0.5 <= d < 0.75, the
// exact notch rules, the +-T/4 limit and the one-boundary latency are this
// design's own choices.
//
// Timing: `c` is registered (one counter clock behind the counter). `sample`
// is high for one clock at counts 0, T/4, T/2, 3T/4; `period_start` at count 0.
module odpwm
  import ctrl_pkg::*;
#(
  parameter int unsigned N_DPWM = ctrl_pkg::DPWM_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N_DPWM-1:0] u,
  input  logic              upd,
  output logic              c,
  output logic              sample,
  output logic              period_start,
  output logic [1:0]        quarter,
  output logic [N_DPWM-1:0] cnt,
  output duty_region_e      region,
  output glue_evt_t         evt
);
  localparam int T = 2 ** N_DPWM;
  localparam int Q = T / 4;
  localparam int EW = N_DPWM + 2;   // signed edge width, holds -T .. 2T-1

  typedef logic signed [EW-1:0] edge_t;

  logic [N_DPWM-1:0] d_q;
  edge_t f_q, xs_q, xe_q, ns_q, ne_q, p3_q;
  edge_t f_n, xs_n, xe_n, ns_n, ne_n, p3_n;
  edge_t pend_q, delta, t_b, mag;
  logic  pend_v_q;
  logic  boundary, wrap;
  int unsigned k;
  glue_evt_t evt_n;
  logic  c_n;

  assign wrap     = (cnt == N_DPWM'(T - 1));
  // last count of quarters 0..2: the next count is a boundary k*T/4, k = 1..3
  assign boundary = (cnt[N_DPWM-3:0] == '1) && (cnt[N_DPWM-1 -: 2] != 2'd3);
  assign k        = 32'(cnt[N_DPWM-1 -: 2]) + 1;
  assign t_b      = edge_t'(k * Q);
  assign quarter  = cnt[N_DPWM-1 -: 2];
  assign sample   = (cnt[N_DPWM-3:0] == '0);
  assign period_start = (cnt == '0);

  // held correction, limited to +-T/4
  always_comb begin
    if (!pend_v_q)              delta = '0;
    else if (pend_q >  edge_t'(Q)) delta = edge_t'(Q);
    else if (pend_q < -edge_t'(Q)) delta = -edge_t'(Q);
    else                        delta = pend_q;
    mag = (delta < 0) ? -delta : delta;
  end

  // next edge schedule
  always_comb begin
    f_n = f_q; xs_n = xs_q; xe_n = xe_q; ns_n = ns_q; ne_n = ne_q; p3_n = p3_q;
    evt_n = '0;
    if (wrap) begin
      f_n  = edge_t'({1'b0, u});
      xs_n = '0; xe_n = '0; ns_n = '0; ne_n = '0; p3_n = '0;
    end else if (boundary && delta != 0) begin
      if (region == REG_HIGH && delta < 0) begin
        if (ne_q > ns_q && ne_q >= t_b) begin
          ne_n = (ne_q + mag > edge_t'(T)) ? edge_t'(T) : ne_q + mag;
          evt_n.notch = 1'b1;
        end else if (k < 3) begin
          ns_n = t_b + edge_t'(Q) - mag;
          ne_n = t_b + edge_t'(Q);
          evt_n.notch = 1'b1;
        end else if (f_q >= t_b) begin
          f_n = (f_q - mag < t_b) ? t_b : f_q - mag;
          evt_n.edge_mod = 1'b1;
        end else begin
          evt_n.dropped = 1'b1;
        end
      end else if (f_q >= t_b &&
                   !(ne_q > ns_q && ns_q <= t_b && ne_q >= f_q)) begin
        // main pulse still on (not swallowed by a notch): move its falling edge
        f_n = f_q + delta;
        if (f_n < t_b) f_n = t_b;
        if (f_n > edge_t'(T)) f_n = edge_t'(T);
        evt_n.edge_mod = 1'b1;
      end else if (xe_q > xs_q && xe_q >= t_b) begin
        // extra pulse still on or ending here: move its falling edge
        xe_n = xe_q + delta;
        if (xe_n < t_b) xe_n = t_b;
        if (xe_n > edge_t'(T)) xe_n = edge_t'(T);
        evt_n.edge_mod = 1'b1;
      end else if (delta > 0) begin
        if (k < 3) begin
          xs_n = t_b + edge_t'(Q) - delta;
          xe_n = t_b + edge_t'(Q);
          evt_n.mid_pulse = 1'b1;
        end else begin
          p3_n = delta;
          evt_n.pre_pulse = 1'b1;
        end
      end else begin
        evt_n.dropped = 1'b1;
      end
    end
  end

  // output for the next count
  always_comb begin
    edge_t nxt;
    nxt = wrap ? '0 : edge_t'({2'b00, cnt}) + 1;
    c_n = ((nxt < f_n) && !(nxt >= ns_n && nxt < ne_n)) ||
          (nxt >= xs_n && nxt < xe_n) ||
          (p3_n != 0 && nxt >= edge_t'(T) - p3_n);
  end


  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; d_q <= '0; region <= REG_LOW;
      f_q <= '0; xs_q <= '0; xe_q <= '0; ns_q <= '0; ne_q <= '0; p3_q <= '0;
      pend_q <= '0; pend_v_q <= 1'b0; c <= 1'b0; evt <= '0;
    end else begin
      cnt  <= cnt + 1'b1;
      f_q  <= f_n; xs_q <= xs_n; xe_q <= xe_n;
      ns_q <= ns_n; ne_q <= ne_n; p3_q <= p3_n;
      c    <= c_n;
      evt  <= evt_n;
      if (wrap) begin
        d_q    <= u;
        region <= duty_region_e'(u[N_DPWM-1 -: 2]);
      end
      // hold a correction until the next boundary; drop it at the period end
      if (upd)
        pend_q <= edge_t'({2'b00, u}) - edge_t'({2'b00, d_q});
      if (upd)
        pend_v_q <= 1'b1;
      else if (boundary || wrap)
        pend_v_q <= 1'b0;
    end
  end

  // a correction may only be announced while the period's duty is latched
  // and never in the quarter that feeds the PID
  a_no_upd_q3: assert property (@(posedge clk) disable iff (!rst_n)
                                upd |-> quarter != 2'd3);
endmodule
