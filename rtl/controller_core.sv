// Digital core of the oversampled buck controller: everything behind the ADC.
//
// Takes the ADC code of the output voltage (code_valid pulses once per
// conversion, four conversions per switching period, started by `sample`)
// and produces the switch control c(t). Inside: error former (vref - code),
// PID compensator on the last-quarter sample (once per period), transient
// current estimator and programmable differentiator on every sample, the
// d + dd summing node, and the oversampled DPWM with its glue logic, which
// also generates the sampling strobes. One clock, 2**N_DPWM * f_sw.
// Corrections computed from a quarter's sample act from the next quarter
// boundary; the PID duty from the next period. code_valid must arrive in the
// same quarter as its `sample` strobe.
//
// The blocks and their connections follow the controller's block diagram;
// the interfaces between them are this design's own.
module controller_core
  import ctrl_pkg::*;
#(
  parameter int unsigned N_DPWM      = ctrl_pkg::DPWM_W,
  parameter int unsigned AW          = ctrl_pkg::ADC_W,
  parameter int unsigned EW          = ctrl_pkg::ERR_W,
  parameter int unsigned KW          = ctrl_pkg::K_W,
  parameter int unsigned CW          = ctrl_pkg::C_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [AW-1:0]        vout_code,
  input  logic                 code_valid,
  // configuration
  input  logic [AW-1:0]        vref,
  input  logic signed [KW-1:0] ka,
  input  logic signed [KW-1:0] kb,
  input  logic signed [KW-1:0] kc,
  input  logic                 nl_en,
  input  logic [EW-2:0]        e_th,
  input  logic [CW-1:0]        c1,
  input  logic [CW-1:0]        c2,
  input  logic [N_DPWM-1:0]    dd_min_p,
  input  logic [N_DPWM-1:0]    dd_max_p,
  input  logic [N_DPWM-1:0]    dd_min_n,
  input  logic [N_DPWM-1:0]    dd_max_n,
  // switch control
  output logic                 c,
  // observation
  output logic                 period_start,
  output logic                 sample,
  output logic [1:0]           quarter,
  output logic [N_DPWM-1:0]    cnt,
  output logic signed [EW-1:0] e,
  output logic                 e_valid,
  output logic [N_DPWM-1:0]    d,
  output logic                 d_valid,
  output logic signed [N_DPWM:0] dd,
  output logic                 upd,
  output logic                 trans,
  output logic                 rej_small,
  output logic                 rej_large,
  output duty_region_e         region,
  output glue_evt_t            evt
);
  logic signed [EW:0] di;
  logic              est_valid;
  logic [N_DPWM-1:0] u;

  assign e_valid = code_valid;

  error_calc #(.AW(AW), .EW(EW)) u_err (
    .vref, .vout_code, .e
  );

  pid_compensator #(.EW(EW), .DW(N_DPWM), .KW(KW)) u_pid (
    .clk, .rst_n, .e, .e_valid, .pid_en(quarter == 2'd3),
    .ka, .kb, .kc, .d, .d_valid
  );

  transient_current_estimator #(.EW(EW)) u_est (
    .clk, .rst_n, .e, .e_valid, .nl_en, .e_th,
    .di, .trans, .valid(est_valid)
  );

  programmable_differentiator #(.EW(EW), .DW(N_DPWM), .CW(CW)) u_diff (
    .clk, .rst_n, .di, .trans, .in_valid(est_valid), .quarter, .d,
    .c1, .c2, .dd_min_p, .dd_max_p, .dd_min_n, .dd_max_n, .dd, .upd, .rej_small, .rej_large
  );

  duty_sum #(.DW(N_DPWM)) u_sum (
    .d, .dd, .u
  );

  odpwm #(.N_DPWM(N_DPWM)) u_pwm (
    .clk, .rst_n, .u, .upd, .c, .sample, .period_start, .quarter, .cnt,
    .region, .evt
  );
endmodule
