// Oversampled digital controller for a buck DC-DC converter (top level).
//
// The output voltage is sampled four times per switching period. The sample
// of the last quarter feeds a conventional PID compensator that sets the duty
// ratio d[n] once per period and keeps the converter regulated in steady
// state. All four samples feed the transient current estimator, which
// estimates the residual load change from the error slope and flags a
// transient while the deviation grows; the programmable differentiator turns
// that estimate into duty corrections dd for the three non-PID samples,
// inside programmable minimum/maximum thresholds. The summing node forms
// d + dd, and the oversampled DPWM glues each correction onto an existing
// pulse edge so that the switch never toggles faster than 2*f_sw.
//
// Clocking: one clock, clk = 2**DPWM_W * f_sw (128 MHz for 500 kHz). The ADC
// sampling (4*f_sw) and PID (f_sw) rates are clock enables derived from the
// ODPWM counter. Latency: an ADC result arrives CONV_CYCLES after its
// quarter starts; the estimator and differentiator add one clock each; the
// correction acts from the next quarter boundary, and d[n] from the next
// period.
//
// Configuration (static inputs, programmed from outside): vref (ADC steps),
// PID coefficients ka/kb/kc, non-linear path enable nl_en, transient error
// threshold e_th, differentiator gains c1/c2 and the positive and negative
// correction thresholds dd_min_p/dd_max_p, dd_min_n/dd_max_n.
// The ADC is a behavioural model, so `vout` is a real-valued input in volts;
// everything behind it is the synthesizable controller_core.
// The block structure and connections follow the controller's block diagram;
// the register-level interfaces between blocks are this design's own.
module oversampled_controller
  import ctrl_pkg::*;
#(
  parameter int unsigned N_DPWM      = ctrl_pkg::DPWM_W,
  parameter int unsigned AW          = ctrl_pkg::ADC_W,
  parameter int unsigned EW          = ctrl_pkg::ERR_W,
  parameter int unsigned KW          = ctrl_pkg::K_W,
  parameter int unsigned CW          = ctrl_pkg::C_W,
  parameter int unsigned CONV_CYCLES = 38
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  real                  vout,
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
  logic          sample;
  logic [AW-1:0] vout_code;
  logic          code_valid;

  adc_model #(.AW(AW), .CONV_CYCLES(CONV_CYCLES)) u_adc (
    .clk, .rst_n, .start(sample), .vin(vout), .code(vout_code), .valid(code_valid)
  );

  controller_core #(.N_DPWM(N_DPWM), .AW(AW), .EW(EW), .KW(KW), .CW(CW)) u_core (
    .clk, .rst_n, .vout_code, .code_valid,
    .vref, .ka, .kb, .kc, .nl_en, .e_th, .c1, .c2, .dd_min_p, .dd_max_p, .dd_min_n, .dd_max_n,
    .c, .period_start, .sample, .quarter, .cnt, .e, .e_valid, .d, .d_valid,
    .dd, .upd, .trans, .rej_small, .rej_large, .region, .evt
  );
endmodule
