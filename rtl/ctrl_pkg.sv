// Shared widths and constants of the oversampled DC-DC controller.
//
// The PWM resolution (8 bits) and the four samples per switching period
// follow the controller's specification; the ADC code width, error width and
// coefficient formats are this implementation's choices, sized for a 1.8 V
// output measured with a 4 mV ADC step.
package ctrl_pkg;
  // PWM counter resolution: one switching period is 2**DPWM_W counter clocks.
  parameter int unsigned DPWM_W = 8;   // four ADC samples per period, one per quarter
  // ADC output code width (4 mV step -> 0 .. 4.092 V).
  parameter int unsigned ADC_W = 10;
  // Signed error width, in ADC steps (+-127 steps = +-508 mV).
  parameter int unsigned ERR_W = 8;
  // PID coefficient width and number of fractional bits.
  parameter int unsigned K_W = 16;
  parameter int unsigned K_FRAC = 8;
  // Differentiator gain width and number of fractional bits.
  parameter int unsigned C_W = 10;
  parameter int unsigned C_FRAC = 4;

  // Quarter of the switching period in which a sample was taken; the PID
  // sample is the one taken in the last quarter.
  typedef enum logic [1:0] {Q0 = 2'd0, Q1 = 2'd1, Q2 = 2'd2, Q3 = 2'd3} quarter_e;

  // Duty-ratio region of the ODPWM, selected by the two top duty bits.
  typedef enum logic [1:0] {
    REG_LOW   = 2'd0,   // d < 0.25
    REG_MIDLO = 2'd1,   // 0.25 <= d < 0.5
    REG_MIDHI = 2'd2,   // 0.5  <= d < 0.75
    REG_HIGH  = 2'd3    // 0.75 <= d
  } duty_region_e;

  // One-cycle indications of what the ODPWM did with an oversampled
  // correction at a quarter boundary.
  typedef struct packed {
    logic edge_mod;   // moved the falling edge of a pulse that is still on
    logic mid_pulse;  // opened a new pulse ending at the next quarter boundary
    logic pre_pulse;  // placed a pulse ending at the next period's rising edge
    logic notch;      // cut or widened a notch out of a high-duty pulse
    logic dropped;    // negative correction while the output was already off
  } glue_evt_t;
endpackage
