// Behavioural model of a synchronous buck power stage, for simulation only.
//
// State: inductor current il and capacitor voltage vc, integrated with the
// forward Euler method once per clock (step DT seconds):
//   L dil/dt = vin*c - vout - R*il,   C dvc/dt = il - iload,
//   vout = vc + ESR*(il - iload).
// c = 1 connects the switch node to vin (high-side switch on), c = 0 to
// ground (low-side switch on); the current may reverse. Defaults: 12 V input,
// L = 325 nH, C = 600 uF, 500 kHz switching with a 128 MHz controller clock;
// the ESR and series resistance are chosen values. The model starts at rest
// (vc = 0, il = 0) unless init is pulsed, which loads vc = v0 and il = iload.
module buck_model #(
  parameter real DT  = 7.8125e-9,
  parameter real L   = 325.0e-9,
  parameter real C   = 600.0e-6,
  parameter real ESR = 0.2e-3,
  parameter real R   = 5.0e-3
) (
  input  logic clk,
  input  logic c,
  input  real  vin,
  input  real  iload,
  input  logic init,
  input  real  v0,
  output real  vout,
  output real  il
);
  real vc;

  initial begin
    vc = 0.0;
    il = 0.0;
  end

  always @(posedge clk) begin
    real vsw, dil, dvc;
    vsw = c ? vin : 0.0;
    dil = (vsw - vout - R * il) / L * DT;
    dvc = (il - iload) / C * DT;
    if (init) begin
      vc <= v0;
      il <= iload;
    end else begin
      il <= il + dil;
      vc <= vc + dvc;
    end
  end

  assign vout = vc + ESR * (il - iload);
endmodule
