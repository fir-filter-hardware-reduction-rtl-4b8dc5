// Adaptive delta-modulation FIR filter (ADMF), complete: analog input x(t) in,
// filtered analog output y(t) out.
//
// This is the filter as a whole: the modulator's analog front end (feedback D/A
// and comparator), the digital core (modulator loop and serial FIR processor),
// the output D/A and the RC lossy integrator, wired in the order the design
// gives: x(t) -> modulator -> one-bit stream -> processor -> dy_n -> D/A ->
// integrator -> y(t). The three analog parts are behavioural models (real-valued,
// not synthesizable); admf_core is the synthesizable part and is what goes into
// silicon. This wrapper exists to simulate the filter end to end.
//
// Interface: x_in and y_out are voltages (real). The coefficient write port and
// the core's digital outputs are brought out unchanged; xhat_v and v_dac expose
// the two D/A outputs for observation.
//
// Timing: one sample every N clocks (sample_tick). The integrator is updated once
// per sample, on dy_valid, when the output D/A takes its new code.
//
// Follows the design: the block order, 64 taps, 8-bit coefficients, 12-bit
// accumulator, four step sizes, 8-bit output D/A, 30 Hz integrator, 16 kHz
// sampling and 1 V = 50 minimum steps. This design's own: the feedback code width,
// the D/A bit selection, VREF and the integrator's gain normalization.
module admf_system #(
  parameter int unsigned N         = admf_pkg::P_N,
  parameter int unsigned B         = admf_pkg::P_B,
  parameter int unsigned ACC_W     = admf_pkg::P_ACC_W,
  parameter int unsigned LMAX      = admf_pkg::P_LMAX,
  parameter int unsigned XHAT_W    = admf_pkg::P_XHAT_W,
  parameter int unsigned DAC_W     = admf_pkg::P_DAC_W,
  parameter int unsigned DAC_SHIFT = admf_pkg::P_DAC_SHIFT,
  parameter real         DELTA0    = 0.02,    // minimum step, volts
  parameter real         VREF      = 1.0,     // output D/A full scale, volts
  parameter real         FC_HZ     = 30.0,    // integrator cutoff
  parameter real         FS_HZ     = 16000.0, // sample rate
  localparam int unsigned AW       = (N < 2) ? 1 : $clog2(N)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  real                      x_in,
  output real                      y_out,
  input  logic                     coef_we,
  input  logic [AW-1:0]            coef_waddr,
  input  logic signed [B-1:0]      coef_wdata,
  output logic                     comp,
  output logic signed [XHAT_W-1:0] xhat_code,
  output real                      xhat_v,
  output logic                     c_out,
  output logic [admf_pkg::lvl_width(LMAX)-1:0] step_lvl,
  output logic                     sample_tick,
  output logic signed [ACC_W-1:0]  dy_out,
  output logic                     dy_valid,
  output logic [DAC_W-1:0]         dac_code,
  output real                      v_dac
);

  adm_analog_model #(.DELTA0(DELTA0), .XHAT_W(XHAT_W)) u_front (
    .x_in     (x_in),
    .xhat_code(xhat_code),
    .comp_out (comp),
    .xhat_v   (xhat_v)
  );

  admf_core #(
    .N(N), .B(B), .ACC_W(ACC_W), .LMAX(LMAX), .XHAT_W(XHAT_W), .DAC_W(DAC_W),
    .DAC_SHIFT(DAC_SHIFT)
  ) u_core (
    .clk        (clk),
    .rst_n      (rst_n),
    .comp_in    (comp),
    .xhat_code  (xhat_code),
    .c_out      (c_out),
    .step_lvl   (step_lvl),
    .sample_tick(sample_tick),
    .coef_we    (coef_we),
    .coef_waddr (coef_waddr),
    .coef_wdata (coef_wdata),
    .dy_out     (dy_out),
    .dy_valid   (dy_valid),
    .dac_code   (dac_code)
  );

  r2r_dac_model #(.DAC_W(DAC_W), .VREF(VREF)) u_dac (
    .code (dac_code),
    .v_out(v_dac)
  );

  rc_integrator_model #(.FC_HZ(FC_HZ), .FS_HZ(FS_HZ)) u_integ (
    .clk  (dy_valid),
    .v_in (v_dac),
    .v_out(y_out)
  );

endmodule
