// Adaptive delta-modulation FIR filter (ADMF), digital core.
//
// An N-tap FIR filter whose input is a one-bit adaptive delta-modulation stream
// instead of PCM words. Because the FIR output can be written as a running sum of
// coefficient-weighted input differences, and the modulator's differences are
// signed powers of two, each tap costs one shift, one sign change and one
// addition, and each stored input sample costs one bit. The filter produces the
// output difference dy_n every sample; an external D/A converter and an analog
// lossy integrator (long RC time constant) turn the dy_n stream back into y(t).
//
// Blocks: adm (the modulator's digital loop: decision delays, step size logic,
// integrator) and admf_processor (serial processor with its timing counter, the
// N-bit sample store, the coefficient memory and the shift-add accumulator). The
// analog comparator and feedback D/A of the modulator, the output D/A and the RC
// integrator are outside: comp_in comes from the comparator, xhat_code goes to the
// feedback D/A, dac_code to the output D/A.
//
// Timing: one sample period is N clocks; sample_tick marks its last clock. The
// modulator samples comp_in on that edge. dy_out/dac_code for the steps up to
// xhat_n appear on the clock after the tick that ends period n+1 (one sample of
// latency inside the processor), flagged by dy_valid.
//
// Sizes follow the design (64 taps, 8-bit coefficients, 12-bit accumulator, step
// sizes 1, 2, 4, 8, 8-bit output D/A); the feedback code width and the D/A bit
// selection are this design's choices.
module admf_core
#(
  parameter int unsigned N         = admf_pkg::P_N,
  parameter int unsigned B         = admf_pkg::P_B,
  parameter int unsigned ACC_W     = admf_pkg::P_ACC_W,
  parameter int unsigned LMAX      = admf_pkg::P_LMAX,
  parameter int unsigned XHAT_W    = admf_pkg::P_XHAT_W,
  parameter int unsigned DAC_W     = admf_pkg::P_DAC_W,
  parameter int unsigned DAC_SHIFT = admf_pkg::P_DAC_SHIFT,
  localparam int unsigned AW       = (N < 2) ? 1 : $clog2(N)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     comp_in,
  output logic signed [XHAT_W-1:0] xhat_code,
  output logic                     c_out,
  output logic [admf_pkg::lvl_width(LMAX)-1:0] step_lvl, // exponent l_n of the current step
  output logic                     sample_tick,
  input  logic                     coef_we,
  input  logic [AW-1:0]            coef_waddr,
  input  logic signed [B-1:0]      coef_wdata,
  output logic signed [ACC_W-1:0]  dy_out,
  output logic                     dy_valid,
  output logic [DAC_W-1:0]         dac_code
);

  adm #(.LMAX(LMAX), .XHAT_W(XHAT_W)) u_adm (
    .clk      (clk),
    .rst_n    (rst_n),
    .tick     (sample_tick),
    .comp_in  (comp_in),
    .c_out    (c_out),
    .lvl      (step_lvl),
    .xhat_code(xhat_code)
  );

  admf_processor #(
    .N(N), .B(B), .ACC_W(ACC_W), .LMAX(LMAX), .DAC_W(DAC_W), .DAC_SHIFT(DAC_SHIFT)
  ) u_proc (
    .clk       (clk),
    .rst_n     (rst_n),
    .c_in      (c_out),
    .tick      (sample_tick),
    .coef_we   (coef_we),
    .coef_waddr(coef_waddr),
    .coef_wdata(coef_wdata),
    .dy_out    (dy_out),
    .dy_valid  (dy_valid),
    .dac_code  (dac_code)
  );

endmodule
