// Behavioural model (not synthesizable) of the analog lossy integrator that
// follows the output D/A: a simple RC low-pass with a cutoff far below the signal
// band, so that over the band it sums the filter's output differences dy_n back
// into y(t), while its leak keeps the unity-feedback recursion y_n = y_{n-1} + dy_n
// from drifting away.
//
// The D/A output is a staircase that changes once per sample, so the model is
// updated once per sample, on the rising edge of clk (the sample strobe), with the
// exact response of the RC section to a step held for one period T = 1/FS_HZ:
//     v_out <= a * v_out + GAIN * v_in,   a = exp(-2*pi*FC_HZ/FS_HZ).
// GAIN = 1 makes a constant dy equal to one D/A step per sample a ramp of one D/A
// step per sample, i.e. an ideal integrator well above the cutoff. The 30 Hz
// cutoff and the 16 kHz sample rate are the values of the filter this design
// models; the update form and the gain normalization are this model's choices.
module rc_integrator_model #(
  parameter real FC_HZ = 30.0,
  parameter real FS_HZ = 16000.0,
  parameter real GAIN  = 1.0
) (
  input  logic clk,
  input  real  v_in,
  output real  v_out
);

  localparam real PI = 3.14159265358979323846;
  real a;

  initial begin
    a     = $exp(-2.0 * PI * FC_HZ / FS_HZ);
    v_out = 0.0;
  end

  always @(posedge clk) v_out <= a * v_out + GAIN * v_in;

endmodule
