// Behavioural model (not synthesizable) of the analog part of the adaptive delta
// modulator: the feedback D/A, the subtraction x(t) - xhat(t) and the two-level
// quantizer, which together act as one comparator.
//
// xhat_v = DELTA0 * xhat_code, with DELTA0 the minimum step in volts; comp_out is
// 1 when x_in > xhat_v (decision +1) and 0 otherwise (decision -1). Both follow
// their inputs without delay. The default DELTA0 makes a 1 V peak input fifty
// minimum steps high, the input level of the frequency-response measurement the
// filter is characterized with; a real circuit would add comparator offset,
// noise and D/A settling, which this model leaves out.
module adm_analog_model #(
  parameter real         DELTA0 = 0.02,
  parameter int unsigned XHAT_W = admf_pkg::P_XHAT_W
) (
  input  real                      x_in,
  input  logic signed [XHAT_W-1:0] xhat_code,
  output logic                     comp_out,
  output real                      xhat_v
);

  always_comb begin
    xhat_v   = DELTA0 * $itor(xhat_code);
    comp_out = (x_in > xhat_v);
  end

endmodule
