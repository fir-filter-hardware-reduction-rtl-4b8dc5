// Behavioural model (not synthesizable) of the output D/A converter, an R-2R
// ladder of DAC_W bits.
//
// An ideal ladder gives each bit i the weight VREF / 2^(DAC_W - i). The code is
// offset binary (mid-scale = 0 V), so the model subtracts VREF/2:
//     v_out = sum_i code[i] * VREF / 2^(DAC_W-i) - VREF/2.
// The output follows the code without delay; resistor mismatch, glitches and
// settling are not modelled. VREF is this model's choice.
module r2r_dac_model #(
  parameter int unsigned DAC_W = admf_pkg::P_DAC_W,
  parameter real         VREF  = 1.0
) (
  input  logic [DAC_W-1:0] code,
  output real              v_out
);

  always_comb begin
    real v;
    v = 0.0;
    for (int i = 0; i < DAC_W; i++) begin
      if (code[i]) v = v + VREF / (2.0 ** (DAC_W - i));
    end
    v_out = v - VREF / 2.0;
  end

endmodule
