// Step size logic of the adaptive delta modulator.
//
// Computes the next step exponent l_n from the last two modulator decisions
// c_{n-1}, c_{n-2} and the previous exponent l_{n-1}: when the two decisions
// agree the step doubles (l + 1, held at LMAX), when they differ it halves
// (l - 1, held at 0). The step itself is 2^l times the minimum step, signed by
// c_{n-1}, so every step is a power of two and no multiplier is needed anywhere.
// This is the rule the design follows exactly; decisions are encoded 1 = +1,
// 0 = -1. Purely combinational: one instance sits in the modulator loop and one
// in the filter processor, which uses it to regenerate the exponent of every
// stored one-bit sample instead of storing it.
module step_size_logic
#(
  parameter int unsigned LMAX = admf_pkg::P_LMAX,
  localparam int unsigned LW  = admf_pkg::lvl_width(LMAX)
) (
  input  logic          c1,       // c_{n-1}
  input  logic          c2,       // c_{n-2}
  input  logic [LW-1:0] lvl_prev, // l_{n-1}
  output logic [LW-1:0] lvl_next  // l_n
);

  always_comb begin
    if (c1 == c2) begin
      lvl_next = (lvl_prev >= LW'(LMAX)) ? LW'(LMAX) : lvl_prev + 1'b1;
    end else begin
      lvl_next = (lvl_prev == '0) ? '0 : lvl_prev - 1'b1;
    end
  end

endmodule
