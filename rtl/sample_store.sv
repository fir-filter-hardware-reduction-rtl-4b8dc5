// One-bit input sample store of the filter.
//
// Holds the last N modulator decisions, one bit each, in an N-bit shift register:
// this is the whole input memory of an N-tap filter, against N words of B bits for
// a PCM filter. Bit 0 is the newest decision, bit N-1 the oldest. A new bit enters
// at bit 0 on a clock edge where shift is high. Two combinational read taps give
// bit raddr and its older neighbour raddr+1 (0 beyond the oldest bit), which the
// serial processor needs to regenerate step exponents.
//
// The one-bit-per-sample storage follows the design; the shift-register form,
// the read taps and the reset pattern are this design's choices. Reset loads the
// alternating idle pattern (bit k = k mod 2), which matches the reset state of
// the modulator loop so that the regenerated exponents start at 0.
module sample_store #(
  parameter int unsigned N  = admf_pkg::P_N,
  localparam int unsigned AW = (N < 2) ? 1 : $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          shift,
  input  logic          din,
  input  logic [AW-1:0] raddr,
  output logic          bit_k,
  output logic          bit_k1
);

  logic [N-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) sr[k] <= k[0];
    end else if (shift) begin
      sr <= {sr[N-2:0], din};
    end
  end

  always_comb begin
    bit_k  = sr[raddr];
    bit_k1 = (32'(raddr) >= N - 1) ? 1'b0 : sr[raddr + 1'b1];
  end

  initial assert (N >= 2) else $error("sample_store: N must be at least 2");

endmodule
