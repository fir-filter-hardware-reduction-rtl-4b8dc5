// Serial digital processor of the adaptive delta-modulation FIR filter.
//
// Computes, once per sample,
//     dy_n = sum_{k=0}^{N-1} a_k * c_{n-k-1} * 2^{l_{n-k}}
// which is the change of an ordinary FIR output y_n = sum a_k x_{n-k} when the
// input differences are the delta modulator's steps. There is no multiplier: each
// term is the coefficient a_k shifted left by l_{n-k} places and negated when the
// stored bit c_{n-k-1} is -1, then added to an ACC_W-bit accumulator.
//
// How it works. Processing is serial, one tap per clock, so a sample period is
// exactly N clocks and the processor also owns the timing: it emits tick on the
// last clock of every period, which clocks the modulator and shifts the newest
// decision (c_in) into the one-bit sample store. The taps are visited from the
// oldest (k = N-1) to the newest (k = 0). The store holds only the decision bits,
// N bits in all; the exponent l of every tap is regenerated on the fly by a copy
// of the modulator's step size logic, stepping from one tap to the next with the
// two neighbouring bits. The only extra state is the exponent of the oldest tap
// (lvl_tail); it is advanced once per sample from the value regenerated for the
// second-oldest tap, which becomes the oldest after the next shift.
// Accumulation wraps modulo 2^ACC_W, so the result is exact whenever the final
// sum fits, whatever the partial sums do.
//
// Interface and timing. tick is high on clock N-1 of each period. dy_out and
// dac_code change on the clock after tick (dy_valid high for that one clock) and
// hold until the next period ends; the value is computed over the window that was
// in the store during that period, i.e. it lags the bit on c_in by one sample.
// dac_code = dy_out >>> DAC_SHIFT, saturated to DAC_W bits and given in offset
// binary for the output D/A. Coefficients are written through coef_we/waddr/wdata
// at any time; a write takes effect from the next read of that tap.
//
// Follows the design: serial processing with the sample rate 1/N of the clock,
// N x B coefficient storage, N one-bit samples, shift-and-add arithmetic and the
// 12-bit accumulator. This design's choices: the tap order, regeneration of the
// exponents from the stored bits, wrap-around accumulation, and which accumulator
// bits drive the D/A.
module admf_processor
#(
  parameter int unsigned N         = admf_pkg::P_N,
  parameter int unsigned B         = admf_pkg::P_B,
  parameter int unsigned ACC_W     = admf_pkg::P_ACC_W,
  parameter int unsigned LMAX      = admf_pkg::P_LMAX,
  parameter int unsigned DAC_W     = admf_pkg::P_DAC_W,
  parameter int unsigned DAC_SHIFT = admf_pkg::P_DAC_SHIFT,
  localparam int unsigned AW       = (N < 2) ? 1 : $clog2(N),
  localparam int unsigned LW       = admf_pkg::lvl_width(LMAX)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    c_in,        // modulator output bit c_{n-1}
  output logic                    tick,        // end of sample period
  input  logic                    coef_we,
  input  logic [AW-1:0]           coef_waddr,
  input  logic signed [B-1:0]     coef_wdata,
  output logic signed [ACC_W-1:0] dy_out,
  output logic                    dy_valid,
  output logic [DAC_W-1:0]        dac_code
);

  logic [AW-1:0]           cnt;       // clock within the sample period
  logic [AW-1:0]           k;         // tap being processed
  logic                    bit_k, bit_k1;
  logic signed [B-1:0]     coef;
  logic [LW-1:0]           lvl_tail;  // exponent of the oldest tap
  logic [LW-1:0]           lvl_prev;  // exponent used on the previous clock
  logic [LW-1:0]           lvl_step;  // regenerated exponent of tap k
  logic [LW-1:0]           lvl_cur;
  logic signed [ACC_W-1:0] acc, mag, term, acc_next;

  assign tick = (32'(cnt) == N - 1);
  assign k    = AW'(N - 1) - cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    cnt <= '0;
    else if (tick) cnt <= '0;
    else           cnt <= cnt + 1'b1;
  end

  sample_store #(.N(N)) u_store (
    .clk   (clk),
    .rst_n (rst_n),
    .shift (tick),
    .din   (c_in),
    .raddr (k),
    .bit_k (bit_k),
    .bit_k1(bit_k1)
  );

  coef_ram #(.N(N), .B(B)) u_coef (
    .clk  (clk),
    .we   (coef_we),
    .waddr(coef_waddr),
    .wdata(coef_wdata),
    .raddr(k),
    .rdata(coef)
  );

  // l_{n-k} = f(c_{n-k-1}, c_{n-k-2}, l_{n-k-1}): the bits of tap k and tap k+1.
  step_size_logic #(.LMAX(LMAX)) u_regen (
    .c1      (bit_k),
    .c2      (bit_k1),
    .lvl_prev(lvl_prev),
    .lvl_next(lvl_step)
  );

  always_comb begin
    lvl_cur  = (cnt == '0) ? lvl_tail : lvl_step;
    mag      = ACC_W'(coef) <<< lvl_cur;
    term     = bit_k ? mag : -mag;
    acc_next = (cnt == '0) ? term : acc + term;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lvl_tail <= '0;
      lvl_prev <= '0;
      acc      <= '0;
      dy_out   <= '0;
      dy_valid <= 1'b0;
    end else begin
      lvl_prev <= lvl_cur;
      acc      <= acc_next;
      dy_valid <= tick;
      if (cnt == AW'(1)) lvl_tail <= lvl_cur;
      if (tick)          dy_out   <= acc_next;
    end
  end

  // Output D/A code: arithmetic shift, saturate, offset binary.
  localparam int SW = (ACC_W > DAC_SHIFT) ? ACC_W - DAC_SHIFT : 1;
  logic signed [SW-1:0] scaled;
  always_comb begin
    scaled = SW'(dy_out >>> DAC_SHIFT);
    if (SW <= DAC_W) begin
      dac_code = DAC_W'(scaled);
    end else if (scaled > SW'(2**(DAC_W-1) - 1)) begin
      dac_code = DAC_W'(2**(DAC_W-1) - 1);
    end else if (scaled < -SW'(2**(DAC_W-1))) begin
      dac_code = DAC_W'(-(2**(DAC_W-1)));
    end else begin
      dac_code = DAC_W'(scaled);
    end
    dac_code[DAC_W-1] = ~dac_code[DAC_W-1];
  end

  initial assert (N >= 2) else $error("admf_processor: N must be at least 2");

endmodule
