// Digital loop of the adaptive delta modulator (ADM).
//
// The loop follows the modulator structure exactly: the comparator decision
// c_n = sgn(x_n - xhat_n) passes through two sample delays that hold c_{n-1} and
// c_{n-2}; the step size logic turns them and the previous exponent l_{n-1} into
// l_n; the step Delta_n = 2^{l_n} * c_{n-1} (in minimum steps) is added to the
// integrator register xhat_{n-1} to give xhat_n, whose code drives the feedback
// D/A. The comparator and the D/A are analog and sit outside this module.
// Decisions are encoded 1 = +1, 0 = -1.
//
// This design's own choices: the width of xhat, saturation at the code limits
// instead of wrap-around, and the reset state, which is the idle pattern of the
// loop (c_{n-1} = +1, c_{n-2} = -1, exponent 0, integrator 0).
//
// Timing: the registers advance on the clock edge where tick is high, once per
// sample. xhat_code, lvl and c_out are then valid for the whole sample period:
// xhat_code is combinational from the registers (adder output, as the D/A
// is fed in front of the integrator delay), c_out = c_{n-1}, lvl = l_n.
module adm
#(
  parameter int unsigned LMAX   = admf_pkg::P_LMAX,
  parameter int unsigned XHAT_W = admf_pkg::P_XHAT_W,
  localparam int unsigned LW    = admf_pkg::lvl_width(LMAX)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     tick,      // one clock per sample period
  input  logic                     comp_in,   // c_n: 1 when x(t) > xhat(t)
  output logic                     c_out,     // c_{n-1}, the modulator output bit
  output logic [LW-1:0]            lvl,       // l_n, exponent of the step Delta_n
  output logic signed [XHAT_W-1:0] xhat_code  // xhat_n, feedback D/A code
);

  localparam logic signed [XHAT_W:0] XMAX = (XHAT_W+1)'(2**(XHAT_W-1) - 1);
  localparam logic signed [XHAT_W:0] XMIN = -(XHAT_W+1)'(2**(XHAT_W-1));

  logic                     c2;       // c_{n-2}
  logic [LW-1:0]            lvl_q;    // l_{n-1}
  logic signed [XHAT_W-1:0] xhat_q;   // xhat_{n-1}
  logic signed [XHAT_W:0]   step, sum;

  step_size_logic #(.LMAX(LMAX)) u_step (
    .c1      (c_out),
    .c2      (c2),
    .lvl_prev(lvl_q),
    .lvl_next(lvl)
  );

  always_comb begin
    step = (XHAT_W+1)'(1) <<< lvl;
    sum  = c_out ? (XHAT_W+1)'(xhat_q) + step : (XHAT_W+1)'(xhat_q) - step;
    if (sum > XMAX)      xhat_code = XMAX[XHAT_W-1:0];
    else if (sum < XMIN) xhat_code = XMIN[XHAT_W-1:0];
    else                 xhat_code = sum[XHAT_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_out  <= 1'b1;
      c2     <= 1'b0;
      lvl_q  <= '0;
      xhat_q <= '0;
    end else if (tick) begin
      c_out  <= comp_in;
      c2     <= c_out;
      lvl_q  <= lvl;
      xhat_q <= xhat_code;
    end
  end

endmodule
