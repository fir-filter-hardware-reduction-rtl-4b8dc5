// Coefficient memory of the filter: N words of B bits, two's complement.
//
// The coefficients are those of an ordinary FIR filter of the same order, so any
// FIR design method supplies them; keeping them in a writable memory makes the
// filter programmable. Write port: synchronous, one word per clock while we is
// high. Read port: combinational, rdata = word raddr in the same cycle, which the
// serial processor addresses with its tap counter. Storage size follows the
// design; the port arrangement is this design's choice. The memory is not reset:
// it must be written before the filter output is used.
module coef_ram #(
  parameter int unsigned N  = admf_pkg::P_N,
  parameter int unsigned B  = admf_pkg::P_B,
  localparam int unsigned AW = (N < 2) ? 1 : $clog2(N)
) (
  input  logic                clk,
  input  logic                we,
  input  logic [AW-1:0]       waddr,
  input  logic signed [B-1:0] wdata,
  input  logic [AW-1:0]       raddr,
  output logic signed [B-1:0] rdata
);

  logic signed [B-1:0] mem [N];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
