// coef_mem: coefficient memory of one interpolated function. One word per
// interval holds the four Horner coefficients C3..C0 and the semi floating
// point format (alignment selectors and output shift) that goes with them,
// so one read delivers everything the interpolation pipeline needs.
// Depth is NSEC sections x 128 intervals (the document's N = 128, M = 3).
// The host loads the table through the write port; the read is synchronous
// (one cycle, block-RAM style).
module coef_mem
  import md_pkg::*;
#(
  parameter int unsigned DEPTH = NSEC * (1 << IVL_W),
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  coef_t         wdata,
  input  logic [AW-1:0] raddr,
  output coef_t         rdata
);
  coef_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
