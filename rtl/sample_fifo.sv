// sample_fifo: programmable delay line counted in samples, not cycles: each
// valid sample is written and the sample written `len` valid samples earlier
// is presented at the output in the same cycle. It is the 1D (line) or 2D
// (plane) FIFO between convolver stages; making `len` a run-time input lets
// one convolver serve grids of different sizes (len <= DEPTH).
// Contents are not reset: outputs before `len` samples have been written are
// meaningless, and the convolvers discard the outputs that use them.
module sample_fifo
  import md_pkg::*;
#(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        valid,
  input  logic [AW:0] len,
  input  data_t       din,
  output data_t       dout
);
  data_t       mem [DEPTH];
  logic [AW-1:0] wp;
  logic [AW:0]   rp;

  always_comb begin
    rp = (AW+1)'(wp) + (AW+1)'(DEPTH) - len;
    if (rp >= (AW+1)'(DEPTH)) rp = rp - (AW+1)'(DEPTH);
  end
  assign dout = mem[AW'(rp)];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wp <= '0;
    else if (valid) wp <= (32'(wp) == DEPTH - 1) ? '0 : wp + 1'b1;
  end
  always_ff @(posedge clk) begin
    if (valid) mem[wp] <= din;
  end
endmodule
