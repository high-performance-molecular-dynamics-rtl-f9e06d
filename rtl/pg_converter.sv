// pg_converter: the 1:64 particle-grid converter tree. A value (the charge for
// assignment, or 1.0 for interpolation) is multiplied in three levels:
// by the 4 x-weights (4 products), each of those by the 4 y-weights (16),
// and each of those by the 4 z-weights (64), giving the contribution to all
// 4x4x4 grid points around a particle in one pass. Each level shares the
// outputs of a single basis-function pipeline per dimension, so 64-way
// parallelism needs only three of them, as in the document's tree.
// Fed with Phi or dPhi per dimension, the same tree gives the
// potential weights or one component of the gradient.
// Timing: fully pipelined, one particle per cycle, outputs PG_LAT = 3 cycles
// later; out[a*16 + b*4 + c] belongs to grid offset (x+a, y+b, z+c).
module pg_converter
  import md_pkg::*;
#(
  parameter int unsigned WF = 24
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  data_t      val,
  input  data_t      phx [4],
  input  data_t      phy [4],
  input  data_t      phz [4],
  output logic       out_valid,
  output data_t      out [64]
);
  function automatic data_t fmul(input data_t a, input data_t b);
    logic signed [2*DATA_W-1:0] p;
    p = a * b;
    return data_t'(p >>> WF);
  endfunction

  data_t l1 [4];
  data_t l2 [16];
  data_t phy1 [4], phz1 [4], phz2 [4];
  logic  v1, v2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; out_valid <= 1'b0;
      for (int i = 0; i < 4; i++) begin
        l1[i] <= '0; phy1[i] <= '0; phz1[i] <= '0; phz2[i] <= '0;
      end
      for (int i = 0; i < 16; i++) l2[i] <= '0;
      for (int i = 0; i < 64; i++) out[i] <= '0;
    end else begin
      v1 <= in_valid; v2 <= v1; out_valid <= v2;
      for (int a = 0; a < 4; a++) l1[a] <= fmul(val, phx[a]);
      phy1 <= phy; phz1 <= phz; phz2 <= phz1;
      for (int a = 0; a < 4; a++)
        for (int b = 0; b < 4; b++) l2[a*4+b] <= fmul(l1[a], phy1[b]);
      for (int ab = 0; ab < 16; ab++)
        for (int c = 0; c < 4; c++) out[ab*4+c] <= fmul(l2[ab], phz2[c]);
    end
  end
endmodule
