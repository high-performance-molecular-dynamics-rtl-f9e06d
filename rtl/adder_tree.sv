// adder_tree: sums the force vectors of the N force pipelines, giving the
// total force that the N particles from cell B exert on the particle held in
// the Pi register in one cycle. A balanced binary tree of vector adders
// (levels = ceil(log2 N)) followed by one output register.
// Timing: one set of N vectors per cycle, sum one cycle later.
module adder_tree
  import md_pkg::*;
#(
  parameter int unsigned N = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  vec_t in [N],
  output logic out_valid,
  output vec_t sum
);
  localparam int unsigned LEVELS = (N <= 1) ? 1 : $clog2(N);
  localparam int unsigned W2     = 1 << LEVELS;

  vec_t lvl [LEVELS+1][W2];
  vec_t sum_n;

  always_comb begin
    for (int i = 0; i < int'(W2); i++) lvl[0][i] = (i < int'(N)) ? in[i] : '0;
    for (int l = 1; l <= int'(LEVELS); l++) begin
      for (int i = 0; i < int'(W2); i++) begin
        if (i < (int'(W2) >> l)) begin
          lvl[l][i].x = lvl[l-1][2*i].x + lvl[l-1][2*i+1].x;
          lvl[l][i].y = lvl[l-1][2*i].y + lvl[l-1][2*i+1].y;
          lvl[l][i].z = lvl[l-1][2*i].z + lvl[l-1][2*i+1].z;
        end else begin
          lvl[l][i] = '0;
        end
      end
    end
    sum_n = lvl[LEVELS][0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      sum       <= '0;
    end else begin
      out_valid <= in_valid;
      sum       <= sum_n;
    end
  end
endmodule
