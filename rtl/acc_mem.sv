// acc_mem: acceleration (force) memory, organised like pos_mem: N particles
// per row, one bank per lane. The accumulate port adds a vector to each
// enabled lane of a row in one cycle (read-modify-write on an asynchronous
// read), so updates of the same row in consecutive cycles need no stall.
// A clear port zeroes a whole row; the host reads one particle through a
// synchronous read port. Accumulate and clear must not target the same
// cycle (checked by an assertion).
module acc_mem
  import md_pkg::*;
#(
  parameter int unsigned N     = 2,
  parameter int unsigned ROWS  = 2048 / N,
  parameter int unsigned RW    = $clog2(ROWS),
  parameter int unsigned LW    = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          acc_en,
  input  logic [RW-1:0] acc_row,
  input  logic [N-1:0]  acc_lane_en,
  input  vec_t          acc_val [N],
  input  logic          clr_en,
  input  logic [RW-1:0] clr_row,
  input  logic [RW-1:0] rd_row,
  input  logic [LW-1:0] rd_lane,
  output vec_t          rd_data
);
  vec_t mem [N][ROWS];

  always_ff @(posedge clk) begin
    for (int k = 0; k < int'(N); k++) begin
      if (clr_en) begin
        mem[k][clr_row] <= '0;
      end else if (acc_en && acc_lane_en[k]) begin
        mem[k][acc_row].x <= mem[k][acc_row].x + acc_val[k].x;
        mem[k][acc_row].y <= mem[k][acc_row].y + acc_val[k].y;
        mem[k][acc_row].z <= mem[k][acc_row].z + acc_val[k].z;
      end
    end
    rd_data <= mem[rd_lane][rd_row];
  end

  a_no_clr_acc: assert property (@(posedge clk) !(clr_en && acc_en));
endmodule
