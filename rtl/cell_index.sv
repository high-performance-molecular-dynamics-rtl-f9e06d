// cell_index: two-level indexing logic. Level one locates a cell: the host
// downloads the number of particles in every cell, a build pass turns the
// counts into a base row per cell (running sum of whole rows, because each
// cell is padded with dummy particles to a multiple of the N pipelines),
// and two lookup ports return base row, row count and particle count of any
// cell. Level two, the particle within the cell, is base + row (formed by the
// pair controller) and lane; lanes at or beyond the count are dummies.
// Timing: build takes NCELL cycles after `build`, then `ready` is high.
// Lookups are combinational. Cell order is the cell index z*C*C + y*C + x.
module cell_index
  import md_pkg::*;
#(
  parameter int unsigned N     = 2,
  parameter int unsigned NCELL = 64,
  parameter int unsigned ROWS  = 2048 / N,
  parameter int unsigned CW    = $clog2(NCELL),
  parameter int unsigned RW    = $clog2(ROWS),
  parameter int unsigned PW    = $clog2(ROWS * N) + 1  // particle count width
) (
  input  logic          clk,
  input  logic          rst_n,
  // host download of particle-per-cell counts
  input  logic          cnt_we,
  input  logic [CW-1:0] cnt_cell,
  input  logic [PW-1:0] cnt_val,
  input  logic          build,
  output logic          ready,
  output logic          overflow,   // padded cells exceed the memory
  // two lookup ports (cell A and cell B)
  input  logic [CW-1:0] cell_a,
  output logic [RW-1:0] base_a,
  output logic [RW:0]   rows_a,
  output logic [PW-1:0] count_a,
  input  logic [CW-1:0] cell_b,
  output logic [RW-1:0] base_b,
  output logic [RW:0]   rows_b,
  output logic [PW-1:0] count_b
);
  logic [PW-1:0] count [NCELL];
  logic [RW-1:0] base  [NCELL];
  logic [CW-1:0] bidx;
  logic [RW+1:0] run;
  logic          busy;

  function automatic logic [RW:0] rows_of(input logic [PW-1:0] c);
    return (RW+1)'((32'(c) + N - 1) / N);
  endfunction

  always_ff @(posedge clk) begin
    if (cnt_we) count[cnt_cell] <= cnt_val;
    if (busy)   base[bidx] <= RW'(run);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; ready <= 1'b0; overflow <= 1'b0; bidx <= '0; run <= '0;
    end else if (build) begin
      busy <= 1'b1; ready <= 1'b0; overflow <= 1'b0; bidx <= '0; run <= '0;
    end else if (busy) begin
      run <= run + (RW+2)'(rows_of(count[bidx]));
      if ((run + (RW+2)'(rows_of(count[bidx]))) > (RW+2)'(ROWS)) overflow <= 1'b1;
      if (32'(bidx) == NCELL - 1) begin
        busy  <= 1'b0;
        ready <= 1'b1;
      end else begin
        bidx <= bidx + 1'b1;
      end
    end else if (cnt_we) begin
      ready <= 1'b0;
    end
  end

  assign base_a  = base[cell_a];
  assign count_a = count[cell_a];
  assign rows_a  = rows_of(count[cell_a]);
  assign base_b  = base[cell_b];
  assign count_b = count[cell_b];
  assign rows_b  = rows_of(count[cell_b]);
endmodule
