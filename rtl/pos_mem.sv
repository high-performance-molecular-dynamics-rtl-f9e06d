// pos_mem: on-chip position and type memory. Particles are stored grouped by
// cell (the host orders them so), N particles per row so that one read feeds
// all N force pipelines; cells are padded with dummy particles to whole rows.
// Each entry holds the fixed-point coordinates and the type, which travels
// with the position instead of living in a separate type memory.
// Ports: one host write port (row, lane), two synchronous read ports: A loads
// the Pi array, B loads the Pj registers. Read data appear one cycle after
// the address. Default capacity 2048 particles, the size of one on-chip
// particle cache in the document.
module pos_mem
  import md_pkg::*;
#(
  parameter int unsigned N     = 2,
  parameter int unsigned ROWS  = 2048 / N,
  parameter int unsigned RW    = $clog2(ROWS),
  parameter int unsigned LW    = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [RW-1:0] wrow,
  input  logic [LW-1:0] wlane,
  input  particle_t     wdata,
  input  logic [RW-1:0] raddr_a,
  output particle_t     rdata_a [N],
  input  logic [RW-1:0] raddr_b,
  output particle_t     rdata_b [N]
);
  for (genvar k = 0; k < N; k++) begin : g_lane
    particle_t mem [ROWS];
    always_ff @(posedge clk) begin
      if (we && wlane == LW'(k)) mem[wrow] <= wdata;
      rdata_a[k] <= mem[raddr_a];
      rdata_b[k] <= mem[raddr_b];
    end
  end
endmodule
