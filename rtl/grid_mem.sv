// grid_mem: interleaved grid memory for the finest grid (used as Q-store for
// charges and V-store for potentials). The G^3 grid is spread over 64 banks
// by (x mod 4, y mod 4, z mod 4), so any 4x4x4 block of grid points, at any
// origin and with periodic wrap-around, touches every bank exactly once and
// can be read or accumulated in a single cycle; each bank computes its own
// address from the block origin. The particle-grid converter needs exactly
// this many accesses per cycle.
// Ports:
//   block read:  origin -> 64 values one cycle later (out[a*16+b*4+c] is
//                point (x+a, y+b, z+c));
//   block add:   adds 64 values to the block at an origin (read-modify-write
//                within the cycle, so back-to-back overlapping blocks are fine);
//   point port:  one grid point per cycle, write or synchronous read, for
//                the grid-grid convolver stream;
//   clear:       zeroes one row of all banks (64 points) per cycle.
// Priority: clear, then block add, then point write. The document states the
// need for interleaving; the bank mapping is this design's choice.
module grid_mem
  import md_pkg::*;
#(
  parameter int unsigned GB = 5,                    // log2 grid points per edge
  parameter int unsigned BW = 3 * (GB - 2)          // bank address width
) (
  input  logic          clk,
  // block read
  input  logic [GB-1:0] rd_x, rd_y, rd_z,
  output data_t         rd_data [64],
  // block accumulate
  input  logic          add_en,
  input  logic [GB-1:0] add_x, add_y, add_z,
  input  data_t         add_data [64],
  // single point port
  input  logic          pt_we,
  input  logic [GB-1:0] pt_x, pt_y, pt_z,
  input  data_t         pt_wdata,
  output data_t         pt_rdata,
  // clear
  input  logic          clr_en,
  input  logic [BW-1:0] clr_addr
);
  localparam int unsigned BD = 1 << BW;

  data_t bank [64][BD];

  // block offset (a,b,c) of origin o lands in bank ((o+a) mod 4 ...)
  function automatic logic [BW-1:0] baddr(input logic [GB-1:0] x, y, z);
    return {z[GB-1:2], y[GB-1:2], x[GB-1:2]};
  endfunction
  function automatic logic [5:0] bsel(input logic [GB-1:0] x, y, z);
    return {z[1:0], y[1:0], x[1:0]};
  endfunction

  // Bank k = (kz,ky,kx) holds block offset a = (kx - x) mod 4 (likewise b, c).
  logic [BW-1:0] add_a  [64];
  logic [5:0]    add_src[64];   // which block element lands in bank k
  logic [BW-1:0] rd_a   [64];
  logic [5:0]    rd_dst [64];
  logic [5:0]    rd_dst_q [64];
  always_comb begin
    for (int k = 0; k < 64; k++) begin
      logic [1:0]    a, b, c;
      logic [GB-1:0] px, py, pz;
      a = 2'(k) - add_x[1:0]; b = 2'(k >> 2) - add_y[1:0]; c = 2'(k >> 4) - add_z[1:0];
      px = add_x + GB'(a); py = add_y + GB'(b); pz = add_z + GB'(c);
      add_a[k]   = baddr(px, py, pz);
      add_src[k] = {a, b, c};
      a = 2'(k) - rd_x[1:0]; b = 2'(k >> 2) - rd_y[1:0]; c = 2'(k >> 4) - rd_z[1:0];
      px = rd_x + GB'(a); py = rd_y + GB'(b); pz = rd_z + GB'(c);
      rd_a[k]    = baddr(px, py, pz);
      rd_dst[k]  = {a, b, c};
    end
  end

  data_t bank_q [64];
  always_ff @(posedge clk) begin
    for (int k = 0; k < 64; k++) begin
      if (clr_en)
        bank[k][clr_addr] <= '0;
      else if (add_en)
        bank[k][add_a[k]] <= bank[k][add_a[k]] + add_data[add_src[k]];
      else if (pt_we && bsel(pt_x, pt_y, pt_z) == 6'(k))
        bank[k][baddr(pt_x, pt_y, pt_z)] <= pt_wdata;
      bank_q[k] <= bank[k][rd_a[k]];
    end
    rd_dst_q <= rd_dst;
    pt_rdata <= bank[bsel(pt_x, pt_y, pt_z)][baddr(pt_x, pt_y, pt_z)];
  end

  // crossbar from banks back to block order
  always_comb begin
    for (int k = 0; k < 64; k++) rd_data[k] = '0;
    for (int k = 0; k < 64; k++) rd_data[rd_dst_q[k]] = bank_q[k];
  end
endmodule
