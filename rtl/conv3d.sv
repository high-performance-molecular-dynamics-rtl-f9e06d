// conv3d: the grid-grid convolver. K 2D convolvers (one per kernel plane kz)
// are chained through 2D (plane) FIFOs that each delay by one plane
// (len_x*len_y samples), the same construction one dimension up:
//   y[n] = sum h[kz][ky][kx] * x[n - kx - ky*len_x - kz*len_x*len_y].
// It takes and delivers one grid point per cycle, so it works directly on
// block RAM streams. For a periodic grid the controller streams the grid
// extended by the kernel radius on every side (with wrap-around); the outputs
// whose window lies inside the stream are exactly the periodic convolution.
// Splitting a larger grid into pieces (convolving each and summing them by
// position) works on the same hardware by running it once per piece.
// Timing: sample-aligned, out_valid three cycles after in_valid.
module conv3d
  import md_pkg::*;
#(
  parameter int unsigned K    = 5,
  parameter int unsigned CF   = 24,
  parameter int unsigned LMAX = 64,     // longest line
  parameter int unsigned PMAX = 4096,   // largest plane
  parameter int unsigned LAW  = $clog2(LMAX),
  parameter int unsigned PAW  = $clog2(PMAX)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [LAW:0] len_x,
  input  logic [PAW:0] len_xy,
  input  logic         in_valid,
  input  data_t        x,
  input  data_t        h [K][K][K],  // h[kz][ky][kx]
  output logic         out_valid,
  output data_t        y
);
  logic [K-1:0] v2;
  data_t        r2 [K];
  data_t        a  [K];
  data_t        fo [K];

  for (genvar kz = 0; kz < K; kz++) begin : g_plane
    conv2d #(.K(K), .CF(CF), .LMAX(LMAX), .LAW(LAW)) u_c2 (
      .clk(clk), .rst_n(rst_n), .len_x(len_x), .in_valid(in_valid), .x(x), .h(h[kz]),
      .out_valid(v2[kz]), .y(r2[kz])
    );
    if (kz == K - 1) begin : g_last
      assign fo[kz] = '0;
      assign a[kz]  = r2[kz];
    end else begin : g_mid
      sample_fifo #(.DEPTH(PMAX), .AW(PAW)) u_plane (
        .clk(clk), .rst_n(rst_n), .valid(v2[0]), .len(len_xy), .din(a[kz+1]), .dout(fo[kz])
      );
      assign a[kz] = r2[kz] + fo[kz];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; y <= '0;
    end else begin
      out_valid <= v2[0];
      y         <= a[0];
    end
  end
endmodule
