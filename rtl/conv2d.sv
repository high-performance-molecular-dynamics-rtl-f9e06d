// conv2d: 2D convolver built, as in the document, from K 1D convolvers and
// 1D (line) FIFOs. Row ky of the kernel filters the incoming raster stream
// in 1D convolver ky; the partial sums are chained through line FIFOs, each
// delaying by one line (len_x samples), so that
//   A[K-1] = c1d_{K-1}(x),  A[ky] = c1d_ky(x) + linefifo(A[ky+1]),  y = A[0]
//   y[n] = sum_{ky,kx} h[ky][kx] * x[n - kx - ky*len_x].
// For a raster of width len_x this is the 2D convolution wherever the kernel
// window lies inside the stream; outputs whose window wraps around a row
// edge are to be discarded by the consumer. Changing len_x (<= LMAX) adapts
// the convolver to other grid sizes.
// Timing: sample-aligned, out_valid two cycles after in_valid.
module conv2d
  import md_pkg::*;
#(
  parameter int unsigned K    = 5,
  parameter int unsigned CF   = 24,
  parameter int unsigned LMAX = 64,
  parameter int unsigned LAW  = $clog2(LMAX)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [LAW:0] len_x,
  input  logic         in_valid,
  input  data_t        x,
  input  data_t        h [K][K],     // h[ky][kx]
  output logic         out_valid,
  output data_t        y
);
  logic [K-1:0] v1;
  data_t        r1 [K];
  data_t        a  [K];
  data_t        fo [K];

  for (genvar ky = 0; ky < K; ky++) begin : g_row
    conv1d #(.K(K), .CF(CF)) u_c1 (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .h(h[ky]),
      .out_valid(v1[ky]), .y(r1[ky])
    );
    if (ky == K - 1) begin : g_last
      assign fo[ky] = '0;
      assign a[ky]  = r1[ky];
    end else begin : g_mid
      sample_fifo #(.DEPTH(LMAX), .AW(LAW)) u_line (
        .clk(clk), .rst_n(rst_n), .valid(v1[0]), .len(len_x), .din(a[ky+1]), .dout(fo[ky])
      );
      assign a[ky] = r1[ky] + fo[ky];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; y <= '0;
    end else begin
      out_valid <= v1[0];
      y         <= a[0];
    end
  end
endmodule
