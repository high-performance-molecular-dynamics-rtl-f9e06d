// conv1d: 1D convolver, a K-tap FIR filter in transposed form working on a
// stream of grid points (one per valid cycle):
//   y[n] = sum_k h[k] * x[n-k]      (products scaled down by CF bits)
// The transposed form keeps one adder per tap and no long adder chain.
// Outputs are sample-aligned: the output for input sample n appears, with
// out_valid, one cycle after it. Taps h are run-time inputs (loaded by the
// host as part of the multigrid kernel). The document builds its
// grid-grid convolver from such 1D convolvers; the tap count K = 5 and the
// coefficient scaling are this design's choices.
module conv1d
  import md_pkg::*;
#(
  parameter int unsigned K  = 5,
  parameter int unsigned CF = 24
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  data_t x,
  input  data_t h [K],
  output logic  out_valid,
  output data_t y
);
  function automatic data_t fmul(input data_t a, input data_t b);
    logic signed [2*DATA_W-1:0] p;
    p = a * b;
    return data_t'(p >>> CF);
  endfunction

  data_t z [K];   // z[k]: partial sum waiting for tap k (z[0] unused)

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; y <= '0;
      for (int k = 0; k < int'(K); k++) z[k] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        y <= fmul(h[0], x) + ((K > 1) ? z[1] : '0);
        for (int k = 1; k < int'(K); k++)
          z[k] <= fmul(h[k], x) + ((k + 1 < int'(K)) ? z[(k + 1) % K] : '0);
      end
    end
  end
endmodule
