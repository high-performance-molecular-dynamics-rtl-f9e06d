// basis_pipe: basis-function pipeline of the particle-grid converter, one per
// dimension. A particle coordinate (an unsigned fraction of the periodic box)
// is scaled to grid units by taking its top GB bits as the grid index and the
// next WF bits as the fractional offset w. For a 4th-order (P = 4) basis the
// particle touches grid points i-1 .. i+2; the pipeline returns their
// weights Phi_0..3(w) and the derivatives dPhi_0..3(w) (per grid spacing).
// The document names the pipeline and P but not the basis; this design uses
// the cubic B-spline:
//   Phi0 = (1-w)^3/6          dPhi0 = -(1-w)^2/2
//   Phi1 = (3w^3-6w^2+4)/6    dPhi1 = (3w^2-4w)/2
//   Phi2 = (-3w^3+3w^2+3w+1)/6 dPhi2 = (-3w^2+2w+1)/2
//   Phi3 = w^3/6              dPhi3 = w^2/2
// Weights are signed DATA_W-bit numbers with WF fraction bits.
// Timing: one coordinate per cycle, results BP_LAT = 3 cycles later.
module basis_pipe
  import md_pkg::*;
#(
  parameter int unsigned GB = 5,    // log2 of grid points per edge
  parameter int unsigned WF = 24    // fraction bits of w and of the weights
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [POS_W-1:0] pos,
  output logic             out_valid,
  output logic [GB-1:0]    base,     // grid index of the first point (i-1)
  output data_t            phi  [4],
  output data_t            dphi [4]
);
  typedef logic signed [DATA_W-1:0] s_t;
  localparam s_t ONE   = s_t'(1) << WF;
  localparam s_t SIXTH = s_t'(((64'd1 << (2*WF)) + 3) / 6 >> WF);  // round(2^WF/6)

  function automatic s_t fmul(input s_t a, input s_t b);
    logic signed [2*DATA_W-1:0] p;
    p = a * b;
    return s_t'(p >>> WF);
  endfunction

  // stage 1: w and w^2
  s_t w1, w2_1;
  logic [GB-1:0] b1;
  logic v1;
  s_t w_in;
  assign w_in = s_t'({1'b0, pos[POS_W-1-GB -: WF]});
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; w1 <= '0; w2_1 <= '0; b1 <= '0;
    end else begin
      v1 <= in_valid; w1 <= w_in; w2_1 <= fmul(w_in, w_in);
      b1 <= pos[POS_W-1 -: GB] - GB'(1);
    end
  end

  // stage 2: w^3
  s_t w2, w2_2, w3;
  logic [GB-1:0] b2;
  logic v2;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v2 <= 1'b0; w2 <= '0; w2_2 <= '0; w3 <= '0; b2 <= '0;
    end else begin
      v2 <= v1; w2 <= w1; w2_2 <= w2_1; w3 <= fmul(w2_1, w1); b2 <= b1;
    end
  end

  // stage 3: the polynomials
  s_t om, om2, om3;
  always_comb begin
    om  = ONE - w2;
    om2 = fmul(om, om);
    om3 = fmul(om2, om);
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; base <= '0;
      for (int k = 0; k < 4; k++) begin
        phi[k] <= '0; dphi[k] <= '0;
      end
    end else begin
      out_valid <= v2;
      base      <= b2;
      phi[0]  <= fmul(om3, SIXTH);
      phi[1]  <= fmul(3*w3 - 6*w2_2 + 4*ONE, SIXTH);
      phi[2]  <= fmul(-3*w3 + 3*w2_2 + 3*w2 + ONE, SIXTH);
      phi[3]  <= fmul(w3, SIXTH);
      dphi[0] <= -(om2 >>> 1);
      dphi[1] <= (3*w2_2 - 4*w2) >>> 1;
      dphi[2] <= (-3*w2_2 + 2*w2 + ONE) >>> 1;
      dphi[3] <= w2_2 >>> 1;
    end
  end
endmodule
