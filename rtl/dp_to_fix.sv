// dp_to_fix: converts an IEEE-754 double from the host into a W-bit two's
// complement fixed-point number with FRAC fraction bits, truncating toward
// zero and wrapping modulo 2^W. For coordinates given as fractions of the
// periodic box (FRAC = W) the wrap is exactly the periodic boundary.
// Zero and subnormal inputs give 0; infinity and NaN give 0 and raise `bad`.
// The document places such converters between the host and the pipelines;
// the rounding and the wrap are this design's choices. Combinational.
module dp_to_fix #(
  parameter int unsigned W    = 35,
  parameter int unsigned FRAC = 35
) (
  input  logic [63:0]  d,
  output logic [W-1:0] q,
  output logic         bad
);
  logic          sgn;
  logic [10:0]   e;
  logic [52:0]   m;
  logic [W-1:0]  mag;
  int            sh;

  always_comb begin
    sgn = d[63];
    e   = d[62:52];
    m   = {1'b1, d[51:0]};
    bad = (e == 11'h7ff);
    sh  = int'(e) - 1075 + int'(FRAC);      // value = m * 2^sh in fixed units
    if (e == 11'd0 || bad)  mag = '0;
    else if (sh >= 0)       mag = (sh >= int'(W)) ? '0 : W'({{W{1'b0}}, m} << sh);
    else                    mag = (-sh > 52) ? '0 : W'(m >> (-sh));
    q = sgn ? -mag : mag;
  end
endmodule
