// fix_to_dp: converts a W-bit two's complement fixed-point number with FRAC
// fraction bits (a force or acceleration from the coprocessor) into an
// IEEE-754 double for the host. For W <= 53 the conversion is exact.
// Combinational; zero maps to +0.
module fix_to_dp #(
  parameter int unsigned W    = 35,
  parameter int unsigned FRAC = 20
) (
  input  logic signed [W-1:0] q,
  output logic [63:0]         d
);
  logic [W-1:0]  mag;
  logic [51:0]   frac;
  logic [52:0]   norm;
  int            lead;

  always_comb begin
    mag  = q[W-1] ? W'(-q) : W'(q);
    lead = 0;
    for (int i = 0; i < int'(W); i++) if (mag[i]) lead = i;
    norm = 53'(mag) << (52 - lead);
    frac = norm[51:0];
    if (mag == '0) d = 64'd0;
    else           d = {q[W-1], 11'(lead - int'(FRAC) + 1023), frac};
  end
endmodule
