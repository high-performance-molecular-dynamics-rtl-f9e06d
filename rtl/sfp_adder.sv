// sfp_adder: semi floating point adder. In the table interpolation the scale
// factors (exponents) of both addends are known in advance for every interval,
// so only a handful of exponent differences ever occur. Instead of a general
// aligner this adder hardwires exactly those right shifts of the smaller
// addend and picks one with a small selector that is stored with the
// coefficients. The set of shifts (0,1,2,3,4,6,8,12 bits, see md_pkg) is this
// design's choice; the document fixes only the principle.
// Combinational: sum = a + (b >>> shift[sel]).
module sfp_adder
  import md_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  logic signed [W-1:0] a,     // addend on the result scale
  input  logic signed [W-1:0] b,     // addend on a finer scale
  input  logic [SSEL_W-1:0]   sel,   // which hardwired alignment to use
  output logic signed [W-1:0] sum
);
  logic signed [W-1:0] shifted [NSHIFT];

  // One fixed shifter per supported exponent difference.
  for (genvar k = 0; k < NSHIFT; k++) begin : g_shift
    assign shifted[k] = b >>> sfp_shift(SSEL_W'(k));
  end

  assign sum = a + shifted[sel];
endmodule
