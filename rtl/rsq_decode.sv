// rsq_decode: splits the table input x = r^2 into section, interval and
// offset, as the force tables are organised (each section twice as long as the
// previous one, every section cut into the same number of intervals).
// The position of the leading one of x selects the section, the IVL_W bits
// below it select the interval, and the remaining bits are the offset into the
// interval. The offset is returned left-aligned as an unsigned fraction t of
// the interval (T_W bits), so every interval's polynomial is written in the
// same variable t in [0,1); that normalisation is this design's choice.
// Sections cover leading-one positions X_W-NSEC .. X_W-1; a smaller x (particles
// closer than the table reaches) raises `under`.
// Purely combinational.
module rsq_decode
  import md_pkg::*;
#(
  parameter int unsigned XW   = X_W,
  parameter int unsigned IVW  = IVL_W,
  parameter int unsigned NS   = NSEC,
  parameter int unsigned SW   = SEC_W,
  parameter int unsigned TW   = T_W
) (
  input  logic [XW-1:0]  x,
  output logic [SW-1:0]  section,
  output logic [IVW-1:0] interval,
  output logic [TW-1:0]  t,
  output logic           under
);
  localparam int unsigned PMIN = XW - NS;

  logic [$clog2(XW)-1:0] lead;
  logic                  found;
  logic [XW-1:0]         aligned;

  always_comb begin
    lead  = '0;
    found = 1'b0;
    for (int i = 0; i < XW; i++) begin
      if (x[i]) begin
        lead  = i[$clog2(XW)-1:0];
        found = 1'b1;
      end
    end
    under    = !found || (32'(lead) < PMIN);
    section  = under ? '0 : SW'(32'(lead) - PMIN);
    // Shift so that the bit below the leading one lands at the top.
    aligned  = x << (XW - 32'(lead));
    interval = aligned[XW-1 -: IVW];
    t        = aligned[XW-1-IVW -: TW];
  end
endmodule
