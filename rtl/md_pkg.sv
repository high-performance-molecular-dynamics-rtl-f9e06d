// md_pkg: shared widths, constants and types of the molecular-dynamics
// coprocessor. The 35-bit datapath width and the table geometry (N = 128
// intervals per section, third-order interpolation) are the document's
// numbers; the remaining widths are this design's choices and are listed in
// the README.
package md_pkg;
  // Datapath width of the force pipeline (35-bit semi floating point).
  localparam int unsigned DATA_W  = 35;
  // Fixed-point coordinate width: a coordinate is an unsigned fraction of the
  // periodic box, so two's complement wrap-around gives the minimum image.
  localparam int unsigned POS_W   = 35;
  // Particle type index width (the evaluated protein uses 26 types).
  localparam int unsigned TYPE_W  = 5;
  // Interpolation table geometry.
  localparam int unsigned IVL_W   = 7;   // 128 intervals per section
  localparam int unsigned NSEC    = 16;  // sections per table
  localparam int unsigned SEC_W   = 4;
  localparam int unsigned X_W     = 35;  // width of the table input x = r^2
  localparam int unsigned T_W     = 24;  // normalised offset inside an interval
  // Semi floating point format: one shift selector per Horner addition plus
  // an output shift that brings the result into the integer domain.
  localparam int unsigned SSEL_W  = 3;
  localparam int unsigned OSH_W   = 6;
  localparam int unsigned NSHIFT  = 8;
  // Interpolation pipeline latency (memory read + three multiply-add stages).
  localparam int unsigned IP_LAT  = 4;
  // Force pipeline latency from a pair entering to its force leaving.
  localparam int unsigned FP_LAT  = 9;

  typedef logic signed [DATA_W-1:0] data_t;

  typedef struct packed {
    logic [SSEL_W-1:0] sel1;  // alignment of C3*t onto C2
    logic [SSEL_W-1:0] sel2;  // alignment of (..)*t onto C1
    logic [SSEL_W-1:0] sel3;  // alignment of (..)*t onto C0
    logic [OSH_W-1:0]  osh;   // right shift from C0 scale to the integer scale
  } sfp_fmt_t;

  typedef struct packed {
    data_t    c3, c2, c1, c0;
    sfp_fmt_t fmt;
  } coef_t;

  typedef struct packed {
    logic [POS_W-1:0]  x, y, z;
    logic [TYPE_W-1:0] t;
  } particle_t;

  typedef struct packed {
    data_t x, y, z;
  } vec_t;

  // Per type-pair force-field parameters: A = 12 eps sigma^12,
  // B = 6 eps sigma^6, QQ = q_a q_b, plus output shifts of the three products.
  typedef struct packed {
    data_t a, b, qq;
  } pair_param_t;

  // Hardwired alignment shifts of the semi floating point adder.
  function automatic int unsigned sfp_shift(input logic [SSEL_W-1:0] sel);
    case (sel)
      3'd0: return 0;
      3'd1: return 1;
      3'd2: return 2;
      3'd3: return 3;
      3'd4: return 4;
      3'd5: return 6;
      3'd6: return 8;
      default: return 12;
    endcase
  endfunction
endpackage
