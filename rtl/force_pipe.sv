// force_pipe: one non-bonded force pipeline (Lennard-Jones plus the
// short-range Coulomb term) for a particle pair (i, j):
//   F/r = A*r^-14 - B*r^-8 + QQ*r^-3,   f_i = (F/r) * (r_i - r_j)
// with A = 12 eps sigma^12, B = 6 eps sigma^6 and QQ = q_a q_b taken from a
// type-pair parameter memory. The three powers of r are interpolated from
// r^2 by three table pipelines (interp_pipe). Coordinates are unsigned
// fractions of a periodic box, so the wrapped difference is the minimum image.
// A pair is dropped (zero force) when the caller masks it, when r^2 is at or
// beyond the cut-off RC2, or when it lies below the table's first section.
// The structure (table look-up, semi floating point inside the interpolation,
// integer units where no precision is lost) follows the document; the number
// of stages, the scalings R2_SH and F_SH and the zero-force masking are this
// design's choices. The force on j is -f.
// Timing: one pair per cycle, result FP_LAT = 9 cycles after the input.
module force_pipe
  import md_pkg::*;
#(
  parameter int unsigned     R2_SH = 32,            // r^2 -> table input x
  parameter logic [70:0]     RC2   = 71'(1) << 66,  // cut-off radius squared
  parameter int unsigned     F_SH  = 34,            // (F/r)*d -> force scale
  parameter int unsigned     TDEPTH = NSEC * (1 << IVL_W),
  parameter int unsigned     TAW    = $clog2(TDEPTH)
) (
  input  logic                clk,
  input  logic                rst_n,
  // table and parameter load ports (from the host)
  input  logic [2:0]          tbl_we,      // [0] r^-14, [1] r^-8, [2] r^-3
  input  logic [TAW-1:0]      tbl_waddr,
  input  coef_t               tbl_wdata,
  input  logic                prm_we,
  input  logic [2*TYPE_W-1:0] prm_waddr,   // {type_a, type_b}
  input  pair_param_t         prm_wdata,
  // pair stream
  input  logic                in_valid,
  input  logic                in_mask,     // 1: compute this pair
  input  particle_t           pi,
  input  particle_t           pj,
  output logic                out_valid,
  output logic                out_hit,     // pair was inside the cut-off
  output vec_t                f
);
  typedef logic signed [POS_W-1:0] dpos_t;

  // parameter memory, synchronous read
  pair_param_t prm_mem [1 << (2*TYPE_W)];
  pair_param_t prm1;
  always_ff @(posedge clk) begin
    if (prm_we) prm_mem[prm_waddr] <= prm_wdata;
    prm1 <= prm_mem[{pi.t, pj.t}];
  end

  // stage 1: coordinate differences
  dpos_t dx1, dy1, dz1;
  logic  v1, m1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; m1 <= 1'b0; dx1 <= '0; dy1 <= '0; dz1 <= '0;
    end else begin
      v1  <= in_valid;
      m1  <= in_mask;
      dx1 <= dpos_t'(pi.x - pj.x);
      dy1 <= dpos_t'(pi.y - pj.y);
      dz1 <= dpos_t'(pi.z - pj.z);
    end
  end

  // stage 2: r^2
  logic [70:0] r2;
  dpos_t       dx2, dy2, dz2;
  pair_param_t prm2;
  logic        v2, m2;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v2 <= 1'b0; m2 <= 1'b0; r2 <= '0; dx2 <= '0; dy2 <= '0; dz2 <= '0; prm2 <= '0;
    end else begin
      v2   <= v1;
      m2   <= m1;
      r2   <= 71'(dx1 * dx1) + 71'(dy1 * dy1) + 71'(dz1 * dz1);
      dx2  <= dx1; dy2 <= dy1; dz2 <= dz1;
      prm2 <= prm1;
    end
  end

  logic          cut2;
  logic [70:0]   r2s;
  logic [X_W-1:0] x2;
  assign cut2 = (r2 >= RC2);
  assign r2s  = r2 >> R2_SH;
  assign x2   = cut2 ? '0 : X_W'(r2s);

  // stages 3..6: three table interpolations
  data_t            y [3];
  logic [OSH_W-1:0] osh [3];
  logic [2:0]       under, ivalid;
  for (genvar k = 0; k < 3; k++) begin : g_tbl
    interp_pipe #(.DEPTH(TDEPTH), .AW(TAW)) u_ip (
      .clk(clk), .rst_n(rst_n),
      .tbl_we(tbl_we[k]), .tbl_waddr(tbl_waddr), .tbl_wdata(tbl_wdata),
      .in_valid(v2), .x(x2),
      .out_valid(ivalid[k]), .y(y[k]), .osh(osh[k]), .under(under[k])
    );
  end

  // side band delayed along the interpolation
  localparam int unsigned SBW = 3*POS_W + $bits(pair_param_t) + 2;
  logic [SBW-1:0] sb6;
  dpos_t       dx6, dy6, dz6;
  pair_param_t prm6;
  logic        m6, cut6;
  delay_line #(.W(SBW), .D(IP_LAT)) u_sb (
    .clk(clk), .rst_n(rst_n),
    .d({dx2, dy2, dz2, prm2, m2, cut2}), .q(sb6)
  );
  assign {dx6, dy6, dz6, prm6, m6, cut6} = sb6;

  function automatic data_t scale(input data_t p, input data_t v, input logic [OSH_W-1:0] sh);
    logic signed [2*DATA_W-1:0] prod;
    prod = p * v;
    return data_t'(prod >>> sh);
  endfunction

  // stage 7: parameter products
  data_t t14, t8, t3;
  dpos_t dx7, dy7, dz7;
  logic  v7, ok7;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v7 <= 1'b0; ok7 <= 1'b0; t14 <= '0; t8 <= '0; t3 <= '0;
      dx7 <= '0; dy7 <= '0; dz7 <= '0;
    end else begin
      v7  <= ivalid[0];
      ok7 <= m6 && !cut6 && (under == 3'b000);
      t14 <= scale(prm6.a,  y[0], osh[0]);
      t8  <= scale(prm6.b,  y[1], osh[1]);
      t3  <= scale(prm6.qq, y[2], osh[2]);
      dx7 <= dx6; dy7 <= dy6; dz7 <= dz6;
    end
  end

  // stage 8: combine (integer unit)
  data_t fr8;
  dpos_t dx8, dy8, dz8;
  logic  v8, ok8;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v8 <= 1'b0; ok8 <= 1'b0; fr8 <= '0; dx8 <= '0; dy8 <= '0; dz8 <= '0;
    end else begin
      v8  <= v7;
      ok8 <= ok7;
      fr8 <= ok7 ? (t14 - t8 + t3) : '0;
      dx8 <= dx7; dy8 <= dy7; dz8 <= dz7;
    end
  end

  function automatic data_t fcomp(input data_t fr, input dpos_t d);
    logic signed [DATA_W+POS_W-1:0] prod;
    prod = fr * d;
    return data_t'(prod >>> F_SH);
  endfunction

  // stage 9: vector product
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_hit <= 1'b0; f <= '0;
    end else begin
      out_valid <= v8;
      out_hit   <= ok8;
      f.x <= fcomp(fr8, dx8);
      f.y <= fcomp(fr8, dy8);
      f.z <= fcomp(fr8, dz8);
    end
  end
endmodule
