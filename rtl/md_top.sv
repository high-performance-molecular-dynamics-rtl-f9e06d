// md_top: the molecular-dynamics coprocessor. Two engines run side by side,
// as on the document's two-FPGA board: the short-range engine (cell lists,
// table-interpolated Lennard-Jones and Coulomb force pipelines) and the
// long-range multigrid engine. Both may run concurrently. The host talks in
// IEEE doubles: converters turn each downloaded coordinate into the
// fixed-point format and each result back into a double. A downloaded
// particle is written to both engines' position/type memories (they are
// duplicated): the short-range copy at its cell-ordered (row, lane) slot,
// the long-range copy at its index.
// Results: sr_rd_* returns a particle's short-range force (RFRAC fraction
// bits) one cycle after the address; lr_rd returns q*phi (comp 0) or a
// long-range force component (WF fraction bits).
// The host bus itself (PCI) is outside this module; its signals are the ports.
module md_top
  import md_pkg::*;
#(
  parameter int unsigned N      = 2,       // force pipelines
  parameter int unsigned CDIM   = 4,       // cells per box edge
  parameter int unsigned ROWS   = 2048 / N,
  parameter int unsigned NP     = 2048,    // long-range particle capacity
  parameter int unsigned GB     = 5,       // multigrid: 2^GB points per edge
  parameter int unsigned K      = 5,       // multigrid: kernel size
  parameter int unsigned RFRAC  = 20,      // fraction bits of the short-range results
  parameter int unsigned WF     = 24,      // fraction bits of the multigrid weights and results
  parameter int unsigned TDEPTH = NSEC * (1 << IVL_W),
  parameter int unsigned NCELL  = CDIM * CDIM * CDIM,
  parameter int unsigned TAW    = $clog2(TDEPTH),
  parameter int unsigned CW     = $clog2(NCELL),
  parameter int unsigned RW     = $clog2(ROWS),
  parameter int unsigned PW     = $clog2(ROWS * N) + 1,
  parameter int unsigned LW     = (N > 1) ? $clog2(N) : 1,
  parameter int unsigned NPW    = $clog2(NP)
) (
  input  logic                clk,
  input  logic                rst_n,
  // particle download (coordinates as fractions of the box, in doubles)
  input  logic                p_we,
  input  logic [RW-1:0]       p_row,
  input  logic [LW-1:0]       p_lane,
  input  logic [NPW-1:0]      p_idx,
  input  logic [63:0]         p_x, p_y, p_z,
  input  logic [TYPE_W-1:0]   p_type,
  output logic                p_bad,
  // short-range set-up
  input  logic                cnt_we,
  input  logic [CW-1:0]       cnt_cell,
  input  logic [PW-1:0]       cnt_val,
  input  logic                build,
  output logic                sr_ready,
  output logic                sr_overflow,
  input  logic [2:0]          tbl_we,
  input  logic [TAW-1:0]      tbl_waddr,
  input  coef_t               tbl_wdata,
  input  logic                prm_we,
  input  logic [2*TYPE_W-1:0] prm_waddr,
  input  pair_param_t         prm_wdata,
  // long-range set-up
  input  logic                chg_we,
  input  logic [TYPE_W-1:0]   chg_type,
  input  data_t               chg_data,
  input  logic                ker_we,
  input  logic [$clog2(K*K*K)-1:0] ker_addr,
  input  data_t               ker_data,
  input  logic [NPW:0]        np,
  // control
  input  logic                sr_start,
  output logic                sr_busy,
  output logic                sr_done,
  input  logic                lr_start,
  output logic                lr_busy,
  output logic                lr_done,
  output logic [2:0]          lr_phase,
  // read-back (doubles)
  input  logic [RW-1:0]       sr_rd_row,
  input  logic [LW-1:0]       sr_rd_lane,
  output logic [63:0]         sr_rd_x, sr_rd_y, sr_rd_z,
  input  logic [NPW-1:0]      lr_rd_idx,
  input  logic [1:0]          lr_rd_comp,
  output logic [63:0]         lr_rd,
  // activity of the short-range engine
  output logic [LW:0]         sr_hits,
  output logic                sr_draining,
  output logic                sr_issuing
);
  // host -> fixed-point converters
  particle_t      pfix;
  logic [2:0]     bad;
  dp_to_fix #(.W(POS_W), .FRAC(POS_W)) u_cx (.d(p_x), .q(pfix.x), .bad(bad[0]));
  dp_to_fix #(.W(POS_W), .FRAC(POS_W)) u_cy (.d(p_y), .q(pfix.y), .bad(bad[1]));
  dp_to_fix #(.W(POS_W), .FRAC(POS_W)) u_cz (.d(p_z), .q(pfix.z), .bad(bad[2]));
  assign pfix.t = p_type;
  assign p_bad  = p_we && (bad != '0);

  vec_t  sr_rd;
  data_t lr_res;

  sr_engine #(.N(N), .CDIM(CDIM), .NCELL(NCELL), .ROWS(ROWS), .TDEPTH(TDEPTH), .TAW(TAW),
              .CW(CW), .RW(RW), .PW(PW), .LW(LW)) u_sr (
    .clk(clk), .rst_n(rst_n),
    .pos_we(p_we), .pos_row(p_row), .pos_lane(p_lane), .pos_data(pfix),
    .cnt_we(cnt_we), .cnt_cell(cnt_cell), .cnt_val(cnt_val), .build(build),
    .ready(sr_ready), .overflow(sr_overflow),
    .tbl_we(tbl_we), .tbl_waddr(tbl_waddr), .tbl_wdata(tbl_wdata),
    .prm_we(prm_we), .prm_waddr(prm_waddr), .prm_wdata(prm_wdata),
    .start(sr_start), .busy(sr_busy), .done(sr_done),
    .rd_row(sr_rd_row), .rd_lane(sr_rd_lane), .rd_data(sr_rd),
    .hits(sr_hits), .draining(sr_draining), .issuing(sr_issuing)
  );

  lr_engine #(.GB(GB), .K(K), .NP(NP), .WF(WF), .NPW(NPW)) u_lr (
    .clk(clk), .rst_n(rst_n),
    .pos_we(p_we), .pos_addr(p_idx), .pos_data(pfix),
    .chg_we(chg_we), .chg_type(chg_type), .chg_data(chg_data),
    .ker_we(ker_we), .ker_addr(ker_addr), .ker_data(ker_data), .np(np),
    .start(lr_start), .busy(lr_busy), .done(lr_done), .phase(lr_phase),
    .res_addr(lr_rd_idx), .res_comp(lr_rd_comp), .res_data(lr_res)
  );

  // fixed-point -> host converters
  fix_to_dp #(.W(DATA_W), .FRAC(RFRAC)) u_ox (.q(sr_rd.x), .d(sr_rd_x));
  fix_to_dp #(.W(DATA_W), .FRAC(RFRAC)) u_oy (.q(sr_rd.y), .d(sr_rd_y));
  fix_to_dp #(.W(DATA_W), .FRAC(RFRAC)) u_oz (.q(sr_rd.z), .d(sr_rd_z));
  fix_to_dp #(.W(DATA_W), .FRAC(WF))    u_ol (.q(lr_res),  .d(lr_rd));
endmodule
