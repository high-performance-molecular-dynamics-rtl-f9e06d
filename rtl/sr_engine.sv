// sr_engine: the short-range force engine (one FPGA in the document's system).
// The host downloads particles grouped by cell into the position memory, the
// particle-per-cell counts into the two-level indexing logic, the
// interpolation tables and the type-pair parameters; after `start` the pair
// controller clears the acceleration memory, walks all neighbouring cell
// pairs and drives the force pipeline array, whose results accumulate in the
// acceleration memory for the host to read back.
// Interface: simple write strobes for each memory, start/busy/done, and a
// synchronous (1-cycle) acceleration read port. Defaults: N = 2 pipelines
// (the number that fits a VP70 at 35 bits), 2048 particles, 4x4x4 cells.
module sr_engine
  import md_pkg::*;
#(
  parameter int unsigned N      = 2,
  parameter int unsigned CDIM   = 4,
  parameter int unsigned NCELL  = CDIM * CDIM * CDIM,
  parameter int unsigned ROWS   = 2048 / N,
  parameter int unsigned R2_SH  = 32,
  parameter logic [70:0] RC2    = 71'(1) << 66,
  parameter int unsigned F_SH   = 34,
  parameter int unsigned TDEPTH = NSEC * (1 << IVL_W),
  parameter int unsigned TAW    = $clog2(TDEPTH),
  parameter int unsigned CW     = $clog2(NCELL),
  parameter int unsigned RW     = $clog2(ROWS),
  parameter int unsigned PW     = $clog2(ROWS * N) + 1,
  parameter int unsigned LW     = (N > 1) ? $clog2(N) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  // particle download
  input  logic                pos_we,
  input  logic [RW-1:0]       pos_row,
  input  logic [LW-1:0]       pos_lane,
  input  particle_t           pos_data,
  // particle-per-cell counts
  input  logic                cnt_we,
  input  logic [CW-1:0]       cnt_cell,
  input  logic [PW-1:0]       cnt_val,
  input  logic                build,
  output logic                ready,
  output logic                overflow,
  // tables and parameters
  input  logic [2:0]          tbl_we,
  input  logic [TAW-1:0]      tbl_waddr,
  input  coef_t               tbl_wdata,
  input  logic                prm_we,
  input  logic [2*TYPE_W-1:0] prm_waddr,
  input  pair_param_t         prm_wdata,
  // control
  input  logic                start,
  output logic                busy,
  output logic                done,
  // result read-back
  input  logic [RW-1:0]       rd_row,
  input  logic [LW-1:0]       rd_lane,
  output vec_t                rd_data,
  // activity
  output logic [LW:0]         hits,
  output logic                draining,
  output logic                issuing
);
  logic [CW-1:0] cell_a, cell_b;
  logic [RW-1:0] base_a, base_b;
  logic [RW:0]   rows_a, rows_b;
  logic [PW-1:0] count_a, count_b;
  logic          clr_en, pi_load, iss_valid, wb_valid;
  logic [RW-1:0] clr_row, pi_row, iss_row, wb_row;
  logic [LW-1:0] iss_li;
  logic [N-1:0]  iss_mask;
  particle_t     rdata_a [N], rdata_b [N];
  logic          acc_en;
  logic [RW-1:0] acc_row;
  logic [N-1:0]  acc_lane_en;
  vec_t          acc_val [N];

  cell_index #(.N(N), .NCELL(NCELL), .ROWS(ROWS), .CW(CW), .RW(RW), .PW(PW)) u_idx (
    .clk(clk), .rst_n(rst_n),
    .cnt_we(cnt_we), .cnt_cell(cnt_cell), .cnt_val(cnt_val), .build(build),
    .ready(ready), .overflow(overflow),
    .cell_a(cell_a), .base_a(base_a), .rows_a(rows_a), .count_a(count_a),
    .cell_b(cell_b), .base_b(base_b), .rows_b(rows_b), .count_b(count_b)
  );

  pair_ctrl #(.N(N), .CDIM(CDIM), .NCELL(NCELL), .ROWS(ROWS), .CW(CW), .RW(RW), .PW(PW), .LW(LW)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(start), .busy(busy), .done(done),
    .cell_a(cell_a), .cell_b(cell_b),
    .base_a(base_a), .rows_a(rows_a), .count_a(count_a),
    .base_b(base_b), .rows_b(rows_b), .count_b(count_b),
    .clr_en(clr_en), .clr_row(clr_row),
    .pi_load(pi_load), .pi_row(pi_row),
    .iss_valid(iss_valid), .iss_row(iss_row), .iss_li(iss_li), .iss_mask(iss_mask),
    .wb_valid(wb_valid), .wb_row(wb_row), .draining(draining)
  );

  pos_mem #(.N(N), .ROWS(ROWS), .RW(RW), .LW(LW)) u_pos (
    .clk(clk), .we(pos_we), .wrow(pos_row), .wlane(pos_lane), .wdata(pos_data),
    .raddr_a(pi_row), .rdata_a(rdata_a), .raddr_b(iss_row), .rdata_b(rdata_b)
  );

  force_array #(.N(N), .ROWS(ROWS), .R2_SH(R2_SH), .RC2(RC2), .F_SH(F_SH),
                .TDEPTH(TDEPTH), .TAW(TAW), .RW(RW), .LW(LW)) u_arr (
    .clk(clk), .rst_n(rst_n),
    .tbl_we(tbl_we), .tbl_waddr(tbl_waddr), .tbl_wdata(tbl_wdata),
    .prm_we(prm_we), .prm_waddr(prm_waddr), .prm_wdata(prm_wdata),
    .pi_load(pi_load), .iss_valid(iss_valid), .iss_row(iss_row), .iss_li(iss_li),
    .iss_mask(iss_mask), .wb_valid(wb_valid), .wb_row(wb_row),
    .rdata_a(rdata_a), .rdata_b(rdata_b),
    .acc_en(acc_en), .acc_row(acc_row), .acc_lane_en(acc_lane_en), .acc_val(acc_val),
    .hits(hits)
  );

  acc_mem #(.N(N), .ROWS(ROWS), .RW(RW), .LW(LW)) u_acc (
    .clk(clk), .acc_en(acc_en), .acc_row(acc_row), .acc_lane_en(acc_lane_en),
    .acc_val(acc_val), .clr_en(clr_en), .clr_row(clr_row),
    .rd_row(rd_row), .rd_lane(rd_lane), .rd_data(rd_data)
  );

  assign issuing = iss_valid;
endmodule
