// force_array: the force pipeline array. N force pipelines share one particle
// i (the Pi register, selected from the N-entry Pi array) and each gets its own
// particle j (the N Pj registers, one row of cell B). Every cycle:
//   - each pipeline's force on j, negated, is accumulated straight into the
//     acceleration memory row of the cell-B particles (Newton's third law);
//   - the N forces on i are summed by the adder tree and added into the Pi
//     acceleration array entry of the current Pi lane.
// On write-back (step 4 of the pair controller) the Pi acceleration array is
// added into the acceleration memory row of the cell-A particles and cleared.
// The organisation follows the document's force pipeline array; adding (rather
// than storing) at write-back is this design's choice, so that forces that
// cell-A particles received as j particles earlier are kept.
// Timing: Pi array loads one cycle after pi_load (pos_mem read latency); an
// issue at cycle s reaches the pipelines at s+1, updates cell-B rows at
// s+1+FP_LAT and the Pi array entry at s+2+FP_LAT.
module force_array
  import md_pkg::*;
#(
  parameter int unsigned N      = 2,
  parameter int unsigned ROWS   = 2048 / N,
  parameter int unsigned R2_SH  = 32,
  parameter logic [70:0] RC2    = 71'(1) << 66,
  parameter int unsigned F_SH   = 34,
  parameter int unsigned TDEPTH = NSEC * (1 << IVL_W),
  parameter int unsigned TAW    = $clog2(TDEPTH),
  parameter int unsigned RW     = $clog2(ROWS),
  parameter int unsigned LW     = (N > 1) ? $clog2(N) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  // table and parameter load, broadcast to all pipelines
  input  logic [2:0]          tbl_we,
  input  logic [TAW-1:0]      tbl_waddr,
  input  coef_t               tbl_wdata,
  input  logic                prm_we,
  input  logic [2*TYPE_W-1:0] prm_waddr,
  input  pair_param_t         prm_wdata,
  // from the pair controller
  input  logic                pi_load,
  input  logic                iss_valid,
  input  logic [RW-1:0]       iss_row,
  input  logic [LW-1:0]       iss_li,
  input  logic [N-1:0]        iss_mask,
  input  logic                wb_valid,
  input  logic [RW-1:0]       wb_row,
  // from the position memory (registered read data)
  input  particle_t           rdata_a [N],
  input  particle_t           rdata_b [N],
  // to the acceleration memory accumulate port
  output logic                acc_en,
  output logic [RW-1:0]       acc_row,
  output logic [N-1:0]        acc_lane_en,
  output vec_t                acc_val [N],
  // statistics: pairs inside the cut-off completed this cycle
  output logic [LW:0]         hits
);
  // Pi array
  particle_t pi_arr [N];
  logic      pi_load_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pi_load_d <= 1'b0;
    else        pi_load_d <= pi_load;
  end
  always_ff @(posedge clk) begin
    if (pi_load_d) pi_arr <= rdata_a;
  end

  // issue aligned with the Pj registers (pos_mem output)
  logic          v1;
  logic [RW-1:0] row1;
  logic [LW-1:0] li1;
  logic [N-1:0]  mask1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; row1 <= '0; li1 <= '0; mask1 <= '0;
    end else begin
      v1 <= iss_valid; row1 <= iss_row; li1 <= iss_li; mask1 <= iss_valid ? iss_mask : '0;
    end
  end

  particle_t pi_sel;
  assign pi_sel = pi_arr[li1];

  // the force pipelines
  logic [N-1:0] fvalid, fhit;
  vec_t         fout [N];
  for (genvar k = 0; k < N; k++) begin : g_pipe
    force_pipe #(.R2_SH(R2_SH), .RC2(RC2), .F_SH(F_SH), .TDEPTH(TDEPTH), .TAW(TAW)) u_fp (
      .clk(clk), .rst_n(rst_n),
      .tbl_we(tbl_we), .tbl_waddr(tbl_waddr), .tbl_wdata(tbl_wdata),
      .prm_we(prm_we), .prm_waddr(prm_waddr), .prm_wdata(prm_wdata),
      .in_valid(v1), .in_mask(mask1[k]), .pi(pi_sel), .pj(rdata_b[k]),
      .out_valid(fvalid[k]), .out_hit(fhit[k]), .f(fout[k])
    );
  end

  // tags travelling with the pairs
  logic [RW-1:0] rowf;
  logic [LW-1:0] lif;
  logic [N-1:0]  maskf;
  delay_line #(.W(RW + LW + N), .D(FP_LAT)) u_tag (
    .clk(clk), .rst_n(rst_n), .d({row1, li1, mask1}), .q({rowf, lif, maskf})
  );

  // adder tree for the force on Pi
  logic  tvalid;
  vec_t  tsum;
  logic [LW-1:0] lit;
  adder_tree #(.N(N)) u_tree (
    .clk(clk), .rst_n(rst_n), .in_valid(fvalid[0]), .in(fout),
    .out_valid(tvalid), .sum(tsum)
  );
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lit <= '0;
    else        lit <= lif;
  end

  // Pi acceleration array
  vec_t pi_acc [N];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(N); k++) pi_acc[k] <= '0;
    end else if (wb_valid) begin
      for (int k = 0; k < int'(N); k++) pi_acc[k] <= '0;
    end else if (tvalid) begin
      pi_acc[lit].x <= pi_acc[lit].x + tsum.x;
      pi_acc[lit].y <= pi_acc[lit].y + tsum.y;
      pi_acc[lit].z <= pi_acc[lit].z + tsum.z;
    end
  end

  // accumulate port: cell-B results, or the Pi write-back
  always_comb begin
    acc_en      = wb_valid || (fvalid[0] && (maskf != '0));
    acc_row     = wb_valid ? wb_row : rowf;
    acc_lane_en = wb_valid ? '1 : maskf;
    for (int k = 0; k < int'(N); k++) begin
      if (wb_valid) acc_val[k] = pi_acc[k];
      else begin
        acc_val[k].x = -fout[k].x;
        acc_val[k].y = -fout[k].y;
        acc_val[k].z = -fout[k].z;
      end
    end
    hits = '0;
    for (int k = 0; k < int'(N); k++) hits = hits + (LW+1)'(fvalid[k] && fhit[k]);
  end

  // the write-back only happens once the pipelines are empty
  a_wb_drained: assert property (@(posedge clk) disable iff (!rst_n)
    wb_valid |-> !(fvalid[0] || tvalid));
endmodule
