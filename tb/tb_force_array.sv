// tb_force_array: drives the force pipeline array as the pair controller
// would (load a Pi row, issue rows of B for each Pi lane with random lane
// masks, drain, write back), with a behavioural position memory and an
// acceleration memory model fed from the accumulate port. The final
// accelerations must equal, exactly, the sum over the issued pairs of +f(i,j)
// on i and -f(i,j) on j from the reference model.
module tb_force_array;
  import md_pkg::*;
  import md_ref_pkg::*;
  localparam int N = 2, ROWS = 16, RW = 4;
  localparam logic [70:0] RC2 = 71'(1) << 66;
  logic clk = 0, rst_n = 0;
  logic [2:0] tbl_we = '0;
  logic [10:0] tbl_waddr = '0;
  coef_t tbl_wdata;
  logic prm_we = 0;
  logic [9:0] prm_waddr = '0;
  pair_param_t prm_wdata;
  logic pi_load = 0, iss_valid = 0, wb_valid = 0, acc_en;
  logic [RW-1:0] iss_row = '0, wb_row = '0, acc_row, pi_row = '0;
  logic iss_li = 0;
  logic [N-1:0] iss_mask = '0, acc_lane_en;
  particle_t rdata_a [N], rdata_b [N];
  vec_t acc_val [N];
  logic [1:0] hits;
  particle_t pmem [ROWS][N];
  longint accm [ROWS][N][3];
  longint refm [ROWS][N][3];
  int checks = 0, failures = 0;

  force_array #(.N(N), .ROWS(ROWS)) dut (.clk(clk), .rst_n(rst_n), .tbl_we(tbl_we),
    .tbl_waddr(tbl_waddr), .tbl_wdata(tbl_wdata), .prm_we(prm_we), .prm_waddr(prm_waddr),
    .prm_wdata(prm_wdata), .pi_load(pi_load), .iss_valid(iss_valid), .iss_row(iss_row),
    .iss_li(iss_li), .iss_mask(iss_mask), .wb_valid(wb_valid), .wb_row(wb_row),
    .rdata_a(rdata_a), .rdata_b(rdata_b), .acc_en(acc_en), .acc_row(acc_row),
    .acc_lane_en(acc_lane_en), .acc_val(acc_val), .hits(hits));

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // behavioural position memory (one-cycle read) and acceleration memory
  always @(posedge clk) begin
    for (int k = 0; k < N; k++) begin
      rdata_a[k] <= pmem[pi_row][k];
      rdata_b[k] <= pmem[iss_row][k];
    end
    if (acc_en)
      for (int k = 0; k < N; k++) if (acc_lane_en[k]) begin
        accm[acc_row][k][0] += longint'(acc_val[k].x);
        accm[acc_row][k][1] += longint'(acc_val[k].y);
        accm[acc_row][k][2] += longint'(acc_val[k].z);
      end
  end

  initial begin
    fill_tables();
    for (int r = 0; r < ROWS; r++)
      for (int k = 0; k < N; k++) begin
        // all particles in one small region so that most pairs interact
        pmem[r][k].x = POS_W'(35'h1_0000_0000 + ({$urandom, $urandom} % (64'd1 << 32)));
        pmem[r][k].y = POS_W'(35'h1_0000_0000 + ({$urandom, $urandom} % (64'd1 << 32)));
        pmem[r][k].z = POS_W'(35'h1_0000_0000 + ({$urandom, $urandom} % (64'd1 << 32)));
        pmem[r][k].t = TYPE_W'($urandom);
        for (int c = 0; c < 3; c++) begin
          accm[r][k][c] = 0; refm[r][k][c] = 0;
        end
      end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 3; k++)
      for (int a = 0; a < TDEPTH; a++) begin
        @(negedge clk); tbl_we = 3'(1 << k); tbl_waddr = 11'(a); tbl_wdata = tab[k][a];
      end
    @(negedge clk) tbl_we = '0;
    for (int a = 0; a < 1024; a++) begin
      @(negedge clk); prm_we = 1; prm_waddr = 10'(a); prm_wdata = prm[a];
    end
    @(negedge clk) prm_we = 0;
    // rows 0..3 play cell A, rows 4..15 cell B
    for (int ra = 0; ra < 4; ra++) begin
      @(negedge clk); pi_load = 1; pi_row = RW'(ra);
      @(negedge clk); pi_load = 0;
      for (int li = 0; li < N; li++)
        for (int rb = 4; rb < ROWS; rb++) begin
          iss_valid = 1; iss_row = RW'(rb); iss_li = li[0]; iss_mask = N'($urandom);
          for (int k = 0; k < N; k++) begin
            vec_t f;
            void'(pair_force(pmem[ra][li], pmem[rb][k], iss_mask[k], RC2, 32, 34, f));
            if (iss_mask[k]) begin
              refm[ra][li][0] += longint'(f.x); refm[ra][li][1] += longint'(f.y); refm[ra][li][2] += longint'(f.z);
              refm[rb][k][0] -= longint'(f.x); refm[rb][k][1] -= longint'(f.y); refm[rb][k][2] -= longint'(f.z);
            end
          end
          @(negedge clk);
        end
      iss_valid = 0;
      repeat (FP_LAT + 3) @(negedge clk);
      wb_valid = 1; wb_row = RW'(pi_row);
      @(negedge clk); wb_valid = 0;
    end
    repeat (3) @(negedge clk);
    for (int r = 0; r < ROWS; r++)
      for (int k = 0; k < N; k++)
        for (int c = 0; c < 3; c++) begin
          checks++;
          if (data_t'(accm[r][k][c]) != data_t'(refm[r][k][c])) begin
            failures++;
            if (failures < 10) $display("FAIL row %0d lane %0d comp %0d: %0d exp %0d", r, k, c,
              data_t'(accm[r][k][c]), data_t'(refm[r][k][c]));
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
