// tb_md_top: end-to-end test of the coprocessor at reduced sizes (3x3x3 cells,
// 64-row memories, 8^3 grid, 3^3 kernel). Particles are downloaded as IEEE
// doubles through the converters into both engines; both engines run at the
// same time. Short-range forces are read back as doubles and checked against
// an all-pairs reference (bit-accurate model, tolerance one LSB per partner,
// see tb_sr_engine); long-range results against a real-arithmetic multigrid
// reference (tolerance 1e-3). Counts the mechanisms: drain stalls, padded
// rows, empty cells, cut-off drops, each multigrid phase, and the two
// engines overlapping; any that never happens is a failure.
module tb_md_top;
  import md_pkg::*;
  import md_ref_pkg::*;
  localparam int N = 2, CDIM = 3, NCELL = 27, ROWS = 64, NP = 64;
  localparam int GB = 3, G = 8, K = 3, R = 1, MAXC = 5;
  localparam int CW = 5, RW = 6, PW = 8, NPW = 6, KAW = 5;
  localparam longint CS = (64'd1 << 35) / CDIM;
  localparam logic [70:0] RC2 = 71'(1) << 66;
  localparam real S = 2.0 ** 24;
  logic clk = 0, rst_n = 0;
  logic p_we = 0, p_bad;
  logic [RW-1:0] p_row = '0, sr_rd_row = '0;
  logic p_lane = 0, sr_rd_lane = 0;
  logic [NPW-1:0] p_idx = '0, lr_rd_idx = '0;
  logic [63:0] p_x = '0, p_y = '0, p_z = '0, sr_rd_x, sr_rd_y, sr_rd_z, lr_rd;
  logic [TYPE_W-1:0] p_type = '0, chg_type = '0;
  logic cnt_we = 0, build = 0, sr_ready, sr_overflow;
  logic [CW-1:0] cnt_cell = '0;
  logic [PW-1:0] cnt_val = '0;
  logic [2:0] tbl_we = '0;
  logic [10:0] tbl_waddr = '0;
  coef_t tbl_wdata;
  logic prm_we = 0;
  logic [9:0] prm_waddr = '0;
  pair_param_t prm_wdata;
  logic chg_we = 0, ker_we = 0;
  data_t chg_data = '0, ker_data = '0;
  logic [KAW-1:0] ker_addr = '0;
  logic [NPW:0] np = '0;
  logic sr_start = 0, sr_busy, sr_done, lr_start = 0, lr_busy, lr_done;
  logic [2:0] lr_phase;
  logic [1:0] lr_rd_comp = '0, sr_hits;
  logic sr_draining, sr_issuing;
  int checks = 0, failures = 0;
  int n_drain = 0, n_issue = 0, n_hits = 0, n_pad = 0, n_empty = 0, n_overlap = 0;
  int phase_cycles [8];

  md_top #(.N(N), .CDIM(CDIM), .ROWS(ROWS), .NP(NP), .GB(GB), .K(K)) dut (.clk(clk), .rst_n(rst_n), .p_we(p_we), .p_row(p_row), .p_lane(p_lane),
    .p_idx(p_idx), .p_x(p_x), .p_y(p_y), .p_z(p_z), .p_type(p_type), .p_bad(p_bad),
    .cnt_we(cnt_we), .cnt_cell(cnt_cell), .cnt_val(cnt_val), .build(build), .sr_ready(sr_ready),
    .sr_overflow(sr_overflow), .tbl_we(tbl_we), .tbl_waddr(tbl_waddr), .tbl_wdata(tbl_wdata),
    .prm_we(prm_we), .prm_waddr(prm_waddr), .prm_wdata(prm_wdata), .chg_we(chg_we),
    .chg_type(chg_type), .chg_data(chg_data), .ker_we(ker_we), .ker_addr(ker_addr),
    .ker_data(ker_data), .np(np), .sr_start(sr_start), .sr_busy(sr_busy), .sr_done(sr_done),
    .lr_start(lr_start), .lr_busy(lr_busy), .lr_done(lr_done), .lr_phase(lr_phase),
    .sr_rd_row(sr_rd_row), .sr_rd_lane(sr_rd_lane), .sr_rd_x(sr_rd_x), .sr_rd_y(sr_rd_y),
    .sr_rd_z(sr_rd_z), .lr_rd_idx(lr_rd_idx), .lr_rd_comp(lr_rd_comp), .lr_rd(lr_rd),
    .sr_hits(sr_hits), .sr_draining(sr_draining), .sr_issuing(sr_issuing));

  always #5 clk = ~clk;
  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(posedge clk) begin
    if (sr_draining) n_drain++;
    if (sr_issuing)  n_issue++;
    n_hits += int'(sr_hits);
    if (sr_busy && lr_busy) n_overlap++;
    if (rst_n && lr_busy) phase_cycles[lr_phase]++;
  end

  function automatic real bs(input int k, input real w);
    case (k)
      0: return (1.0 - w) ** 3 / 6.0;
      1: return (3.0 * w ** 3 - 6.0 * w ** 2 + 4.0) / 6.0;
      2: return (-3.0 * w ** 3 + 3.0 * w ** 2 + 3.0 * w + 1.0) / 6.0;
      default: return w ** 3 / 6.0;
    endcase
  endfunction
  function automatic real dbs(input int k, input real w);
    case (k)
      0: return -((1.0 - w) ** 2) / 2.0;
      1: return (3.0 * w ** 2 - 4.0 * w) / 2.0;
      2: return (-3.0 * w ** 2 + 2.0 * w + 1.0) / 2.0;
      default: return w ** 2 / 2.0;
    endcase
  endfunction
  function automatic logic near(input longint got, input longint e, input int tol);
    longint d;
    d = longint'(data_t'(got - e));
    return (d <= tol) && (d >= -tol);
  endfunction
  // quick minimum-image test before the full reference evaluation
  function automatic logic close(input particle_t a, input particle_t b);
    logic signed [POS_W-1:0] d [3];
    logic [70:0] r2;
    d[0] = POS_W'(a.x - b.x); d[1] = POS_W'(a.y - b.y); d[2] = POS_W'(a.z - b.z);
    r2 = '0;
    for (int i = 0; i < 3; i++) r2 += 71'($signed(d[i]) * $signed(d[i]));
    return r2 < RC2;
  endfunction

  particle_t parts [$];
  int prow [$], plane [$];
  real qt [32];
  real h [K][K][K];
  real qg [G][G][G], vg [G][G][G];

  initial begin
    int row;
    fill_tables();
    for (int a = 0; a < 32; a++)
      for (int b = 0; b < a; b++) prm[{5'(b), 5'(a)}] = prm[{5'(a), 5'(b)}];
    for (int t = 0; t < 32; t++) qt[t] = real'(int'($urandom_range(0, 2000)) - 1000) / 1000.0;
    for (int a = 0; a < K; a++) for (int b = 0; b < K; b++) for (int c = 0; c < K; c++)
      h[a][b][c] = real'(int'($urandom_range(0, 2000)) - 1000) / 4000.0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // short-range tables and parameters
    for (int k = 0; k < 3; k++)
      for (int a = 0; a < TDEPTH; a++) begin
        @(negedge clk); tbl_we = 3'(1 << k); tbl_waddr = 11'(a); tbl_wdata = tab[k][a];
      end
    @(negedge clk) tbl_we = '0;
    for (int a = 0; a < 1024; a++) begin
      @(negedge clk); prm_we = 1; prm_waddr = 10'(a); prm_wdata = prm[a];
    end
    @(negedge clk) prm_we = 0;
    // long-range charges and kernel
    for (int t = 0; t < 32; t++) begin
      @(negedge clk); chg_we = 1; chg_type = 5'(t); chg_data = data_t'(longint'(qt[t] * S));
      qt[t] = real'(longint'(chg_data)) / S;
    end
    @(negedge clk) chg_we = 0;
    for (int a = 0; a < K; a++) for (int b = 0; b < K; b++) for (int c = 0; c < K; c++) begin
      @(negedge clk); ker_we = 1; ker_addr = KAW'(a * K * K + b * K + c);
      ker_data = data_t'(longint'(h[a][b][c] * S));
      h[a][b][c] = real'(longint'(ker_data)) / S;
    end
    @(negedge clk) ker_we = 0;
    // particles, grouped by cell, sent as doubles (fractions of the box)
    row = 0;
    for (int c = 0; c < NCELL; c++) begin
      int cnt, cx, cy, cz;
      cnt = $urandom_range(0, MAXC);
      if (c == 0) cnt = 3;
      if (row + (cnt + N - 1) / N > ROWS || parts.size() + cnt > NP) cnt = 0;
      cx = c % CDIM; cy = (c / CDIM) % CDIM; cz = c / (CDIM * CDIM);
      if (cnt == 0) n_empty++;
      if (cnt % N != 0) n_pad++;
      @(negedge clk); cnt_we = 1; cnt_cell = CW'(c); cnt_val = PW'(cnt);
      @(negedge clk); cnt_we = 0;
      for (int k = 0; k < cnt; k++) begin
        particle_t p;
        p.x = POS_W'(longint'(cx) * CS + longint'({$urandom, $urandom} % CS));
        p.y = POS_W'(longint'(cy) * CS + longint'({$urandom, $urandom} % CS));
        p.z = POS_W'(longint'(cz) * CS + longint'({$urandom, $urandom} % CS));
        p.t = TYPE_W'($urandom_range(0, 25));
        @(negedge clk);
        p_we = 1; p_row = RW'(row + k / N); p_lane = 1'(k % N); p_idx = NPW'(parts.size());
        p_x = $realtobits(real'(p.x) / (2.0 ** 35));
        p_y = $realtobits(real'(p.y) / (2.0 ** 35));
        p_z = $realtobits(real'(p.z) / (2.0 ** 35));
        p_type = p.t;
        parts.push_back(p); prow.push_back(row + k / N); plane.push_back(k % N);
        @(negedge clk); p_we = 0;
        checks++;
        if (p_bad) failures++;
      end
      row += (cnt + N - 1) / N;
    end
    np = (NPW+1)'(parts.size());
    @(negedge clk) build = 1;
    @(negedge clk) build = 0;
    wait (sr_ready);
    @(negedge clk) begin sr_start = 1; lr_start = 1; end
    @(negedge clk) begin sr_start = 0; lr_start = 0; end
    fork
      wait (sr_done);
      wait (lr_done);
    join
    repeat (2) @(negedge clk);
    // ---- short-range check
    for (int i = 0; i < parts.size(); i++) begin
      longint ex, ey, ez;
      int partners;
      ex = 0; ey = 0; ez = 0; partners = 0;
      for (int j = 0; j < parts.size(); j++) begin
        vec_t f;
        if (j == i || !close(parts[i], parts[j])) continue;
        if (pair_force(parts[i], parts[j], 1'b1, RC2, 32, 34, f)) begin
          partners++;
          ex += longint'(f.x); ey += longint'(f.y); ez += longint'(f.z);
        end
      end
      sr_rd_row = RW'(prow[i]); sr_rd_lane = 1'(plane[i]);
      @(posedge clk); #1;
      checks++;
      if (!near(longint'($bitstoreal(sr_rd_x) * (2.0 ** 20)), ex, partners) ||
          !near(longint'($bitstoreal(sr_rd_y) * (2.0 ** 20)), ey, partners) ||
          !near(longint'($bitstoreal(sr_rd_z) * (2.0 ** 20)), ez, partners)) begin
        failures++;
        if (failures < 10) $display("FAIL short-range particle %0d", i);
      end
    end
    // ---- long-range reference
    for (int x = 0; x < G; x++) for (int y = 0; y < G; y++) for (int z = 0; z < G; z++) qg[x][y][z] = 0.0;
    for (int p = 0; p < parts.size(); p++) begin
      int bx, by, bz;
      real wx, wy, wz, q;
      bx = int'(parts[p].x >> (35 - GB)); wx = real'((parts[p].x >> (11 - GB)) & 35'hff_ffff) / S;
      by = int'(parts[p].y >> (35 - GB)); wy = real'((parts[p].y >> (11 - GB)) & 35'hff_ffff) / S;
      bz = int'(parts[p].z >> (35 - GB)); wz = real'((parts[p].z >> (11 - GB)) & 35'hff_ffff) / S;
      q = qt[parts[p].t];
      for (int a = 0; a < 4; a++) for (int b = 0; b < 4; b++) for (int c = 0; c < 4; c++)
        qg[(bx + a + G - 1) % G][(by + b + G - 1) % G][(bz + c + G - 1) % G] += q * bs(a, wx) * bs(b, wy) * bs(c, wz);
    end
    for (int x = 0; x < G; x++) for (int y = 0; y < G; y++) for (int z = 0; z < G; z++) begin
      vg[x][y][z] = 0.0;
      for (int kz = 0; kz < K; kz++) for (int ky = 0; ky < K; ky++) for (int kx = 0; kx < K; kx++)
        vg[x][y][z] += h[kz][ky][kx] * qg[(x + R - kx + G) % G][(y + R - ky + G) % G][(z + R - kz + G) % G];
    end
    for (int p = 0; p < parts.size(); p++) begin
      int bx, by, bz;
      real wx, wy, wz, q, e [4];
      bx = int'(parts[p].x >> (35 - GB)); wx = real'((parts[p].x >> (11 - GB)) & 35'hff_ffff) / S;
      by = int'(parts[p].y >> (35 - GB)); wy = real'((parts[p].y >> (11 - GB)) & 35'hff_ffff) / S;
      bz = int'(parts[p].z >> (35 - GB)); wz = real'((parts[p].z >> (11 - GB)) & 35'hff_ffff) / S;
      q = qt[parts[p].t];
      e = '{0.0, 0.0, 0.0, 0.0};
      for (int a = 0; a < 4; a++) for (int b = 0; b < 4; b++) for (int c = 0; c < 4; c++) begin
        real v;
        v = vg[(bx + a + G - 1) % G][(by + b + G - 1) % G][(bz + c + G - 1) % G];
        e[0] += q * v * bs(a, wx) * bs(b, wy) * bs(c, wz);
        e[1] -= q * v * dbs(a, wx) * bs(b, wy) * bs(c, wz);
        e[2] -= q * v * bs(a, wx) * dbs(b, wy) * bs(c, wz);
        e[3] -= q * v * bs(a, wx) * bs(b, wy) * dbs(c, wz);
      end
      for (int m = 0; m < 4; m++) begin
        real got;
        lr_rd_idx = NPW'(p); lr_rd_comp = 2'(m);
        @(posedge clk); #1;
        got = $bitstoreal(lr_rd);
        checks++;
        if ((got - e[m]) ** 2 > 1.0e-6) begin
          failures++;
          if (failures < 10) $display("FAIL long-range particle %0d comp %0d: %f exp %f", p, m, got, e[m]);
        end
      end
    end
    $display("particles %0d; short range: issued rows %0d, pairs in range %0d, drain cycles %0d, padded cells %0d, empty cells %0d",
      parts.size(), n_issue, n_hits, n_drain, n_pad, n_empty);
    $display("long range: clear %0d, assign %0d, conv %0d, interp %0d cycles; engines overlapped %0d cycles",
      phase_cycles[1], phase_cycles[2], phase_cycles[3], phase_cycles[4], n_overlap);
    checks++;
    if (n_drain == 0 || n_issue == 0 || n_hits == 0 || n_pad == 0 || n_empty == 0 ||
        n_hits >= n_issue * N || sr_overflow || phase_cycles[1] == 0 || phase_cycles[2] == 0 ||
        phase_cycles[4] == 0 || phase_cycles[3] != (G + 2 * R) ** 3 || n_overlap == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
