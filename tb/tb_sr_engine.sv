// tb_sr_engine: end-to-end test of the short-range engine on a 3x3x3-cell
// periodic box. Random particle counts per cell (0..5, so empty cells and
// padded rows occur), random positions inside each cell and random types
// are downloaded with random tables and symmetric type-pair parameters.
// After the run every particle's accumulated force is compared with an
// all-pairs reference over the whole periodic box (minimum image, same
// cut-off). The reference evaluates f(i,j) with the bit-accurate model; the
// engine computes each pair once and applies -f to the other particle, which
// can differ by one LSB per pair, so the tolerance is the particle's number
// of partners. Also counts drain stalls, padded rows, empty cells, issued
// pairs and pairs dropped by the cut-off, and fails if any never happened.
module tb_sr_engine;
  import md_pkg::*;
  import md_ref_pkg::*;
  localparam int N = 2, CDIM = 3, NCELL = 27, ROWS = 64;
  localparam int CW = 5, RW = 6, PW = 8;
  localparam longint CS = (64'd1 << 35) / CDIM;       // cell edge in position units
  localparam logic [70:0] RC2 = 71'(1) << 66;           // cut-off 2^33 < CS
  logic clk = 0, rst_n = 0;
  logic pos_we = 0, cnt_we = 0, build = 0, ready, overflow;
  logic [RW-1:0] pos_row = '0, rd_row = '0;
  logic pos_lane = 0, rd_lane = 0;
  particle_t pos_data;
  logic [CW-1:0] cnt_cell = '0;
  logic [PW-1:0] cnt_val = '0;
  logic [2:0] tbl_we = '0;
  logic [10:0] tbl_waddr = '0;
  coef_t tbl_wdata;
  logic prm_we = 0;
  logic [9:0] prm_waddr = '0;
  pair_param_t prm_wdata;
  logic start = 0, busy, done, draining, issuing;
  vec_t rd_data;
  logic [1:0] hits;
  int checks = 0, failures = 0;
  int n_drain = 0, n_issue = 0, n_hits = 0, n_pad = 0, n_empty = 0;

  sr_engine #(.N(N), .CDIM(CDIM), .ROWS(ROWS)) dut (.clk(clk), .rst_n(rst_n),
    .pos_we(pos_we), .pos_row(pos_row), .pos_lane(pos_lane), .pos_data(pos_data),
    .cnt_we(cnt_we), .cnt_cell(cnt_cell), .cnt_val(cnt_val), .build(build), .ready(ready),
    .overflow(overflow), .tbl_we(tbl_we), .tbl_waddr(tbl_waddr), .tbl_wdata(tbl_wdata),
    .prm_we(prm_we), .prm_waddr(prm_waddr), .prm_wdata(prm_wdata), .start(start),
    .busy(busy), .done(done), .rd_row(rd_row), .rd_lane(rd_lane), .rd_data(rd_data),
    .hits(hits), .draining(draining), .issuing(issuing));

  always #5 clk = ~clk;
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(posedge clk) begin
    if (draining) n_drain++;
    if (issuing)  n_issue++;
    n_hits += int'(hits);
  end

  particle_t parts [$];
  int prow [$], plane [$];

  initial begin
    int row;
    fill_tables();
    for (int a = 0; a < 32; a++)
      for (int b = 0; b < a; b++) prm[{5'(b), 5'(a)}] = prm[{5'(a), 5'(b)}];
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
    // particles, grouped by cell
    row = 0;
    for (int c = 0; c < NCELL; c++) begin
      int cnt, cx, cy, cz;
      cnt = $urandom_range(0, 5);
      if (c == 0) cnt = 4;
      cx = c % 3; cy = (c / 3) % 3; cz = c / 9;
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
        // keep a few pairs very close, below the start of the tables
        if (k == 1 && c == 0) p = parts[parts.size() - 1];
        parts.push_back(p); prow.push_back(row + k / N); plane.push_back(k % N);
        @(negedge clk); pos_we = 1; pos_row = RW'(row + k / N); pos_lane = 1'(k % N); pos_data = p;
        @(negedge clk); pos_we = 0;
      end
      row += (cnt + N - 1) / N;
    end
    @(negedge clk) build = 1;
    @(negedge clk) build = 0;
    wait (ready);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    wait (done);
    repeat (2) @(negedge clk);
    // compare with the all-pairs reference
    for (int i = 0; i < parts.size(); i++) begin
      longint ex, ey, ez;
      int partners;
      ex = 0; ey = 0; ez = 0; partners = 0;
      for (int j = 0; j < parts.size(); j++) begin
        vec_t f;
        if (j == i) continue;
        if (pair_force(parts[i], parts[j], 1'b1, RC2, 32, 34, f)) begin
          partners++;
          ex += longint'(f.x); ey += longint'(f.y); ez += longint'(f.z);
        end
      end
      rd_row = RW'(prow[i]); rd_lane = 1'(plane[i]);
      @(posedge clk); #1;
      checks++;
      if (!near(rd_data.x, ex, partners) || !near(rd_data.y, ey, partners) ||
          !near(rd_data.z, ez, partners)) begin
        failures++;
        if (failures < 10) $display("FAIL particle %0d: %0d %0d %0d exp %0d %0d %0d (%0d partners)", i,
          rd_data.x, rd_data.y, rd_data.z, data_t'(ex), data_t'(ey), data_t'(ez), partners);
      end
    end
    $display("particles %0d, issued rows %0d, pairs in range %0d, drain cycles %0d, padded cells %0d, empty cells %0d",
      parts.size(), n_issue, n_hits, n_drain, n_pad, n_empty);
    checks++;
    if (n_drain == 0 || n_issue == 0 || n_hits == 0 || n_pad == 0 || n_empty == 0 ||
        n_hits >= n_issue * N || overflow) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic near(input data_t got, input longint e, input int tol);
    longint d;
    d = longint'(data_t'(longint'(got) - e));
    return (d <= tol) && (d >= -tol);
  endfunction
endmodule
