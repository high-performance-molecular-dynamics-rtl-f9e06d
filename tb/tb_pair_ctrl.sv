// tb_pair_ctrl: runs the pair controller on a 3x3x3-cell periodic box, where
// with wrap-around every cell neighbours every other, so the controller must
// present every pair of real particles exactly once, never a particle with
// itself and never a padding slot. A behavioural cell table answers the cell
// lookups. Also checks the clear phase (every row once), that each
// write-back comes at least DRAIN cycles after the last issue, that each
// row of A is written back once per cell pair, and the done pulse.
module tb_pair_ctrl;
  import md_pkg::*;
  localparam int N = 2, CDIM = 3, NCELL = 27, ROWS = 64, DRAIN = FP_LAT + 3;
  localparam int CW = 5, RW = 6, PW = 8;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [CW-1:0] cell_a, cell_b;
  logic [RW-1:0] base_a, base_b, clr_row, pi_row, iss_row, wb_row;
  logic [RW:0] rows_a, rows_b;
  logic [PW-1:0] count_a, count_b;
  logic clr_en, pi_load, iss_valid, wb_valid, draining;
  logic iss_li;
  logic [N-1:0] iss_mask;
  int cnt [NCELL], base [NCELL];
  int checks = 0, failures = 0, cyc = 0;

  pair_ctrl #(.N(N), .CDIM(CDIM), .ROWS(ROWS)) dut (.clk(clk), .rst_n(rst_n), .start(start),
    .busy(busy), .done(done), .cell_a(cell_a), .cell_b(cell_b), .base_a(base_a), .rows_a(rows_a),
    .count_a(count_a), .base_b(base_b), .rows_b(rows_b), .count_b(count_b), .clr_en(clr_en),
    .clr_row(clr_row), .pi_load(pi_load), .pi_row(pi_row), .iss_valid(iss_valid),
    .iss_row(iss_row), .iss_li(iss_li), .iss_mask(iss_mask), .wb_valid(wb_valid),
    .wb_row(wb_row), .draining(draining));

  // behavioural cell table
  assign base_a = RW'(base[cell_a]);
  assign count_a = PW'(cnt[cell_a]);
  assign rows_a = (RW+1)'((cnt[cell_a] + N - 1) / N);
  assign base_b = RW'(base[cell_b]);
  assign count_b = PW'(cnt[cell_b]);
  assign rows_b = (RW+1)'((cnt[cell_b] + N - 1) / N);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int seen [int];          // pair key -> times presented
  int cleared [int];
  int wbs = 0, last_iss = 0, cur_pi_row = 0, nslots = 0;
  int rowcell [ROWS];

  always @(posedge clk) begin
    if (rst_n) begin
      if (clr_en) cleared[int'(clr_row)] = cleared.exists(int'(clr_row)) ? cleared[int'(clr_row)] + 1 : 1;
      if (pi_load) cur_pi_row = int'(pi_row);
      if (iss_valid) begin
        last_iss = cyc;
        for (int k = 0; k < N; k++) if (iss_mask[k]) begin
          int i, j, key;
          i = cur_pi_row * N + int'(iss_li);
          j = int'(iss_row) * N + k;
          key = (i < j) ? i * 4096 + j : j * 4096 + i;
          seen[key] = seen.exists(key) ? seen[key] + 1 : 1;
          if (i == j) begin
            failures++;
            $display("FAIL self pair %0d", i);
          end
        end
      end
      if (wb_valid) begin
        wbs++;
        checks++;
        if (cyc - last_iss < DRAIN) begin
          failures++;
          $display("FAIL write-back %0d cycles after the last issue", cyc - last_iss);
        end
      end
    end
  end

  // global slot index -> real particle?
  function automatic logic real_slot(input int s);
    int r, l;
    r = s / N; l = s % N;
    return (l + (r - base[rowcell[r]]) * N) < cnt[rowcell[r]];
  endfunction

  initial begin
    int row, nreal, exp_wb;
    row = 0; nreal = 0; exp_wb = 0;
    for (int c = 0; c < NCELL; c++) begin
      cnt[c] = $urandom_range(0, 5);
      base[c] = row;
      for (int r = 0; r < (cnt[c] + N - 1) / N; r++) rowcell[row + r] = c;
      row += (cnt[c] + N - 1) / N;
      nreal += cnt[c];
    end
    // write-backs: for each cell A, its rows, for each of the 14 pairs whose B is non-empty
    for (int c = 0; c < NCELL; c++) begin
      int nb_nonempty;
      nb_nonempty = 0;
      for (int n = 0; n < 14; n++) begin
        int ox, oy, oz, b;
        if (n == 0) begin ox = 0; oy = 0; oz = 0; end
        else if (n <= 9) begin oz = 1; ox = (n - 1) % 3 - 1; oy = (n - 1) / 3 - 1; end
        else if (n <= 12) begin oz = 0; oy = 1; ox = n - 11; end
        else begin oz = 0; oy = 0; ox = 1; end
        b = ((c / 9 + oz + 3) % 3) * 9 + (((c / 3) % 3 + oy + 3) % 3) * 3 + ((c % 3 + ox + 3) % 3);
        if (cnt[b] > 0) nb_nonempty++;
      end
      exp_wb += nb_nonempty * ((cnt[c] + N - 1) / N);
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    wait (done);
    @(negedge clk);
    // every row cleared exactly once
    for (int r = 0; r < ROWS; r++) begin
      checks++;
      if (!cleared.exists(r) || cleared[r] != 1) failures++;
    end
    // every real pair exactly once, nothing else
    foreach (seen[key]) begin
      checks++;
      if (seen[key] != 1 || !real_slot(key / 4096) || !real_slot(key % 4096)) begin
        failures++;
        if (failures < 10) $display("FAIL pair %0d-%0d seen %0d", key / 4096, key % 4096, seen[key]);
      end
    end
    checks++;
    if (seen.num() != nreal * (nreal - 1) / 2) begin
      failures++;
      $display("FAIL %0d pairs presented, %0d expected", seen.num(), nreal * (nreal - 1) / 2);
    end
    checks++;
    if (wbs != exp_wb || busy) begin
      failures++;
      $display("FAIL %0d write-backs, %0d expected", wbs, exp_wb);
    end
    $display("particles %0d, pairs %0d, write-backs %0d", nreal, seen.num(), wbs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
