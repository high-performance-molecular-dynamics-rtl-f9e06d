// tb_cell_index: downloads random particle counts for 64 cells, runs the
// build pass and checks base row, row count and count of every cell on both
// lookup ports against a running sum of padded rows, plus the build time and
// the overflow flag for counts that do not fit, including the exact boundary
// (all 1024 rows used: no overflow; 1025 rows: overflow).
module tb_cell_index;
  import md_pkg::*;
  localparam int N = 2, NCELL = 64, ROWS = 1024;
  localparam int CW = 6, RW = 10, PW = 12;
  logic clk = 0, rst_n = 0, cnt_we = 0, build = 0, ready, overflow;
  logic [CW-1:0] cnt_cell = '0, ca = '0, cb = '0;
  logic [PW-1:0] cnt_val = '0, count_a, count_b;
  logic [RW-1:0] base_a, base_b;
  logic [RW:0] rows_a, rows_b;
  int cnt [NCELL];
  int checks = 0, failures = 0;

  cell_index #(.N(N), .NCELL(NCELL), .ROWS(ROWS)) dut (.clk(clk), .rst_n(rst_n), .cnt_we(cnt_we),
    .cnt_cell(cnt_cell), .cnt_val(cnt_val), .build(build), .ready(ready), .overflow(overflow),
    .cell_a(ca), .base_a(base_a), .rows_a(rows_a), .count_a(count_a),
    .cell_b(cb), .base_b(base_b), .rows_b(rows_b), .count_b(count_b));

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // maxc >= 0: random counts up to maxc; maxc < 0: 16 rows per cell with
  // the last cell holding -maxc particles (exact-boundary test)
  task automatic load_and_build(input int maxc);
    int t;
    for (int c = 0; c < NCELL; c++) begin
      @(negedge clk);
      if (maxc >= 0) cnt[c] = $urandom_range(0, maxc);
      else           cnt[c] = (c == NCELL - 1) ? -maxc : 2 * ROWS / NCELL;
      cnt_we = 1; cnt_cell = CW'(c); cnt_val = PW'(cnt[c]);
    end
    @(negedge clk) cnt_we = 0; build = 1;
    @(negedge clk) build = 0;
    t = 1;
    while (!ready) begin
      @(negedge clk); t++;
    end
    checks++;
    if (t != NCELL + 1) begin
      failures++;
      $display("FAIL build took %0d cycles", t);
    end
  endtask

  initial begin
    int base, ovf;
    repeat (2) @(posedge clk);
    rst_n = 1;
    load_and_build(30);
    base = 0;
    for (int c = 0; c < NCELL; c++) begin
      ca = CW'(c); cb = CW'(NCELL - 1 - c);
      #1;
      checks++;
      if (int'(base_a) != base || int'(rows_a) != (cnt[c] + N - 1) / N || int'(count_a) != cnt[c]) begin
        failures++;
        $display("FAIL cell %0d base %0d/%0d rows %0d", c, base_a, base, rows_a);
      end
      checks++;
      if (int'(count_b) != cnt[NCELL - 1 - c]) failures++;
      base += (cnt[c] + N - 1) / N;
    end
    checks++;
    if (overflow) failures++;
    // counts that overflow 1024 rows
    load_and_build(80);
    ovf = 0;
    for (int c = 0; c < NCELL; c++) ovf += (cnt[c] + N - 1) / N;
    checks++;
    if (overflow != (ovf > ROWS)) begin
      failures++;
      $display("FAIL overflow %b for %0d rows", overflow, ovf);
    end
    // exactly ROWS rows fit; one more row overflows
    for (int extra = 0; extra < 2; extra++) begin
      load_and_build(-(2 * ROWS / NCELL + 2 * extra));
      checks++;
      if (overflow != (extra == 1)) begin
        failures++;
        $display("FAIL overflow %b at boundary + %0d rows", overflow, extra);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
