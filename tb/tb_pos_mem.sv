// tb_pos_mem: fills all rows and lanes with random particles, then reads
// random rows on both ports at once and checks every lane (one-cycle read).
module tb_pos_mem;
  import md_pkg::*;
  localparam int N = 2, ROWS = 1024, RW = 10;
  logic clk = 0, we = 0;
  logic [RW-1:0] wrow = '0, ra = '0, rb = '0;
  logic wlane = 0;
  particle_t wdata, da [N], db [N];
  particle_t model [ROWS][N];
  int checks = 0, failures = 0;

  pos_mem #(.N(N), .ROWS(ROWS)) dut (.clk(clk), .we(we), .wrow(wrow), .wlane(wlane), .wdata(wdata),
    .raddr_a(ra), .rdata_a(da), .raddr_b(rb), .rdata_b(db));

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < ROWS; r++)
      for (int k = 0; k < N; k++) begin
        @(negedge clk);
        we = 1; wrow = RW'(r); wlane = k[0];
        wdata = particle_t'({$urandom, $urandom, $urandom, $urandom});
        model[r][k] = wdata;
      end
    @(negedge clk) we = 0;
    for (int n = 0; n < 500; n++) begin
      ra = RW'($urandom); rb = RW'($urandom);
      @(posedge clk); #1;
      for (int k = 0; k < N; k++) begin
        checks++;
        if (da[k] != model[ra][k] || db[k] != model[rb][k]) begin
          failures++;
          $display("FAIL row %0d/%0d lane %0d", ra, rb, k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
