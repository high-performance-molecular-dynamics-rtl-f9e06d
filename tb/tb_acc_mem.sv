// tb_acc_mem: clears a small memory, then applies random lane-masked
// accumulations, including back-to-back updates of the same row, and checks
// every particle against a software sum through the read port.
module tb_acc_mem;
  import md_pkg::*;
  localparam int N = 2, ROWS = 16, RW = 4;
  logic clk = 0, acc_en = 0, clr_en = 0;
  logic [RW-1:0] acc_row = '0, clr_row = '0, rd_row = '0;
  logic [N-1:0] lane_en = '0;
  logic rd_lane = 0;
  vec_t acc_val [N], rd_data;
  vec_t model [ROWS][N];
  int checks = 0, failures = 0;

  acc_mem #(.N(N), .ROWS(ROWS)) dut (.clk(clk), .acc_en(acc_en), .acc_row(acc_row),
    .acc_lane_en(lane_en), .acc_val(acc_val), .clr_en(clr_en), .clr_row(clr_row),
    .rd_row(rd_row), .rd_lane(rd_lane), .rd_data(rd_data));

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < ROWS; r++) begin
      @(negedge clk); clr_en = 1; clr_row = RW'(r);
      for (int k = 0; k < N; k++) model[r][k] = '0;
    end
    @(negedge clk) clr_en = 0;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      acc_en = 1;
      if (n % 3 != 0) acc_row = RW'($urandom);   // every third update repeats the row
      lane_en = N'($urandom);
      for (int k = 0; k < N; k++) begin
        acc_val[k].x = data_t'(signed'($urandom) >>> 8);
        acc_val[k].y = data_t'(signed'($urandom) >>> 8);
        acc_val[k].z = data_t'(signed'($urandom) >>> 8);
        if (lane_en[k]) begin
          model[acc_row][k].x += acc_val[k].x;
          model[acc_row][k].y += acc_val[k].y;
          model[acc_row][k].z += acc_val[k].z;
        end
      end
    end
    @(negedge clk) acc_en = 0;
    for (int r = 0; r < ROWS; r++)
      for (int k = 0; k < N; k++) begin
        rd_row = RW'(r); rd_lane = k[0];
        @(posedge clk); #1;
        checks++;
        if (rd_data != model[r][k]) begin
          failures++;
          $display("FAIL row %0d lane %0d", r, k);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
