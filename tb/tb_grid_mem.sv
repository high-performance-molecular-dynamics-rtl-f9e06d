// tb_grid_mem: on a 16^3 grid (64 banks of 64 words): clears it, accumulates
// random 4x4x4 blocks at random origins (including ones that wrap around the
// periodic edges and back-to-back overlapping ones), writes random single
// points, then checks random block reads and point reads against a plain
// 3D array model.
module tb_grid_mem;
  import md_pkg::*;
  localparam int GB = 4, G = 16, BW = 6;
  logic clk = 0, add_en = 0, pt_we = 0, clr_en = 0;
  logic [GB-1:0] rx = '0, ry = '0, rz = '0, ax = '0, ay = '0, az = '0, px = '0, py = '0, pz = '0;
  data_t rd [64], ad [64], pw, pr;
  logic [BW-1:0] clr_addr = '0;
  data_t model [G][G][G];
  int checks = 0, failures = 0;

  grid_mem #(.GB(GB)) dut (.clk(clk), .rd_x(rx), .rd_y(ry), .rd_z(rz), .rd_data(rd),
    .add_en(add_en), .add_x(ax), .add_y(ay), .add_z(az), .add_data(ad),
    .pt_we(pt_we), .pt_x(px), .pt_y(py), .pt_z(pz), .pt_wdata(pw), .pt_rdata(pr),
    .clr_en(clr_en), .clr_addr(clr_addr));

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); clr_en = 1; clr_addr = BW'(i);
    end
    @(negedge clk) clr_en = 0;
    for (int x = 0; x < G; x++) for (int y = 0; y < G; y++) for (int z = 0; z < G; z++) model[x][y][z] = '0;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      add_en = 1;
      if (n % 4 != 0) begin
        ax = GB'($urandom); ay = GB'($urandom); az = GB'($urandom);
      end
      for (int a = 0; a < 4; a++) for (int b = 0; b < 4; b++) for (int c = 0; c < 4; c++) begin
        ad[a*16+b*4+c] = data_t'(signed'($urandom) >>> 10);
        model[(ax+a)%G][(ay+b)%G][(az+c)%G] += ad[a*16+b*4+c];
      end
    end
    @(negedge clk) add_en = 0;
    for (int n = 0; n < 100; n++) begin
      @(negedge clk);
      pt_we = 1; px = GB'($urandom); py = GB'($urandom); pz = GB'($urandom);
      pw = data_t'({$urandom, $urandom});
      model[px][py][pz] = pw;
    end
    @(negedge clk) pt_we = 0;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      rx = GB'($urandom); ry = GB'($urandom); rz = GB'($urandom);
      px = GB'($urandom); py = GB'($urandom); pz = GB'($urandom);
      @(posedge clk); #1;
      for (int a = 0; a < 4; a++) for (int b = 0; b < 4; b++) for (int c = 0; c < 4; c++) begin
        checks++;
        if (rd[a*16+b*4+c] != model[(rx+a)%G][(ry+b)%G][(rz+c)%G]) begin
          failures++;
          if (failures < 10) $display("FAIL block %0d %0d %0d off %0d%0d%0d", rx, ry, rz, a, b, c);
        end
      end
      checks++;
      if (pr != model[px][py][pz]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
