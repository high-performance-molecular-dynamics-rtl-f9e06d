// tb_force_pipe: loads random tables and type-pair parameters, streams random
// particle pairs one per cycle (most within the cut-off, some beyond it, some
// closer than the tables reach, some masked) and compares each force with the
// bit-accurate reference model; checks the 9-cycle latency and counts the
// in-range, cut-off, too-close and masked cases.
module tb_force_pipe;
  import md_pkg::*;
  import md_ref_pkg::*;
  localparam int NPAIR = 600;
  localparam logic [70:0] RC2 = 71'(1) << 66;
  logic clk = 0, rst_n = 0;
  logic [2:0] tbl_we = '0;
  logic [10:0] tbl_waddr = '0;
  coef_t tbl_wdata;
  logic prm_we = 0;
  logic [2*TYPE_W-1:0] prm_waddr = '0;
  pair_param_t prm_wdata;
  logic iv = 0, im = 0, ov, hit;
  particle_t pi, pj;
  vec_t f;
  vec_t ef [NPAIR];
  logic eh [NPAIR];
  int in_cyc [NPAIR];
  int checks = 0, failures = 0, nout = 0, cyc = 0;
  int n_hit = 0, n_miss = 0;

  force_pipe dut (.clk(clk), .rst_n(rst_n), .tbl_we(tbl_we), .tbl_waddr(tbl_waddr),
    .tbl_wdata(tbl_wdata), .prm_we(prm_we), .prm_waddr(prm_waddr), .prm_wdata(prm_wdata),
    .in_valid(iv), .in_mask(im), .pi(pi), .pj(pj), .out_valid(ov), .out_hit(hit), .f(f));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && ov) begin
      checks++;
      if (f != ef[nout] || hit != eh[nout] || cyc - in_cyc[nout] != FP_LAT + 1) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d f=%0d,%0d,%0d exp %0d,%0d,%0d hit %b/%b lat %0d", nout,
          f.x, f.y, f.z, ef[nout].x, ef[nout].y, ef[nout].z, hit, eh[nout], cyc - in_cyc[nout]);
      end
      if (hit) n_hit++; else n_miss++;
      nout++;
    end
  end

  // random signed offset of magnitude below 2^sc
  function automatic longint offs(input int sc);
    longint r;
    r = longint'(signed'($urandom));
    return (sc >= 31) ? (r <<< (sc - 31)) : (r >>> (31 - sc));
  endfunction

  initial begin
    fill_tables();
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 3; k++)
      for (int a = 0; a < TDEPTH; a++) begin
        @(negedge clk);
        tbl_we = 3'(1 << k); tbl_waddr = 11'(a); tbl_wdata = tab[k][a];
      end
    @(negedge clk) tbl_we = '0;
    for (int a = 0; a < (1 << (2*TYPE_W)); a++) begin
      @(negedge clk);
      prm_we = 1; prm_waddr = 10'(a); prm_wdata = prm[a];
    end
    @(negedge clk) prm_we = 0;
    for (int n = 0; n < NPAIR; n++) begin
      int sc;
      @(negedge clk);
      iv = 1;
      im = ($urandom_range(0, 9) != 0);
      pi = particle_t'({$urandom, $urandom, $urandom, $urandom});
      sc = (n % 10 == 3) ? 34 : ((n % 10 == 5) ? 20 : $urandom_range(27, 32));
      pj.x = pi.x + POS_W'(offs(sc));
      pj.y = pi.y + POS_W'(offs(sc));
      pj.z = pi.z + POS_W'(offs(sc));
      pj.t = TYPE_W'($urandom);
      eh[n] = pair_force(pi, pj, im, RC2, 32, 34, ef[n]);
      in_cyc[n] = cyc;
    end
    @(negedge clk) iv = 0;
    repeat (FP_LAT + 3) @(posedge clk);
    checks++;
    if (nout != NPAIR || n_hit == 0 || n_miss == 0) begin
      failures++;
      $display("FAIL outputs %0d hits %0d misses %0d", nout, n_hit, n_miss);
    end
    $display("pairs in range %0d, dropped %0d", n_hit, n_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
