// tb_interp_pipe: loads random coefficient words and formats into the table
// entries that a set of random x values select, streams the x values one per
// cycle, and checks each result against a reference evaluation of
//   ((C3*t + C2)*t + C1)*t + C0
// with the per-interval alignments, and that it leaves exactly 4 cycles later.
module tb_interp_pipe;
  import md_pkg::*;
  localparam int DEPTH = NSEC * (1 << IVL_W);
  localparam int AW = $clog2(DEPTH);
  localparam int NX = 300;
  logic clk = 0, rst_n = 0;
  logic tbl_we = 0;
  logic [AW-1:0] tbl_waddr = '0;
  coef_t tbl_wdata;
  logic in_valid = 0;
  logic [X_W-1:0] x = '0;
  logic out_valid, under;
  data_t y;
  logic [OSH_W-1:0] osh;
  int checks = 0, failures = 0, cyc = 0;
  int shifts [8] = '{0, 1, 2, 3, 4, 6, 8, 12};

  interp_pipe dut (.clk(clk), .rst_n(rst_n), .tbl_we(tbl_we), .tbl_waddr(tbl_waddr),
    .tbl_wdata(tbl_wdata), .in_valid(in_valid), .x(x), .out_valid(out_valid), .y(y),
    .osh(osh), .under(under));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  coef_t tab [int];
  longint exp_y [NX];
  int     exp_osh [NX];
  logic   exp_under [NX];
  logic [X_W-1:0] xs [NX];

  function automatic longint sx(input longint v);   // wrap to DATA_W bits
    return longint'(data_t'(v));
  endfunction

  task automatic model(input int n);
    longint v, off, tt, a;
    int lead, ob, addr;
    coef_t c;
    v = longint'(xs[n]);
    lead = -1;
    for (int i = X_W - 1; i >= 0; i--) if (lead < 0 && v >= (64'sd1 <<< i)) lead = i;
    exp_under[n] = (lead < int'(X_W - NSEC));
    if (exp_under[n]) return;
    ob   = lead - int'(IVL_W);
    addr = (lead - int'(X_W - NSEC)) * (1 << IVL_W) + int'((v - (64'sd1 <<< lead)) >>> ob);
    off  = (v - (64'sd1 <<< lead)) & ((64'sd1 <<< ob) - 1);
    tt   = (ob <= int'(T_W)) ? off <<< (int'(T_W) - ob) : off >>> (ob - int'(T_W));
    if (!tab.exists(addr)) begin
      c.c3 = data_t'(signed'($urandom) >>> 2); c.c2 = data_t'(signed'($urandom) >>> 1);
      c.c1 = data_t'({$urandom, $urandom}); c.c0 = data_t'({$urandom, $urandom});
      c.fmt = sfp_fmt_t'($urandom);
      tab[addr] = c;
    end
    c = tab[addr];
    a = longint'(c.c3);
    a = sx(longint'(c.c2) + (((a * tt) >>> T_W) >>> shifts[c.fmt.sel1]));
    a = sx(longint'(c.c1) + (sx((a * tt) >>> T_W) >>> shifts[c.fmt.sel2]));
    a = sx(longint'(c.c0) + (sx((a * tt) >>> T_W) >>> shifts[c.fmt.sel3]));
    exp_y[n] = a;
    exp_osh[n] = int'(c.fmt.osh);
  endtask

  int in_cyc [NX];
  int nout = 0;
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (cyc - in_cyc[nout] != 4 + 1 ||  // +1: sampled on the following edge under != exp_under[nout] ||
          (!exp_under[nout] && (longint'(y) != exp_y[nout] || int'(osh) != exp_osh[nout]))) begin
        failures++;
        $display("FAIL n=%0d lat=%0d y=%0d exp=%0d under=%b", nout, cyc - in_cyc[nout], y,
                 exp_y[nout], under);
      end
      nout++;
    end
  end

  initial begin
    for (int n = 0; n < NX; n++) begin
      int sh;
      sh = (n < 10) ? $urandom_range(0, X_W - NSEC - 1) : $urandom_range(X_W - NSEC, X_W - 1);
      xs[n] = X_W'({$urandom, $urandom} >> (63 - sh));
      model(n);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (tab[a]) begin
      @(negedge clk);
      tbl_we = 1; tbl_waddr = AW'(a); tbl_wdata = tab[a];
    end
    @(negedge clk) tbl_we = 0;
    for (int n = 0; n < NX; n++) begin
      @(negedge clk);
      in_valid = 1; x = xs[n]; in_cyc[n] = cyc;
    end
    @(negedge clk) in_valid = 0;
    repeat (10) @(posedge clk);
    checks++;
    if (nout != NX) begin
      failures++;
      $display("FAIL %0d outputs for %0d inputs", nout, NX);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
