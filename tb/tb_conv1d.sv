// tb_conv1d: streams random samples, with random gaps in in_valid, through
// a K=5 tap filter, and checks every output whose window lies inside the stream
// against y[n] = sum h * x[n - offset] with each product scaled by 2^-24,
// and that every output leaves 1 cycle(s) after its input.
module tb_conv1d;
  import md_pkg::*;
  localparam int K = 5, LEN = 8, NS = 300;
  logic clk = 0, rst_n = 0, iv = 0, ov;
  data_t x = '0, y, h [K];
  data_t xs [NS];
  int in_cyc [NS];
  int checks = 0, failures = 0, nout = 0, cyc = 0;

  conv1d #(.K(K), .CF(24)) dut (.clk(clk), .rst_n(rst_n), .in_valid(iv), .x(x), .h(h),
    .out_valid(ov), .y(y));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic data_t rk();
    return data_t'(signed'($urandom) >>> 6);
  endfunction

  always @(posedge clk) begin
    if (rst_n && ov) begin
      if (nout >= K-1) begin
        longint e;
        data_t hv;
        e = 0;
        for (int kx=0;kx<K;kx++) begin int d; d = kx; hv = h[kx];
          e += (longint'(hv) * longint'(xs[nout - d])) >>> 24;
        end
        checks++;
        if (y != data_t'(e) || cyc - in_cyc[nout] != 1 + 1) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d y=%0d exp=%0d lat=%0d", nout, y, data_t'(e), cyc - in_cyc[nout]);
        end
      end
      nout++;
    end
  end

  initial begin
    for (int a=0;a<K;a++) h[a] = rk();
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < NS; n++) begin
      @(negedge clk);
      while ($urandom_range(0, 3) == 0) begin
        iv = 0;
        @(negedge clk);
      end
      iv = 1; x = data_t'(signed'($urandom) >>> 4); xs[n] = x; in_cyc[n] = cyc;
    end
    @(negedge clk) iv = 0;
    repeat (8) @(posedge clk);
    checks++;
    if (nout != NS) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
