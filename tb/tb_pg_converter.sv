// tb_pg_converter: random value and weights stream in one per cycle; all 64
// outputs are compared with the real product val*phx[a]*phy[b]*phz[c]
// (tolerance of a few LSBs for the three truncations), three cycles later.
module tb_pg_converter;
  import md_pkg::*;
  localparam int NV = 200;
  logic clk = 0, rst_n = 0, iv = 0, ov;
  data_t val, phx [4], phy [4], phz [4], out [64];
  real ev [NV][64];
  int checks = 0, failures = 0, nin = 0, nout = 0;

  pg_converter #(.WF(24)) dut (.clk(clk), .rst_n(rst_n), .in_valid(iv), .val(val),
    .phx(phx), .phy(phy), .phz(phz), .out_valid(ov), .out(out));

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic data_t rw();   // weight in (-1, 1)
    return data_t'(signed'($urandom) >>> 7);
  endfunction
  function automatic real r(input data_t v);
    return real'(longint'(v)) / (2.0 ** 24);
  endfunction

  always @(negedge clk) begin
    if (rst_n && ov) begin
      for (int k = 0; k < 64; k++) begin
        checks++;
        if ((r(out[k]) - ev[nout][k]) ** 2 > (2.0 ** -40)) begin
          failures++;
          $display("FAIL n=%0d k=%0d %f/%f", nout, k, r(out[k]), ev[nout][k]);
        end
      end
      nout++;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < NV; n++) begin
      @(posedge clk); #1;
      iv = 1;
      val = data_t'(signed'($urandom) >>> 4);
      for (int i = 0; i < 4; i++) begin
        phx[i] = rw(); phy[i] = rw(); phz[i] = rw();
      end
      for (int a = 0; a < 4; a++)
        for (int b = 0; b < 4; b++)
          for (int c = 0; c < 4; c++) ev[n][a*16+b*4+c] = r(val) * r(phx[a]) * r(phy[b]) * r(phz[c]);
    end
    @(posedge clk); #1 iv = 0;
    repeat (6) @(posedge clk);
    checks++;
    if (nout != NV) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
