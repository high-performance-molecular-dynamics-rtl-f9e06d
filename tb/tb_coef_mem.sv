// tb_coef_mem: writes random coefficient words to random addresses, then
// reads them back and checks data and the one-cycle read latency.
module tb_coef_mem;
  import md_pkg::*;
  localparam int DEPTH = NSEC * (1 << IVL_W);
  localparam int AW = $clog2(DEPTH);
  logic clk = 0, we = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  coef_t wdata, rdata;
  coef_t model [int];
  int checks = 0, failures = 0;

  coef_mem dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .raddr(raddr), .rdata(rdata));

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic coef_t rnd_coef();
    coef_t c;
    c.c3 = data_t'({$urandom, $urandom}); c.c2 = data_t'({$urandom, $urandom});
    c.c1 = data_t'({$urandom, $urandom}); c.c0 = data_t'({$urandom, $urandom});
    c.fmt = sfp_fmt_t'($urandom);
    return c;
  endfunction

  initial begin
    int addrs [200];
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      addrs[n] = $urandom_range(0, DEPTH - 1);
      we = 1; waddr = AW'(addrs[n]); wdata = rnd_coef();
      model[addrs[n]] = wdata;
    end
    @(negedge clk) we = 0;
    for (int n = 0; n < 200; n++) begin
      raddr = AW'(addrs[n]);
      @(posedge clk); #1;
      checks++;
      if (rdata !== model[addrs[n]]) begin
        failures++;
        $display("FAIL addr %0d", addrs[n]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
