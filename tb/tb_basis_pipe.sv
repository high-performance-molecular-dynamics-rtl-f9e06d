// tb_basis_pipe: random coordinates; checks the grid base index and the four
// cubic B-spline weights and derivatives against real-valued formulas
// (tolerance 2^-20 with 24 fraction bits), the partition of unity of the
// weights, and the 3-cycle latency.
module tb_basis_pipe;
  import md_pkg::*;
  logic clk = 0, rst_n = 0, iv = 0, ov;
  logic [POS_W-1:0] pos = '0;
  logic [4:0] base;
  data_t phi [4], dphi [4];
  int checks = 0, failures = 0;

  basis_pipe #(.GB(5), .WF(24)) dut (.clk(clk), .rst_n(rst_n), .in_valid(iv), .pos(pos),
    .out_valid(ov), .base(base), .phi(phi), .dphi(dphi));

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real bs(input int k, input real w);
    case (k)
      0: return (1.0 - w) ** 3 / 6.0;
      1: return (3.0 * w ** 3 - 6.0 * w ** 2 + 4.0) / 6.0;
      2: return (-3.0 * w ** 3 + 3.0 * w ** 2 + 3.0 * w + 1.0) / 6.0;
      default: return w ** 3 / 6.0;
    endcase
  endfunction
  function automatic real dbs(input int k, input real w);
    case (k)
      0: return -((1.0 - w) ** 2) / 2.0;
      1: return (3.0 * w ** 2 - 4.0 * w) / 2.0;
      2: return (-3.0 * w ** 2 + 2.0 * w + 1.0) / 2.0;
      default: return w ** 2 / 2.0;
    endcase
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      real w, sum;
      int gi;
      @(negedge clk);
      iv = 1; pos = POS_W'({$urandom, $urandom});
      gi = int'(pos[34:30]);
      w  = real'(pos[29:6]) / (2.0 ** 24);
      @(negedge clk); iv = 0;
      repeat (2) @(negedge clk);
      checks++;
      if (!ov || int'(base) != ((gi + 31) % 32)) begin
        failures++;
        $display("FAIL valid/base %b %0d %0d", ov, base, gi);
      end
      sum = 0.0;
      for (int k = 0; k < 4; k++) begin
        real p, dp;
        p  = real'(longint'(phi[k])) / (2.0 ** 24);
        dp = real'(longint'(dphi[k])) / (2.0 ** 24);
        sum += p;
        checks++;
        if ((p - bs(k, w)) ** 2 > (2.0 ** -40) || (dp - dbs(k, w)) ** 2 > (2.0 ** -40)) begin
          failures++;
          $display("FAIL w=%f k=%0d phi %f/%f dphi %f/%f", w, k, p, bs(k, w), dp, dbs(k, w));
        end
      end
      checks++;
      if ((sum - 1.0) ** 2 > (2.0 ** -40)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
