// tb_adder_tree: random vectors into a 2-lane and a 5-lane tree (padding of
// the tree to a power of two), sums checked against a plain loop, one cycle
// latency.
module tb_adder_tree;
  import md_pkg::*;
  logic clk = 0, rst_n = 0, iv = 0;
  vec_t in2 [2], in5 [5];
  logic ov2, ov5;
  vec_t s2, s5;
  int checks = 0, failures = 0;

  adder_tree #(.N(2)) dut2 (.clk(clk), .rst_n(rst_n), .in_valid(iv), .in(in2), .out_valid(ov2), .sum(s2));
  adder_tree #(.N(5)) dut5 (.clk(clk), .rst_n(rst_n), .in_valid(iv), .in(in5), .out_valid(ov5), .sum(s5));

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic data_t r();
    return data_t'(signed'($urandom) >>> 3);
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      vec_t e2, e5;
      @(negedge clk);
      iv = 1;
      e2 = '0; e5 = '0;
      for (int k = 0; k < 2; k++) begin
        in2[k].x = r(); in2[k].y = r(); in2[k].z = r();
        e2.x += in2[k].x; e2.y += in2[k].y; e2.z += in2[k].z;
      end
      for (int k = 0; k < 5; k++) begin
        in5[k].x = r(); in5[k].y = r(); in5[k].z = r();
        e5.x += in5[k].x; e5.y += in5[k].y; e5.z += in5[k].z;
      end
      @(posedge clk); #1;
      checks++;
      if (!ov2 || !ov5 || s2 != e2 || s5 != e5) begin
        failures++;
        $display("FAIL n=%0d", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
