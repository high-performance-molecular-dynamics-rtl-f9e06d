// tb_fix_to_dp: converts random 35-bit fixed-point values (20 fraction bits)
// to doubles and checks them, exactly, against value / 2^20 in real arithmetic.
module tb_fix_to_dp;
  logic signed [34:0] q;
  logic [63:0] d;
  int checks = 0, failures = 0;

  fix_to_dp #(.W(35), .FRAC(20)) dut (.q(q), .d(d));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input longint v);
    real e;
    q = 35'(v);
    #1;
    e = real'(longint'(q)) / (2.0 ** 20);
    checks++;
    if ($bitstoreal(d) != e) begin
      failures++;
      $display("FAIL q=%0d got %f exp %f", q, $bitstoreal(d), e);
    end
  endtask

  initial begin
    one(0); one(1); one(-1); one(1 << 20); one(-(64'sd1 <<< 34)); one((64'sd1 <<< 34) - 1);
    for (int n = 0; n < 3000; n++) one(longint'($signed({$urandom, $urandom})) >>> $urandom_range(29, 62));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
