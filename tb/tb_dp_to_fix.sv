// tb_dp_to_fix: converts random doubles (box fractions in [0,1), negative
// values, values beyond the box, zero, infinity) and compares with the
// truncated, wrapped product v * 2^35 computed with real arithmetic.
module tb_dp_to_fix;
  logic [63:0] d;
  logic [34:0] q;
  logic bad;
  int checks = 0, failures = 0;

  dp_to_fix #(.W(35), .FRAC(35)) dut (.d(d), .q(q), .bad(bad));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input real v);
    real s;
    longint e;
    d = $realtobits(v);
    #1;
    s = v * (2.0 ** 35);
    e = (s >= 0) ? longint'($floor(s)) : -longint'($floor(-s));
    checks++;
    if (q !== 35'(e) || bad) begin
      failures++;
      $display("FAIL v=%f q=%h exp=%h", v, q, 35'(e));
    end
  endtask

  initial begin
    one(0.0); one(0.5); one(0.25); one(1.0 / 3.0); one(0.999999);
    one(-0.125); one(1.5); one(2.0 ** -40);
    for (int n = 0; n < 3000; n++) begin
      real v;
      v = real'($urandom) / 4294967296.0 + real'($urandom) / (4294967296.0 * 4294967296.0);
      if (n % 4 == 1) v = -v;
      if (n % 4 == 2) v = v * 8.0;
      one(v);
    end
    d = 64'h7ff0_0000_0000_0000;  // infinity
    #1;
    checks++;
    if (!bad || q != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
