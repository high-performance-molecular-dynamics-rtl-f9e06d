// tb_sfp_adder: checks every hardwired alignment of the semi floating point
// adder: sum = a + floor(b / 2^shift) for the shift list 0,1,2,3,4,6,8,12.
module tb_sfp_adder;
  import md_pkg::*;
  data_t a, b, sum;
  logic [SSEL_W-1:0] sel;
  int checks = 0, failures = 0;
  int shifts [8] = '{0, 1, 2, 3, 4, 6, 8, 12};

  sfp_adder dut (.a(a), .b(b), .sel(sel), .sum(sum));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      longint av, bv, ev;
      av = longint'($signed({$urandom, $urandom})) >>> 31;   // 33-bit range
      bv = longint'($signed({$urandom, $urandom})) >>> 31;
      sel = SSEL_W'(n % 8);
      a = data_t'(av); b = data_t'(bv);
      #1;
      // floor division by a power of two
      ev = av + ((bv >= 0) ? bv / (64'sd1 <<< shifts[n % 8])
                           : -((-bv + (64'sd1 <<< shifts[n % 8]) - 1) / (64'sd1 <<< shifts[n % 8])));
      checks++;
      if (sum != data_t'(ev)) begin
        failures++;
        $display("FAIL a=%0d b=%0d sel=%0d got %0d exp %0d", av, bv, sel, sum, ev);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
