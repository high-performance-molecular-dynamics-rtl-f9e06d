// tb_rsq_decode: checks the section / interval / offset split of r^2 against
// an arithmetic reference (highest set bit, subtraction of the section and
// interval starts, rescaling of the remainder), for random inputs spread over
// all sections and for inputs below the table.
module tb_rsq_decode;
  import md_pkg::*;
  logic [X_W-1:0]   x;
  logic [SEC_W-1:0] section;
  logic [IVL_W-1:0] interval;
  logic [T_W-1:0]   t;
  logic             under;
  int checks = 0, failures = 0;

  rsq_decode dut (.x(x), .section(section), .interval(interval), .t(t), .under(under));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic [X_W-1:0] xv);
    longint unsigned v, off, ivl, tt;
    int lead, ob;
    logic exp_under;
    x = xv;
    #1;
    v = longint'(xv);
    lead = -1;
    for (int i = X_W - 1; i >= 0; i--) if (lead < 0 && v >= (64'd1 << i)) lead = i;
    exp_under = (lead < int'(X_W - NSEC));
    checks++;
    if (under !== exp_under) begin
      failures++;
      $display("FAIL under x=%h got %b", xv, under);
    end
    if (!exp_under) begin
      ob  = lead - int'(IVL_W);
      ivl = (v - (64'd1 << lead)) / (64'd1 << ob);
      off = v - (64'd1 << lead) - ivl * (64'd1 << ob);
      tt  = (ob <= int'(T_W)) ? off * (64'd1 << (int'(T_W) - ob)) : off / (64'd1 << (ob - int'(T_W)));
      checks++;
      if (section != SEC_W'(lead - int'(X_W - NSEC)) || interval != IVL_W'(ivl) || t != T_W'(tt)) begin
        failures++;
        $display("FAIL x=%h sec %0d/%0d ivl %0d/%0d t %h/%h", xv, section, lead - int'(X_W - NSEC),
                 interval, ivl, t, tt);
      end
    end
  endtask

  initial begin
    // the worked example of the encoding: leading one, interval, offset
    for (int s = 0; s < int'(X_W); s++) begin
      check_one(X_W'(64'd1 << s));
      check_one(X_W'((64'd1 << s) | longint'($urandom) & ((64'd1 << s) - 1)));
    end
    for (int n = 0; n < 2000; n++) begin
      int sh;
      sh = $urandom_range(0, X_W - 1);
      check_one(X_W'({$urandom, $urandom} >> (63 - sh)));
    end
    check_one('0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
