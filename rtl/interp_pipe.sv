// interp_pipe: third-order table interpolation of one function of r^2
// (r^-14, r^-8 or r^-3). It evaluates
//   F(x) = ((C3*t + C2)*t + C1)*t + C0
// where the section and interval of x select the coefficients and t is the
// normalised offset into the interval. The structure follows the document:
// four table look-ups (one word here), three multiplies and three semi
// floating point additions whose alignment is chosen per interval by the
// format stored with the coefficients. The coefficients fit the orthogonal
// polynomial interpolation the document selects; their values are loaded by
// the host.
// Timing: fully pipelined, one x per cycle, result IP_LAT = 4 cycles later:
//   cycle 1 table read, cycles 2..4 one multiply-add each.
// Outputs: y (mantissa on the C0 scale), osh (right shift that takes y to the
// integer scale of the force combination) and under (x below the table).
module interp_pipe
  import md_pkg::*;
#(
  parameter int unsigned DEPTH = NSEC * (1 << IVL_W),
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  // table load port
  input  logic              tbl_we,
  input  logic [AW-1:0]     tbl_waddr,
  input  coef_t             tbl_wdata,
  // stream
  input  logic              in_valid,
  input  logic [X_W-1:0]    x,
  output logic              out_valid,
  output data_t             y,
  output logic [OSH_W-1:0]  osh,
  output logic              under
);
  logic [SEC_W-1:0] section;
  logic [IVL_W-1:0] interval;
  logic [T_W-1:0]   t_dec;
  logic             under_dec;
  coef_t            coef;

  rsq_decode u_dec (
    .x(x), .section(section), .interval(interval), .t(t_dec), .under(under_dec)
  );

  coef_mem #(.DEPTH(DEPTH), .AW(AW)) u_mem (
    .clk(clk), .we(tbl_we), .waddr(tbl_waddr), .wdata(tbl_wdata),
    .raddr(AW'({section, interval})), .rdata(coef)
  );

  // product of a coefficient-scale value and the unsigned fraction t
  function automatic data_t mul_t(input data_t a, input logic [T_W-1:0] t);
    logic signed [DATA_W+T_W:0] p;
    p = a * $signed({1'b0, t});
    return data_t'(p >>> T_W);
  endfunction

  // stage 1: table read
  logic [T_W-1:0] t1;
  logic           v1, u1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; u1 <= 1'b0; t1 <= '0;
    end else begin
      v1 <= in_valid; u1 <= under_dec; t1 <= t_dec;
    end
  end

  // stage 2: a2 = C2 + align(C3*t)
  data_t a2_n, a2, c1_2, c0_2;
  logic [T_W-1:0] t2;
  logic           v2, u2;
  logic [SSEL_W-1:0] s2_2, s3_2;
  logic [OSH_W-1:0]  osh_2;
  sfp_adder u_add1 (.a(coef.c2), .b(mul_t(coef.c3, t1)), .sel(coef.fmt.sel1), .sum(a2_n));
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v2 <= 1'b0; u2 <= 1'b0; t2 <= '0; a2 <= '0; c1_2 <= '0; c0_2 <= '0;
      s2_2 <= '0; s3_2 <= '0; osh_2 <= '0;
    end else begin
      v2 <= v1; u2 <= u1; t2 <= t1; a2 <= a2_n; c1_2 <= coef.c1; c0_2 <= coef.c0;
      s2_2 <= coef.fmt.sel2; s3_2 <= coef.fmt.sel3; osh_2 <= coef.fmt.osh;
    end
  end

  // stage 3: a1 = C1 + align(a2*t)
  data_t a1_n, a1, c0_3;
  logic [T_W-1:0] t3;
  logic           v3, u3;
  logic [SSEL_W-1:0] s3_3;
  logic [OSH_W-1:0]  osh_3;
  sfp_adder u_add2 (.a(c1_2), .b(mul_t(a2, t2)), .sel(s2_2), .sum(a1_n));
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v3 <= 1'b0; u3 <= 1'b0; t3 <= '0; a1 <= '0; c0_3 <= '0; s3_3 <= '0; osh_3 <= '0;
    end else begin
      v3 <= v2; u3 <= u2; t3 <= t2; a1 <= a1_n; c0_3 <= c0_2; s3_3 <= s3_2; osh_3 <= osh_2;
    end
  end

  // stage 4: a0 = C0 + align(a1*t)
  data_t a0_n;
  sfp_adder u_add3 (.a(c0_3), .b(mul_t(a1, t3)), .sel(s3_3), .sum(a0_n));
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; under <= 1'b0; y <= '0; osh <= '0;
    end else begin
      out_valid <= v3; under <= u3; y <= a0_n; osh <= osh_3;
    end
  end
endmodule
