// tb_lr_engine: end-to-end test of the multigrid engine on a reduced 8^3
// grid with a 3^3 kernel and 20 particles. A real-arithmetic reference
// computes the charge grid with cubic B-spline weights, the periodic
// convolution, and the interpolated q*phi and -q*grad(phi); every result
// must agree within 1e-3. Also checks that each phase ran, and that the
// convolution phase streamed one grid point per cycle ((8+2)^3 cycles).
module tb_lr_engine;
  import md_pkg::*;
  localparam int GB = 3, G = 8, K = 3, R = 1, NP = 32, NPW = 5, NPART = 20;
  localparam real S = 2.0 ** 24;
  logic clk = 0, rst_n = 0;
  logic pos_we = 0, chg_we = 0, ker_we = 0, start = 0, busy, done;
  logic [NPW-1:0] pos_addr = '0, res_addr = '0;
  particle_t pos_data;
  logic [TYPE_W-1:0] chg_type = '0;
  data_t chg_data = '0, ker_data = '0, res_data;
  logic [4:0] ker_addr = '0;
  logic [NPW:0] np = NPART;
  logic [2:0] phase;
  logic [1:0] res_comp = '0;
  int checks = 0, failures = 0;
  int phase_cycles [8];

  lr_engine #(.GB(GB), .K(K), .NP(NP)) dut (.clk(clk), .rst_n(rst_n), .pos_we(pos_we),
    .pos_addr(pos_addr), .pos_data(pos_data), .chg_we(chg_we), .chg_type(chg_type),
    .chg_data(chg_data), .ker_we(ker_we), .ker_addr(ker_addr), .ker_data(ker_data), .np(np),
    .start(start), .busy(busy), .done(done), .phase(phase), .res_addr(res_addr),
    .res_comp(res_comp), .res_data(res_data));

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(posedge clk) if (rst_n && busy) phase_cycles[phase]++;

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

  particle_t parts [NPART];
  real qt [32];
  real h [K][K][K];
  real qg [G][G][G], vg [G][G][G];

  initial begin
    // reference inputs
    for (int t = 0; t < 32; t++) qt[t] = real'(int'($urandom_range(0, 2000)) - 1000) / 1000.0;
    for (int a = 0; a < K; a++) for (int b = 0; b < K; b++) for (int c = 0; c < K; c++)
      h[a][b][c] = real'(int'($urandom_range(0, 2000)) - 1000) / 2000.0;
    for (int p = 0; p < NPART; p++) parts[p] = particle_t'({$urandom, $urandom, $urandom, $urandom});
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 32; t++) begin
      @(negedge clk); chg_we = 1; chg_type = 5'(t); chg_data = data_t'(longint'(qt[t] * S));
      qt[t] = real'(longint'(chg_data)) / S;
    end
    @(negedge clk) chg_we = 0;
    for (int a = 0; a < K; a++) for (int b = 0; b < K; b++) for (int c = 0; c < K; c++) begin
      @(negedge clk); ker_we = 1; ker_addr = 5'(a * K * K + b * K + c);
      ker_data = data_t'(longint'(h[a][b][c] * S));
      h[a][b][c] = real'(longint'(ker_data)) / S;
    end
    @(negedge clk) ker_we = 0;
    for (int p = 0; p < NPART; p++) begin
      @(negedge clk); pos_we = 1; pos_addr = NPW'(p); pos_data = parts[p];
    end
    @(negedge clk) pos_we = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    wait (done);
    @(negedge clk);
    // reference: charge assignment
    for (int x = 0; x < G; x++) for (int y = 0; y < G; y++) for (int z = 0; z < G; z++) qg[x][y][z] = 0.0;
    for (int p = 0; p < NPART; p++) begin
      int bx, by, bz;
      real wx, wy, wz, q;
      bx = int'(parts[p].x[34:32]); wx = real'(parts[p].x[31:8]) / S;
      by = int'(parts[p].y[34:32]); wy = real'(parts[p].y[31:8]) / S;
      bz = int'(parts[p].z[34:32]); wz = real'(parts[p].z[31:8]) / S;
      q = qt[parts[p].t];
      for (int a = 0; a < 4; a++) for (int b = 0; b < 4; b++) for (int c = 0; c < 4; c++)
        qg[(bx + a + G - 1) % G][(by + b + G - 1) % G][(bz + c + G - 1) % G] += q * bs(a, wx) * bs(b, wy) * bs(c, wz);
    end
    // periodic convolution V[g] = sum_k h[kz][ky][kx] Q[g + R - k]
    for (int x = 0; x < G; x++) for (int y = 0; y < G; y++) for (int z = 0; z < G; z++) begin
      vg[x][y][z] = 0.0;
      for (int kz = 0; kz < K; kz++) for (int ky = 0; ky < K; ky++) for (int kx = 0; kx < K; kx++)
        vg[x][y][z] += h[kz][ky][kx] * qg[(x + R - kx + G) % G][(y + R - ky + G) % G][(z + R - kz + G) % G];
    end
    // interpolation and comparison
    for (int p = 0; p < NPART; p++) begin
      int bx, by, bz;
      real wx, wy, wz, q, e [4];
      bx = int'(parts[p].x[34:32]); wx = real'(parts[p].x[31:8]) / S;
      by = int'(parts[p].y[34:32]); wy = real'(parts[p].y[31:8]) / S;
      bz = int'(parts[p].z[34:32]); wz = real'(parts[p].z[31:8]) / S;
      q = qt[parts[p].t];
      e = '{0.0, 0.0, 0.0, 0.0};
      for (int a = 0; a < 4; a++) for (int b = 0; b < 4; b++) for (int c = 0; c < 4; c++) begin
        real v;
        v = vg[(bx + a + G - 1) % G][(by + b + G - 1) % G][(bz + c + G - 1) % G];
        e[0] += q * v * bs(a, wx) * bs(b, wy) * bs(c, wz);
        e[1] -= q * v * dbs(a, wx) * bs(b, wy) * bs(c, wz);
        e[2] -= q * v * bs(a, wx) * dbs(b, wy) * bs(c, wz);
        e[3] -= q * v * bs(a, wx) * bs(b, wy) * dbs(c, wz);
      end
      for (int m = 0; m < 4; m++) begin
        real got;
        res_addr = NPW'(p); res_comp = 2'(m);
        @(posedge clk); #1;
        got = real'(longint'(res_data)) / S;
        checks++;
        if ((got - e[m]) ** 2 > 1.0e-6) begin
          failures++;
          if (failures < 10) $display("FAIL particle %0d comp %0d: %f exp %f", p, m, got, e[m]);
        end
      end
    end
    $display("phase cycles: clear %0d assign %0d conv %0d interp %0d drain %0d",
      phase_cycles[1], phase_cycles[2], phase_cycles[3], phase_cycles[4], phase_cycles[5]);
    checks++;
    if (phase_cycles[1] == 0 || phase_cycles[2] == 0 || phase_cycles[4] == 0 ||
        phase_cycles[3] != (G + 2 * R) ** 3) begin
      failures++;
      $display("FAIL phase coverage or convolution rate");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
