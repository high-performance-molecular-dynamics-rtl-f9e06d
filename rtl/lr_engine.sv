// lr_engine: the long-range (multigrid) engine, the second FPGA of the
// system. One run goes through four phases, reusing the same compute modules
// under a sequencer that sets the multiplexers and addresses:
//   CLEAR   zero the Q-store (charge grid), 64 points per cycle;
//   ASSIGN  per particle (one per cycle): basis weights for x, y, z, the
//           charge from the type-parameter memory, the 1:64 converter tree,
//           and a 64-point accumulate into the interleaved Q-store;
//   CONV    stream the charge grid, extended by the kernel radius with
//           periodic wrap, through the 3D convolver and write the window
//           outputs into the V-store (potential grid);
//   INTERP  per particle, four passes through the same tree with weights
//           Phi.Phi.Phi, dPhi.Phi.Phi, Phi.dPhi.Phi, Phi.Phi.dPhi: a 64-point
//           block read from the V-store, a dot product, and a multiply by the
//           charge give q*phi and the force -q*grad(phi) (per grid spacing).
// Only the finest grid level is built: the document gives neither the
// restriction/prolongation operators nor the level count of its multigrid,
// so the grid-grid kernel here is one host-loaded K^3 kernel.
// Interface: host write ports for particles, charges and the kernel, `np`
// (particle count), start/busy/done, and a synchronous result read port
// (res_comp 0: q*phi, 1..3: force x, y, z). Results appear one cycle after
// the read address.
module lr_engine
  import md_pkg::*;
#(
  parameter int unsigned GB  = 5,      // grid is 2^GB points per edge
  parameter int unsigned K   = 5,      // convolution kernel size
  parameter int unsigned NP  = 2048,   // particle capacity
  parameter int unsigned WF  = 24,     // fraction bits of weights and kernel
  parameter int unsigned NPW = $clog2(NP)
) (
  input  logic              clk,
  input  logic              rst_n,
  // downloads
  input  logic              pos_we,
  input  logic [NPW-1:0]    pos_addr,
  input  particle_t         pos_data,
  input  logic              chg_we,
  input  logic [TYPE_W-1:0] chg_type,
  input  data_t             chg_data,
  input  logic              ker_we,
  input  logic [$clog2(K*K*K)-1:0] ker_addr,   // kz*K*K + ky*K + kx
  input  data_t             ker_data,
  input  logic [NPW:0]      np,
  // control
  input  logic              start,
  output logic              busy,
  output logic              done,
  output logic [2:0]        phase,
  // results
  input  logic [NPW-1:0]    res_addr,
  input  logic [1:0]        res_comp,
  output data_t             res_data
);
  localparam int unsigned G   = 1 << GB;
  localparam int unsigned R   = (K - 1) / 2;
  localparam int unsigned E   = G + 2 * R;           // extended edge
  localparam int unsigned EW  = $clog2(E);
  localparam int unsigned BW  = 3 * (GB - 2);
  localparam int unsigned LMAX = 1 << $clog2(E);
  localparam int unsigned PMAX = 1 << $clog2(E * E);
  localparam int unsigned LAW  = $clog2(LMAX);
  localparam int unsigned PAW  = $clog2(PMAX);
  localparam data_t       ONE  = data_t'(1) << WF;
  // datapath latencies: particle read 1, basis 3, tree 3, dot 1, charge 1
  localparam int unsigned DRAIN_P = 12;
  localparam int unsigned DRAIN_C = 6;

  typedef enum logic [2:0] {P_IDLE, P_CLEAR, P_ASSIGN, P_CONV, P_INTERP, P_DRAIN} phase_t;
  phase_t        st, nxt_after_drain;
  logic [NPW:0]  pidx;
  logic [1:0]    mode;
  logic [BW-1:0] crow;
  logic [EW-1:0] ex, ey, ez;
  logic [4:0]    dcnt, dlen;

  // ---------------- memories written by the host
  particle_t pmem [NP];
  data_t     cmem [1 << TYPE_W];
  data_t     ker  [K][K][K];
  data_t     rmem [NP][4];

  always_ff @(posedge clk) begin
    if (pos_we) pmem[pos_addr] <= pos_data;
    if (chg_we) cmem[chg_type] <= chg_data;
    if (ker_we) ker[32'(ker_addr) / (K*K)][(32'(ker_addr) / K) % K][32'(ker_addr) % K] <= ker_data;
  end

  // ---------------- sequencer
  logic iss;        // a particle pass is issued this cycle
  logic is_assign;
  assign iss       = ((st == P_ASSIGN) || (st == P_INTERP)) && (pidx < np);
  assign is_assign = (st == P_ASSIGN);
  assign busy      = (st != P_IDLE);
  assign phase     = st;

  logic conv_iss;
  assign conv_iss = (st == P_CONV);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= P_IDLE; nxt_after_drain <= P_IDLE; pidx <= '0; mode <= '0; crow <= '0;
      ex <= '0; ey <= '0; ez <= '0; dcnt <= '0; dlen <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        P_IDLE: if (start) begin
          st <= P_CLEAR; crow <= '0;
        end
        P_CLEAR: begin
          crow <= crow + 1'b1;
          if (&crow) begin
            st <= P_ASSIGN; pidx <= '0;
          end
        end
        P_ASSIGN: begin
          if (pidx >= np) begin
            st <= P_DRAIN; dcnt <= '0; dlen <= 5'(DRAIN_P); nxt_after_drain <= P_CONV;
            ex <= '0; ey <= '0; ez <= '0;
          end else pidx <= pidx + 1'b1;
        end
        P_CONV: begin
          if (32'(ex) == E - 1) begin
            ex <= '0;
            if (32'(ey) == E - 1) begin
              ey <= '0;
              if (32'(ez) == E - 1) begin
                st <= P_DRAIN; dcnt <= '0; dlen <= 5'(DRAIN_C); nxt_after_drain <= P_INTERP;
                pidx <= '0; mode <= '0;
              end else ez <= ez + 1'b1;
            end else ey <= ey + 1'b1;
          end else ex <= ex + 1'b1;
        end
        P_INTERP: begin
          if (pidx >= np) begin
            st <= P_DRAIN; dcnt <= '0; dlen <= 5'(DRAIN_P); nxt_after_drain <= P_IDLE;
          end else begin
            mode <= mode + 1'b1;
            if (mode == 2'd3) pidx <= pidx + 1'b1;
          end
        end
        P_DRAIN: begin
          dcnt <= dcnt + 1'b1;
          if (dcnt == dlen - 1) begin
            st <= nxt_after_drain;
            if (nxt_after_drain == P_IDLE) done <= 1'b1;
          end
        end
        default: st <= P_IDLE;
      endcase
    end
  end

  // ---------------- particle datapath
  // c1: particle read
  particle_t p1;
  logic      v1, a1;
  logic [1:0] m1;
  logic [NPW-1:0] i1;
  always_ff @(posedge clk) p1 <= pmem[NPW'(pidx)];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; a1 <= 1'b0; m1 <= '0; i1 <= '0;
    end else begin
      v1 <= iss; a1 <= is_assign; m1 <= mode; i1 <= NPW'(pidx);
    end
  end

  // c2: charge read
  data_t q2;
  always_ff @(posedge clk) q2 <= cmem[p1.t];

  // c1..c4: basis pipelines
  logic [GB-1:0] bx, by, bz;
  data_t phx [4], phy [4], phz [4], dphx [4], dphy [4], dphz [4];
  logic  bv, bv_y, bv_z;
  basis_pipe #(.GB(GB), .WF(WF)) u_bx (.clk(clk), .rst_n(rst_n), .in_valid(v1), .pos(p1.x),
    .out_valid(bv), .base(bx), .phi(phx), .dphi(dphx));
  basis_pipe #(.GB(GB), .WF(WF)) u_by (.clk(clk), .rst_n(rst_n), .in_valid(v1), .pos(p1.y),
    .out_valid(bv_y), .base(by), .phi(phy), .dphi(dphy));
  basis_pipe #(.GB(GB), .WF(WF)) u_bz (.clk(clk), .rst_n(rst_n), .in_valid(v1), .pos(p1.z),
    .out_valid(bv_z), .base(bz), .phi(phz), .dphi(dphz));

  // tags to c4
  data_t q4;
  logic  a4;
  logic [1:0] m4;
  logic [NPW-1:0] i4;
  delay_line #(.W(DATA_W), .D(2)) u_dq (.clk(clk), .rst_n(rst_n), .d(q2), .q(q4));
  delay_line #(.W(1 + 2 + NPW), .D(3)) u_dt (.clk(clk), .rst_n(rst_n),
    .d({a1, m1, i1}), .q({a4, m4, i4}));

  // c4: converter tree input
  data_t tval, tx [4], ty [4], tz [4];
  always_comb begin
    tval = a4 ? q4 : ONE;
    for (int k = 0; k < 4; k++) begin
      tx[k] = (!a4 && m4 == 2'd1) ? dphx[k] : phx[k];
      ty[k] = (!a4 && m4 == 2'd2) ? dphy[k] : phy[k];
      tz[k] = (!a4 && m4 == 2'd3) ? dphz[k] : phz[k];
    end
  end
  logic  tv;
  data_t w [64];
  pg_converter #(.WF(WF)) u_tree (.clk(clk), .rst_n(rst_n), .in_valid(bv),
    .val(tval), .phx(tx), .phy(ty), .phz(tz), .out_valid(tv), .out(w));

  // tags to c7 (origin, charge, mode, index)
  logic [GB-1:0] ox7, oy7, oz7, ox6, oy6, oz6;
  data_t q7;
  logic  a7;
  logic [1:0] m7;
  logic [NPW-1:0] i7;
  delay_line #(.W(3*GB), .D(2)) u_do6 (.clk(clk), .rst_n(rst_n), .d({bx, by, bz}), .q({ox6, oy6, oz6}));
  delay_line #(.W(3*GB), .D(1)) u_do7 (.clk(clk), .rst_n(rst_n), .d({ox6, oy6, oz6}), .q({ox7, oy7, oz7}));
  delay_line #(.W(DATA_W + 1 + 2 + NPW), .D(3)) u_dt7 (.clk(clk), .rst_n(rst_n),
    .d({q4, a4, m4, i4}), .q({q7, a7, m7, i7}));

  // ---------------- conv stream
  logic [GB-1:0] gx, gy, gz;
  assign gx = GB'(ex - EW'(R));
  assign gy = GB'(ey - EW'(R));
  assign gz = GB'(ez - EW'(R));

  data_t q_pt, v_blk [64];
  logic  cv1, cv4, cvo;
  logic [3*EW-1:0] ce4;
  data_t cy;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cv1 <= 1'b0;
    else        cv1 <= conv_iss;
  end
  conv3d #(.K(K), .CF(WF), .LMAX(LMAX), .PMAX(PMAX), .LAW(LAW), .PAW(PAW)) u_conv (
    .clk(clk), .rst_n(rst_n), .len_x((LAW+1)'(E)), .len_xy((PAW+1)'(E * E)),
    .in_valid(cv1), .x(q_pt), .h(ker), .out_valid(cvo), .y(cy));
  delay_line #(.W(1 + 3*EW), .D(4)) u_dce (.clk(clk), .rst_n(rst_n),
    .d({conv_iss, ez, ey, ex}), .q({cv4, ce4}));

  logic [EW-1:0] oex, oey, oez;
  logic          vwr;
  assign {oez, oey, oex} = ce4;
  assign vwr = cvo && cv4 && (32'(oex) >= K - 1) && (32'(oey) >= K - 1) && (32'(oez) >= K - 1);

  // ---------------- grid stores
  grid_mem #(.GB(GB), .BW(BW)) u_qstore (
    .clk(clk),
    .rd_x('0), .rd_y('0), .rd_z('0), .rd_data(),
    .add_en(tv && a7), .add_x(ox7), .add_y(oy7), .add_z(oz7), .add_data(w),
    .pt_we(1'b0), .pt_x(gx), .pt_y(gy), .pt_z(gz), .pt_wdata('0), .pt_rdata(q_pt),
    .clr_en(st == P_CLEAR), .clr_addr(crow)
  );

  data_t vblk_unused;
  grid_mem #(.GB(GB), .BW(BW)) u_vstore (
    .clk(clk),
    .rd_x(ox6), .rd_y(oy6), .rd_z(oz6), .rd_data(v_blk),
    .add_en(1'b0), .add_x('0), .add_y('0), .add_z('0), .add_data(w),
    .pt_we(vwr), .pt_x(GB'(32'(oex) - (K - 1))), .pt_y(GB'(32'(oey) - (K - 1))),
    .pt_z(GB'(32'(oez) - (K - 1))), .pt_wdata(cy), .pt_rdata(vblk_unused),
    .clr_en(1'b0), .clr_addr('0)
  );

  // ---------------- interpolation: dot product, charge product, store
  data_t dot8, q8;
  logic  v8;
  logic [1:0] m8;
  logic [NPW-1:0] i8;
  logic signed [2*DATA_W+6:0] dot_s;
  always_comb begin
    dot_s = '0;
    for (int k = 0; k < 64; k++) dot_s = dot_s + (2*DATA_W+7)'(v_blk[k] * w[k]);
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v8 <= 1'b0; dot8 <= '0; q8 <= '0; m8 <= '0; i8 <= '0;
    end else begin
      v8   <= tv && !a7;
      dot8 <= data_t'(dot_s >>> WF);
      q8 <= q7; m8 <= m7; i8 <= i7;
    end
  end

  always_ff @(posedge clk) begin
    if (v8) begin
      logic signed [2*DATA_W-1:0] p;
      p = q8 * dot8;
      rmem[i8][m8] <= (m8 == 2'd0) ? data_t'(p >>> WF) : -data_t'(p >>> WF);
    end
    res_data <= rmem[res_addr][res_comp];
  end
endmodule
