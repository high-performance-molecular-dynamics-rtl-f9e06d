// pair_ctrl: the pair controller of the short-range engine. It walks every
// cell A and, for each, cell A itself and its 13 "forward" neighbours (the
// half shell, with periodic wrap-around), so every pair of neighbouring cells
// is visited once and Newton's third law gives the other half. For each cell
// pair it runs the four steps of the force pipeline array:
//   1. LOADI: read one row (N particles) of cell A into the Pi array;
//   2. SWEEP: for the particle in the Pi register, issue one row of cell B
//      (N particles into the Pj registers) per cycle;
//   3. move to the next Pi lane and repeat step 2;
//   4. DRAIN, then WB: once the pipelines are empty, add the Pi acceleration
//      array into the acceleration memory, then go on with the next row of A.
// The per-lane mask drops dummy (padding) particles and, inside cell A itself,
// every pair but j > i, so that no pair is counted twice.
// Before the traversal a CLEAR phase zeroes the acceleration memory, one row
// per cycle. The traversal order and the four steps follow the document; the
// half shell, the clear phase and draining the pipeline before each
// write-back (which keeps the write-back from racing in-flight results) are
// this design's choices.
// Handshake: pulse `start`; `busy` is high until the one-cycle `done` pulse.
module pair_ctrl
  import md_pkg::*;
#(
  parameter int unsigned N     = 2,
  parameter int unsigned CDIM  = 4,                 // cells per box edge
  parameter int unsigned NCELL = CDIM * CDIM * CDIM,
  parameter int unsigned ROWS  = 2048 / N,
  parameter int unsigned DRAIN = FP_LAT + 3,        // cycles to empty the pipes
  parameter int unsigned CW    = $clog2(NCELL),
  parameter int unsigned RW    = $clog2(ROWS),
  parameter int unsigned PW    = $clog2(ROWS * N) + 1,
  parameter int unsigned LW    = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          done,
  // cell lookups (cell_index)
  output logic [CW-1:0] cell_a,
  output logic [CW-1:0] cell_b,
  input  logic [RW-1:0] base_a,
  input  logic [RW:0]   rows_a,
  input  logic [PW-1:0] count_a,
  input  logic [RW-1:0] base_b,
  input  logic [RW:0]   rows_b,
  input  logic [PW-1:0] count_b,
  // acceleration memory clear
  output logic          clr_en,
  output logic [RW-1:0] clr_row,
  // step 1: load the Pi array
  output logic          pi_load,
  output logic [RW-1:0] pi_row,
  // step 2: issue one row of cell B against Pi register lane li
  output logic          iss_valid,
  output logic [RW-1:0] iss_row,
  output logic [LW-1:0] iss_li,
  output logic [N-1:0]  iss_mask,
  // step 4: write back the Pi acceleration array
  output logic          wb_valid,
  output logic [RW-1:0] wb_row,
  output logic          draining
);
  typedef enum logic [2:0] {S_IDLE, S_CLEAR, S_PAIR, S_LOADI, S_SWEEP, S_DRAIN, S_WB, S_NEXT} state_t;
  state_t state;

  localparam int unsigned DW = $clog2(DRAIN + 1);

  logic [CW-1:0] ca;
  logic [3:0]    nb;
  logic [RW:0]   ra, rb;
  logic [LW-1:0] li;
  logic [RW-1:0] crow;
  logic [DW-1:0] dcnt;

  // half-shell neighbour offsets: (0,0,0) then the 13 forward neighbours
  function automatic void nb_off(input logic [3:0] n, output int ox, output int oy, output int oz);
    if (n == 0) begin
      ox = 0; oy = 0; oz = 0;
    end else if (n <= 9) begin            // dz = +1, any dx, dy
      oz = 1; ox = (int'(n) - 1) % 3 - 1; oy = (int'(n) - 1) / 3 - 1;
    end else if (n <= 12) begin           // dz = 0, dy = +1, any dx
      oz = 0; oy = 1; ox = int'(n) - 11;
    end else begin                        // dz = 0, dy = 0, dx = +1
      oz = 0; oy = 0; ox = 1;
    end
  endfunction

  always_comb begin
    int ax, ay, az, ox, oy, oz, bx, by, bz;
    ax = int'(ca) % int'(CDIM);
    ay = (int'(ca) / int'(CDIM)) % int'(CDIM);
    az = int'(ca) / int'(CDIM * CDIM);
    nb_off(nb, ox, oy, oz);
    bx = (ax + ox + int'(CDIM)) % int'(CDIM);
    by = (ay + oy + int'(CDIM)) % int'(CDIM);
    bz = (az + oz + int'(CDIM)) % int'(CDIM);
    cell_a = ca;
    cell_b = CW'(bz * int'(CDIM * CDIM) + by * int'(CDIM) + bx);
  end

  // particle indices within the cells
  logic [PW+RW:0] iidx;
  logic           pi_ok;
  assign iidx  = (PW+RW+1)'(ra) * (PW+RW+1)'(N) + (PW+RW+1)'(li);
  assign pi_ok = iidx < (PW+RW+1)'(count_a);

  always_comb begin
    for (int k = 0; k < int'(N); k++) begin
      logic [PW+RW:0] jidx;
      jidx = (PW+RW+1)'(rb) * (PW+RW+1)'(N) + (PW+RW+1)'(k);
      iss_mask[k] = (jidx < (PW+RW+1)'(count_b)) && ((nb != 0) || (jidx > iidx));
    end
  end

  assign busy      = (state != S_IDLE);
  assign clr_en    = (state == S_CLEAR);
  assign clr_row   = crow;
  assign pi_load   = (state == S_LOADI);
  assign pi_row    = base_a + RW'(ra);
  assign iss_valid = (state == S_SWEEP) && pi_ok;
  assign iss_row   = base_b + RW'(rb);
  assign iss_li    = li;
  assign wb_valid  = (state == S_WB);
  assign wb_row    = base_a + RW'(ra);
  assign draining  = (state == S_DRAIN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; done <= 1'b0; ca <= '0; nb <= '0; ra <= '0; rb <= '0;
      li <= '0; crow <= '0; dcnt <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_CLEAR; crow <= '0;
        end
        S_CLEAR: begin
          crow <= crow + 1'b1;
          if (32'(crow) == ROWS - 1) begin
            state <= S_PAIR; ca <= '0; nb <= '0;
          end
        end
        S_PAIR: begin
          ra <= '0;
          if (rows_a == 0 || rows_b == 0) state <= S_NEXT;
          else                            state <= S_LOADI;
        end
        S_LOADI: begin
          li <= '0; rb <= '0; state <= S_SWEEP;
        end
        S_SWEEP: begin
          if (!pi_ok) begin
            state <= S_DRAIN; dcnt <= '0;
          end else if (rb == rows_b - 1) begin
            rb <= '0;
            if (32'(li) == N - 1) begin
              state <= S_DRAIN; dcnt <= '0;
            end else begin
              li <= li + 1'b1;
            end
          end else begin
            rb <= rb + 1'b1;
          end
        end
        S_DRAIN: begin
          dcnt <= dcnt + 1'b1;
          if (32'(dcnt) == DRAIN - 1) state <= S_WB;
        end
        S_WB: begin
          if (ra == rows_a - 1) state <= S_NEXT;
          else begin
            ra <= ra + 1'b1; state <= S_LOADI;
          end
        end
        S_NEXT: begin
          if (nb == 4'd13) begin
            nb <= '0;
            if (32'(ca) == NCELL - 1) begin
              state <= S_IDLE; done <= 1'b1;
            end else begin
              ca <= ca + 1'b1; state <= S_PAIR;
            end
          end else begin
            nb <= nb + 1'b1; state <= S_PAIR;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
