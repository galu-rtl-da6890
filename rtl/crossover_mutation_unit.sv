// crossover_mutation_unit: parent pairing, crossover and adaptive mutation;
// writes the next population into the key buffer.
//
// Parent pairing (disparity-aware). The L parents arrive sorted by fitness.
// For each of the L/2 pairs, the first parent is the fittest parent not yet
// paired; the unit then scans all parents, one per cycle, and takes as its
// spouse the unpaired one at the largest Hamming distance (Eq. 8 without
// the root and the constant factor; ties go to the fitter one).
//
// Crossover. With probability p_cross (one random word) the pair is crossed.
// Each pair gives C children as C/2 complementary couples: for each couple an
// exchange mask is drawn with per-bit probability p_exch, and the children
// are K1 with the masked bits taken from K2, and K2 with the masked bits
// taken from K1. An uncrossed pair yields C/2 copies of each parent.
//
// Mutation. When the diversity unit enables mutation, each child is mutated
// with probability p_mutate; a mutated child is XORed with a random mask
// whose bits are set with probability p_flip.
//
// Random masks use two bits per 32-bit random word (a 16-bit comparison
// each), so a mask takes ceil(K/2) cycles. Each child is written to key
// buffer entry 0, 1, ... in turn; `written` counts them and lets the
// emulator start on the new epoch at once. With P = (L/2) * C the
// population size is preserved. ev_cross and ev_mutate pulse for each
// crossed pair and each mutated child.
//
// Pairing, p_cross / p_exch crossover and p_mutate / p_flip mutation follow
// the design, which uses one crossover/mutation unit. The complementary
// children, the mask generator and the serial spouse scan are this design's
// own choices.
module crossover_mutation_unit import galu_pkg::*; #(
  parameter int                P       = 100,
  parameter int                L       = 50,
  parameter int                C       = 4,
  parameter int                K       = 16,
  parameter logic [PROB_W-1:0] P_CROSS = P_CROSS_DEFAULT,
  parameter logic [PROB_W-1:0] P_EXCH  = P_EXCH_DEFAULT,
  parameter logic [PROB_W-1:0] P_FLIP  = P_FLIP_DEFAULT,
  localparam int PW = $clog2(P),
  localparam int LW = $clog2(L),
  localparam int KW = $clog2(K + 2),
  localparam int DW = $clog2(K + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [L-1:0][K-1:0] parents,
  input  logic                mutate_en,
  input  logic [PROB_W-1:0]   p_mutate,
  input  logic [31:0]         rand_data,
  output logic                rand_next,
  output logic                wr_en,
  output logic [PW-1:0]       wr_addr,
  output logic [K-1:0]        wr_data,
  output logic [PW:0]         written,
  output logic                ev_cross,
  output logic                ev_mutate,
  output logic                busy,
  output logic                done
);
  typedef enum logic [3:0] {
    S_IDLE, S_FIRST, S_SCAN, S_SPOUSE, S_XDEC, S_NEWMASK, S_MASKX,
    S_CHILD, S_MUTDEC, S_MASKF, S_WRITE
  } state_e;
  state_e state;

  logic [L-1:0]   used;
  logic [K-1:0]   p1, p2, xmask, child;
  logic [LW-1:0]  q, best_q, first_idx;
  logic [DW-1:0]  best_d, hdist;
  logic           have_best, do_cross, csel;
  logic [KW-1:0]  mb;
  logic [$clog2(C/2+1)-1:0] couple;
  logic [LW-1:0]  pair;
  logic           bit_lo, bit_hi;

  assign busy = (state != S_IDLE);

  // Hamming distance of the first parent to candidate q.
  always_comb begin
    hdist = '0;
    for (int b = 0; b < K; b++) hdist = hdist + DW'(p1[b] ^ parents[q][b]);
  end

  // Fittest unpaired parent.
  always_comb begin
    first_idx = '0;
    for (int i = L - 1; i >= 0; i--) if (!used[i]) first_idx = LW'(i);
  end

  // Two random mask bits per word, at the probability of the current mask.
  always_comb begin
    logic [PROB_W-1:0] thr;
    thr    = (state == S_MASKX) ? P_EXCH : P_FLIP;
    bit_lo = rand_data[15:0]  < thr;
    bit_hi = rand_data[31:16] < thr;
  end

  assign rand_next = (state == S_XDEC) || (state == S_MASKX) ||
                     (state == S_MUTDEC) || (state == S_MASKF);
  assign wr_en   = (state == S_WRITE);
  assign wr_addr = written[PW-1:0];
  assign wr_data = child;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      used      <= '0;
      p1        <= '0;
      p2        <= '0;
      xmask     <= '0;
      child     <= '0;
      q         <= '0;
      best_q    <= '0;
      best_d    <= '0;
      have_best <= 1'b0;
      do_cross     <= 1'b0;
      csel      <= 1'b0;
      mb        <= '0;
      couple    <= '0;
      pair      <= '0;
      written   <= '0;
      ev_cross  <= 1'b0;
      ev_mutate <= 1'b0;
      done      <= 1'b0;
    end else begin
      done      <= 1'b0;
      ev_cross  <= 1'b0;
      ev_mutate <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          used    <= '0;
          pair    <= '0;
          written <= '0;
          state   <= S_FIRST;
        end
        S_FIRST: begin
          p1              <= parents[first_idx];
          used[first_idx] <= 1'b1;
          q               <= '0;
          have_best       <= 1'b0;
          state           <= S_SCAN;
        end
        S_SCAN: begin
          if (!used[q] && (!have_best || hdist > best_d)) begin
            best_q    <= q;
            best_d    <= hdist;
            have_best <= 1'b1;
          end
          if (q == LW'(L - 1)) state <= S_SPOUSE;
          else                 q <= q + 1'b1;
        end
        S_SPOUSE: begin
          p2           <= parents[best_q];
          used[best_q] <= 1'b1;
          state        <= S_XDEC;
        end
        S_XDEC: begin
          do_cross    <= rand_data[15:0] < P_CROSS;
          ev_cross <= rand_data[15:0] < P_CROSS;
          couple   <= '0;
          state    <= S_NEWMASK;
        end
        S_NEWMASK: begin
          xmask <= '0;
          mb    <= '0;
          csel  <= 1'b0;
          state <= do_cross ? S_MASKX : S_CHILD;
        end
        S_MASKX: begin
          xmask[mb] <= bit_lo;
          if (32'(mb) + 1 < K) xmask[mb + 1'b1] <= bit_hi;
          if (32'(mb) + 2 >= K) state <= S_CHILD;
          else                  mb <= mb + 2'd2;
        end
        S_CHILD: begin
          child <= csel ? (p2 ^ (xmask & (p1 ^ p2))) : (p1 ^ (xmask & (p1 ^ p2)));
          state <= mutate_en ? S_MUTDEC : S_WRITE;
        end
        S_MUTDEC: begin
          mb <= '0;
          if (rand_data[15:0] < p_mutate) begin
            ev_mutate <= 1'b1;
            state     <= S_MASKF;
          end else begin
            state <= S_WRITE;
          end
        end
        S_MASKF: begin
          child[mb] <= child[mb] ^ bit_lo;
          if (32'(mb) + 1 < K) child[mb + 1'b1] <= child[mb + 1'b1] ^ bit_hi;
          if (32'(mb) + 2 >= K) state <= S_WRITE;
          else                  mb <= mb + 2'd2;
        end
        S_WRITE: begin
          written <= written + 1'b1;
          if (!csel) begin
            csel  <= 1'b1;
            state <= S_CHILD;
          end else if (couple != ($clog2(C/2+1))'(C / 2 - 1)) begin
            couple <= couple + 1'b1;
            state  <= S_NEWMASK;
          end else if (pair == LW'(L / 2 - 1)) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            pair  <= pair + 1'b1;
            state <= S_FIRST;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The population is refilled exactly.
  initial begin
    if (P != (L / 2) * C) $error("population size P must equal (L/2)*C");
  end
endmodule
