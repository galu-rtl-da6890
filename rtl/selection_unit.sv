// selection_unit: probabilistic (fitness-proportionate) population
// selection with replacement, Eq. 7.
//
// Inputs are the population sorted by descending fitness (order, fit_s)
// from the sorting engine. On `start`:
//  1. Prefix phase, P cycles: cum[r] = sum over ranks 0..r of
//     (fit_s[r] - F_min), F_min = fit_s[P-1]. The worst key therefore has
//     zero weight. S = cum[P-1].
//  2. Sample phase, L cycles: each cycle takes a 32-bit random word u,
//     scales it to x = floor(u * S / 2^32) in [0, S) and picks the rank
//     r = number of cum entries <= x (P comparators in parallel), i.e. rank
//     r with probability (fit_s[r] - F_min) / S. If S = 0 (all keys equally
//     fit) the rank is floor(u * P / 2^32), uniform. A histogram counts how
//     often each rank was drawn.
//  3. Emit phase: ranks are visited best first and each drawn rank's key is
//     read from the key buffer and written to the parent buffer as many
//     times as it was drawn, one copy per cycle. The L parents therefore come
//     out sorted by fitness, as the pairing step needs.
// `done` pulses when the parent buffer is complete. rand_next pulses once per
// random word used.
//
// The selection rule (Eq. 7, sampling with replacement, L survivors) follows
// the design; the prefix-sum sampler and histogram are this design's own.
module selection_unit #(
  parameter int P  = 100,
  parameter int L  = 50,
  parameter int K  = 16,
  parameter int FW = 10,
  localparam int PW = $clog2(P),
  localparam int SW = FW + $clog2(P + 1),
  localparam int HW = $clog2(L + 1),
  localparam int LW = $clog2(L)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [P-1:0][PW-1:0] order,
  input  logic [P-1:0][FW-1:0] fit_s,
  input  logic [31:0]          rand_data,
  output logic                 rand_next,
  output logic [PW-1:0]        key_addr,
  input  logic [K-1:0]         key_data,
  output logic [L-1:0][K-1:0]  parents,
  output logic                 zero_sum,
  output logic                 busy,
  output logic                 done
);
  typedef enum logic [1:0] {S_IDLE, S_PREFIX, S_SAMPLE, S_EMIT} state_e;
  state_e state;

  logic [SW-1:0] cum  [P];
  logic [HW-1:0] hist [P];
  logic [PW-1:0] r;
  logic [LW-1:0] n;
  logic [SW-1:0] run, total, x;
  logic [PW:0]   rank;
  logic [FW-1:0] fmin;

  assign fmin     = fit_s[P-1];
  assign total    = cum[P-1];
  assign key_addr = order[r];
  assign busy     = (state != S_IDLE);

  // Scaled sample and its rank.
  always_comb begin
    x    = SW'((64'(rand_data) * 64'(total)) >> 32);
    rank = '0;
    if (total == '0) begin
      rank = (PW + 1)'((64'(rand_data) * 64'(P)) >> 32);
    end else begin
      for (int i = 0; i < P; i++) rank = rank + (PW + 1)'(cum[i] <= x);
    end
  end

  assign rand_next = (state == S_SAMPLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      r        <= '0;
      n        <= '0;
      run      <= '0;
      done     <= 1'b0;
      zero_sum <= 1'b0;
      for (int i = 0; i < P; i++) begin
        cum[i]  <= '0;
        hist[i] <= '0;
      end
      parents <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_PREFIX;
          r     <= '0;
          run   <= '0;
          for (int i = 0; i < P; i++) hist[i] <= '0;
        end
        S_PREFIX: begin
          cum[r] <= run + SW'(fit_s[r] - fmin);
          run    <= run + SW'(fit_s[r] - fmin);
          if (r == PW'(P - 1)) begin
            state <= S_SAMPLE;
            n     <= '0;
          end else begin
            r <= r + 1'b1;
          end
        end
        S_SAMPLE: begin
          zero_sum   <= (total == '0);
          hist[rank[PW-1:0]] <= hist[rank[PW-1:0]] + 1'b1;
          if (n == LW'(L - 1)) begin
            state <= S_EMIT;
            n     <= '0;
            r     <= '0;
          end else begin
            n <= n + 1'b1;
          end
        end
        S_EMIT: begin
          if (hist[r] == '0) begin
            r <= r + 1'b1;
          end else begin
            parents[n] <= key_data;
            hist[r]    <= hist[r] - 1'b1;
            if (n == LW'(L - 1)) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              n <= n + 1'b1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Every drawn rank lies inside the population.
  a_rank_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    state == S_SAMPLE |-> rank < (PW + 1)'(P));
endmodule
