// diversity_unit: population diversity, the exploration decision and the
// adaptive mutation probability.
//
// Column counts. While keys are emulated, each key seen for the first time
// in a generation (key_valid) is added bitwise into K counters c_j, the
// number of ones at key bit j; the average key is c_j / P. `clear` restarts
// the counts for a new generation.
//
// Diversity. On `compute`, the unit walks the K columns, one per cycle, and
// forms D = sum_j c_j * (P - c_j). For binary keys the mean absolute
// deviation from the average key (the l1 form used in hardware) is 2D/P^2
// and the variance form of Eq. 4 is D/P^2, so D is diversity in units of
// 1/P^2. In the first generation (`first`) the unit stores D0 = D and sets
// the threshold Dth = D0 / 2. Mutation is enabled (mutate_en) when
// D < Dth. The mutation probability follows Eq. 11 with unit perturbation
// variance: raising diversity by Dth - D needs a bit-flip rate
// p_F = (Dth - D) / (P^2 K), and with the fixed per-bit flip probability
// p_flip the per-key mutation probability is p_mutate = p_F / p_flip,
// computed by a serial divider as a 16-bit fraction and saturated at 1.
// `ready` is high when no computation is in flight; mutate_en and p_mutate
// hold until the next computation.
//
// Latency from the edge that samples compute to done: K + 1 cycles, or
// K + 67 when the divider runs (64 divider steps plus hand-over).
//
// The diversity measure, the half-initial threshold, the fixed p_flip and
// the use of Eq. 11 follow the design. Computing diversity on the evaluated
// population (rather than after crossover), restoring diversity to the
// threshold and a perturbation variance of 1 are this design's own choices.
module diversity_unit import galu_pkg::*; #(
  parameter int                P      = 100,
  parameter int                K      = 16,
  parameter logic [PROB_W-1:0] P_FLIP = P_FLIP_DEFAULT,
  localparam int CNTW = $clog2(P + 1),
  localparam int KW   = (K > 1) ? $clog2(K) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              key_valid,
  input  logic [K-1:0]      key,
  input  logic              compute,
  input  logic              first,
  output logic [31:0]       div,
  output logic [31:0]       div_th,
  output logic              mutate_en,
  output logic [PROB_W-1:0] p_mutate,
  output logic              ready,
  output logic              done
);
  localparam longint unsigned DEN = longint'(P) * longint'(P) * longint'(K) * longint'(P_FLIP);

  typedef enum logic [1:0] {S_IDLE, S_SUM, S_DIV} state_e;
  state_e state;

  logic [CNTW-1:0] cnt [K];
  logic [KW-1:0]   j;
  logic [31:0]     acc, term;
  logic            first_q;
  logic            div_start, div_done;
  logic [63:0]     num, quo;

  assign term  = 32'(cnt[j]) * 32'(P - int'(cnt[j]));
  assign ready = (state == S_IDLE) && !compute;
  assign num   = {32'(div_th - div), 32'h0};

  seq_divider #(.W(64)) u_div (
    .clk(clk), .rst_n(rst_n), .start(div_start), .num(num), .den(64'(DEN)),
    .quotient(quo), .busy(), .done(div_done)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < K; b++) cnt[b] <= '0;
      state     <= S_IDLE;
      j         <= '0;
      acc       <= '0;
      div       <= '0;
      div_th    <= '0;
      first_q   <= 1'b0;
      mutate_en <= 1'b0;
      p_mutate  <= '0;
      div_start <= 1'b0;
      done      <= 1'b0;
    end else begin
      div_start <= 1'b0;
      done      <= 1'b0;
      if (clear) begin
        for (int b = 0; b < K; b++) cnt[b] <= '0;
      end else if (key_valid) begin
        for (int b = 0; b < K; b++) cnt[b] <= cnt[b] + CNTW'(key[b]);
      end
      unique case (state)
        S_IDLE: if (compute) begin
          state   <= S_SUM;
          j       <= '0;
          acc     <= '0;
          first_q <= first;
        end
        S_SUM: begin
          if (j == KW'(K - 1)) begin
            div <= acc + term;
            if (first_q) begin
              div_th    <= (acc + term) >> 1;
              mutate_en <= 1'b0;
              p_mutate  <= '0;
              state     <= S_IDLE;
              done      <= 1'b1;
            end else if (acc + term < div_th) begin
              mutate_en <= 1'b1;
              div_start <= 1'b1;
              state     <= S_DIV;
            end else begin
              mutate_en <= 1'b0;
              p_mutate  <= '0;
              state     <= S_IDLE;
              done      <= 1'b1;
            end
          end else begin
            acc <= acc + term;
            j   <= j + 1'b1;
          end
        end
        S_DIV: if (div_done) begin
          p_mutate <= (quo > 64'(16'hFFFF)) ? 16'hFFFF : quo[PROB_W-1:0];
          state    <= S_IDLE;
          done     <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
