// fitness_accumulator: turns the per-CE match counts of one key into its
// fitness score and keeps the scores of the population.
//
// Fitness is the number of matching observable wires over all T training
// pairs (the ratio of Eq. 6 times the constant T*N). When the CE array
// offers a key's counts (cnt_valid), the accumulator copies them and adds
// them one CE per cycle, so accumulation takes N_CE cycles and grows with
// the number of engines; cnt_ready is low meanwhile. The score is written to
// fitness entry cnt_key, and the best score of the generation (with its key
// index) and the number of scored keys are updated. `start` clears the
// per-generation statistics; `eval_done` pulses when all P keys of the
// generation are scored. The whole fitness table is an output for the
// sorting engine; host_addr reads one entry.
//
// Accumulating the CE results once per key follows the design; the serial
// adder and the table layout are this design's own.
module fitness_accumulator #(
  parameter int P    = 100,
  parameter int T    = 100,
  parameter int N    = 7,
  parameter int N_CE = 16,
  localparam int PW  = $clog2(P),
  localparam int CW  = $clog2(T * N + 1),
  localparam int CEW = (N_CE > 1) ? $clog2(N_CE) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic                    cnt_valid,
  output logic                    cnt_ready,
  input  logic [N_CE-1:0][CW-1:0] cnt,
  input  logic [PW-1:0]           cnt_key,
  output logic [P-1:0][CW-1:0]    fitness,
  output logic [CW-1:0]           best_fit,
  output logic [PW-1:0]           best_idx,
  output logic                    eval_done,
  input  logic [PW-1:0]           host_addr,
  output logic [CW-1:0]           host_fit
);
  logic [N_CE-1:0][CW-1:0] shadow;
  logic [CEW-1:0]          ce;
  logic                    summing;
  logic [CW-1:0]           sum, total;
  logic [PW:0]             nkeys;
  logic [PW-1:0]           key;

  assign cnt_ready = !summing;
  assign total     = sum + shadow[ce];
  assign host_fit  = fitness[host_addr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      summing   <= 1'b0;
      ce        <= '0;
      sum       <= '0;
      key       <= '0;
      nkeys     <= '0;
      best_fit  <= '0;
      best_idx  <= '0;
      eval_done <= 1'b0;
      shadow    <= '0;
      fitness   <= '0;
    end else begin
      eval_done <= 1'b0;
      if (start) begin
        nkeys    <= '0;
        best_fit <= '0;
        best_idx <= '0;
      end
      if (!summing && cnt_valid) begin
        shadow  <= cnt;
        key     <= cnt_key;
        ce      <= '0;
        sum     <= '0;
        summing <= 1'b1;
      end else if (summing) begin
        if (ce == CEW'(N_CE - 1)) begin
          summing      <= 1'b0;
          fitness[key] <= total;
          if (total > best_fit || nkeys == '0) begin
            best_fit <= total;
            best_idx <= key;
          end
          nkeys <= nkeys + 1'b1;
          if (nkeys == (PW + 1)'(P - 1)) eval_done <= 1'b1;
        end else begin
          sum <= total;
          ce  <= ce + 1'b1;
        end
      end
    end
  end
endmodule
