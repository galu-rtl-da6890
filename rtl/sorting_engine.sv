// sorting_engine: orders the population by fitness with odd-even
// transposition sort.
//
// On `start` the engine loads the P fitness scores with their key indices
// into a register array. It then runs P phases, one per cycle: even phases
// compare-and-swap pairs (0,1), (2,3), ...; odd phases pairs (1,2), (3,4),
// .... After P phases the array is sorted by descending fitness, ties kept
// by ascending key index. `order[r]` is the key index of rank r and
// `fit_s[r]` its score; both hold until the next start. `done` pulses one
// cycle after the last phase, P + 1 cycles after start: the latency is
// linear in the population size and uses P/2 comparators.
//
// The odd-even sort with linear latency follows the design; the tie rule is
// this design's own.
module sorting_engine #(
  parameter int P  = 100,
  parameter int FW = 10,
  localparam int PW = $clog2(P)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [P-1:0][FW-1:0] fit_in,
  output logic [P-1:0][PW-1:0] order,
  output logic [P-1:0][FW-1:0] fit_s,
  output logic                 busy,
  output logic                 done
);
  logic [PW:0] phase;

  // Rank a before rank b?
  function automatic logic ranks_before(logic [FW-1:0] fa, logic [PW-1:0] ia,
                                  logic [FW-1:0] fb, logic [PW-1:0] ib);
    return (fa > fb) || (fa == fb && ia < ib);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      phase <= '0;
      for (int i = 0; i < P; i++) begin
        order[i] <= PW'(i);
        fit_s[i] <= '0;
      end
    end else begin
      done <= 1'b0;
      if (start) begin
        busy  <= 1'b1;
        phase <= '0;
        for (int i = 0; i < P; i++) begin
          order[i] <= PW'(i);
          fit_s[i] <= fit_in[i];
        end
      end else if (busy) begin
        for (int i = 0; i + 1 < P; i++) begin
          if ((i % 2) == int'(phase[0]) &&
              !ranks_before(fit_s[i], order[i], fit_s[i+1], order[i+1])) begin
            fit_s[i]   <= fit_s[i+1];
            fit_s[i+1] <= fit_s[i];
            order[i]   <= order[i+1];
            order[i+1] <= order[i];
          end
        end
        if (phase == (PW + 1)'(P - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
        phase <= phase + 1'b1;
      end
    end
  end
endmodule
