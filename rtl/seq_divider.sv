// seq_divider: unsigned restoring divider, one quotient bit per cycle.
//
// A pulse on `start` latches numerator and denominator; W cycles later
// `done` pulses with quotient = num / den (all ones when den is zero).
// Used once per generation to turn a diversity deficit into a mutation
// probability, so a slow, small divider is enough.
module seq_divider #(
  parameter int W = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] num,
  input  logic [W-1:0] den,
  output logic [W-1:0] quotient,
  output logic         busy,
  output logic         done
);
  logic [W-1:0]   d, q;
  logic [W:0]     rem, trial;
  logic [$clog2(W+1)-1:0] n;

  assign trial    = {rem[W-1:0], q[W-1]} - {1'b0, d};
  assign quotient = q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d <= '0; q <= '0; rem <= '0; n <= '0; busy <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        d    <= den;
        q    <= num;
        rem  <= '0;
        n    <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        // shift the next numerator bit into the remainder
        if (!trial[W]) begin
          rem <= trial;
          q   <= {q[W-2:0], 1'b1};
        end else begin
          rem <= {rem[W-1:0], q[W-1]};
          q   <= {q[W-2:0], 1'b0};
        end
        n <= n + 1'b1;
        if (n == ($clog2(W+1))'(W - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
