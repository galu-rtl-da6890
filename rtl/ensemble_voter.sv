// ensemble_voter: ensemble-based unlocking by majority vote of the best
// keys.
//
// After the key search, the E fittest keys (ranks 0..E-1 from the sorting
// engine) are each applied to the emulated locked circuit for a query input,
// and every output bit is decided by majority over the E responses. On
// `start` the unit latches the query and applies one key per cycle, reading
// it from the key buffer at key_addr = top_idx[e] and counting the ones of
// each output bit. `valid` pulses with the voted output E + 2 clock edges after
// the edge that samples start (that edge counted). With an odd E there are
// no ties; with an even E a tie gives 0.
//
// Majority voting over the top keys follows the design; serial application
// of the keys on one circuit copy is this design's own choice.
module ensemble_voter import galu_pkg::*; #(
  parameter int          P       = 100,
  parameter int          E       = 3,
  parameter int          M       = 36,
  parameter int          N       = 7,
  parameter int          K       = 16,
  parameter int          CIRCUIT = CIRC_SYNTH,
  parameter int          GATES   = 160,
  parameter int unsigned SEED    = 32'h0000_17a5,
  localparam int PW = $clog2(P),
  localparam int EW = $clog2(E + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [M-1:0]         query,
  input  logic [E-1:0][PW-1:0] top_idx,
  output logic [PW-1:0]        key_addr,
  input  logic [K-1:0]         key_data,
  output logic [N-1:0]         vote_out,
  output logic                 busy,
  output logic                 valid
);
  logic [M-1:0]  q;
  logic [EW-1:0] e;
  logic [EW-1:0] votes [N];
  logic [N-1:0]  resp;

  target_circuit #(
    .CIRCUIT(CIRCUIT), .M(M), .N(N), .K(K), .GATES(GATES), .SEED(SEED)
  ) u_circ (
    .pi (q),
    .key(key_data),
    .po (resp)
  );

  assign key_addr = top_idx[(e < EW'(E)) ? e : '0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q        <= '0;
      e        <= '0;
      busy     <= 1'b0;
      valid    <= 1'b0;
      vote_out <= '0;
      for (int b = 0; b < N; b++) votes[b] <= '0;
    end else begin
      valid <= 1'b0;
      if (start && !busy) begin
        q    <= query;
        e    <= '0;
        busy <= 1'b1;
        for (int b = 0; b < N; b++) votes[b] <= '0;
      end else if (busy) begin
        if (e == EW'(E)) begin
          for (int b = 0; b < N; b++) vote_out[b] <= (32'(votes[b]) * 2 > E);
          busy  <= 1'b0;
          valid <= 1'b1;
        end else begin
          for (int b = 0; b < N; b++) votes[b] <= votes[b] + EW'(resp[b]);
          e <= e + 1'b1;
        end
      end
    end
  end
endmodule
