// cnf_checking_engine: one checking engine (CE) of the fitness evaluation.
//
// The CE owns a CNF buffer listing the indices of the observable wires it is
// responsible for (up to D entries, `len` of them valid). The observed and
// expected wire values of the current (input, key) pair are broadcast to all
// CEs on a shared bus. When `check` is high the CE reads slot `slot` of its
// CNF buffer, compares the observed wire at that index with its expected
// value, and adds 1 to its match counter when they agree; slots at or beyond
// `len` are idle. The counter accumulates over all training pairs of one
// key; `clear` restarts it (a check in the same cycle counts into the new
// total). The CNF buffer resets to an even round-robin split of the N wires
// over N_CE engines (wire w goes to CE w mod N_CE, slot w / N_CE) and can be
// overwritten through the cfg port with another offline partition.
//
// Timing: one comparison per cycle; count is registered.
//
// A CNF buffer per CE, the broadcast bus and the match counting follow the
// design; the buffer format and the reset partition are this design's own.
module cnf_checking_engine #(
  parameter int N     = 7,
  parameter int N_CE  = 16,
  parameter int CE_ID = 0,
  parameter int CW    = 10,
  localparam int D    = (N + N_CE - 1) / N_CE,
  localparam int DW   = (D > 1) ? $clog2(D) : 1,
  localparam int NW   = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cfg_we,
  input  logic [DW-1:0] cfg_slot,
  input  logic [NW-1:0] cfg_idx,
  input  logic [DW:0]   cfg_len,
  input  logic [N-1:0]  obs,
  input  logic [N-1:0]  exp_val,
  input  logic          check,
  input  logic [DW-1:0] slot,
  input  logic          clear,
  output logic [CW-1:0] count
);
  // Number of wires in the default round-robin share of this CE.
  localparam int DEF_LEN = (N > CE_ID) ? (N - CE_ID + N_CE - 1) / N_CE : 0;

  logic [NW-1:0] cnf_buf [D];
  logic [DW:0]   len;
  logic          match, active;

  assign active = check && ({1'b0, slot} < len);
  assign match  = obs[cnf_buf[slot]] ~^ exp_val[cnf_buf[slot]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < D; s++) cnf_buf[s] <= NW'((s * N_CE + CE_ID) % N);
      len   <= (DW + 1)'(DEF_LEN);
      count <= '0;
    end else begin
      if (cfg_we) begin
        cnf_buf[cfg_slot] <= cfg_idx;
        len               <= cfg_len;
      end
      count <= (clear ? '0 : count) + CW'(active && match);
    end
  end
endmodule
