// cnf_eval_unit: the array of N_CE CNF checking engines and their trigger
// control.
//
// The unit takes one filled ping-pong bank at a time. Its observed and
// expected wire values go to every CE on a shared broadcast bus, and a
// common slot counter steps all CEs through their CNF buffers together, one
// slot per cycle, so a pair takes D = ceil(N / N_CE) cycles. After the last
// slot the bank is released to the emulator. When the released pair was the
// last training pair of a key, the per-CE match counters hold that key's
// result: the unit raises cnt_valid with the counters and the key index and
// holds them until the fitness accumulator takes them (cnt_ready). The
// counters are cleared on that hand-off and checking of the next key
// continues in the same cycle; while a result waits for a busy accumulator,
// no new bank is taken.
//
// Parallel CEs on a broadcast bus follow the design; the lock-step slot
// counter and the hand-off handshake are this design's own.
module cnf_eval_unit #(
  parameter int P    = 100,
  parameter int T    = 100,
  parameter int N    = 7,
  parameter int N_CE = 16,
  localparam int PW  = $clog2(P),
  localparam int PPW = 2 * N + PW + 1,
  localparam int CW  = $clog2(T * N + 1),
  localparam int D   = (N + N_CE - 1) / N_CE,
  localparam int DW  = (D > 1) ? $clog2(D) : 1,
  localparam int NW  = (N > 1) ? $clog2(N) : 1,
  localparam int CEW = (N_CE > 1) ? $clog2(N_CE) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // offline CNF partition
  input  logic                  cfg_we,
  input  logic [CEW-1:0]        cfg_ce,
  input  logic [DW-1:0]         cfg_slot,
  input  logic [NW-1:0]         cfg_idx,
  input  logic [DW:0]           cfg_len,
  // ping-pong read side
  input  logic                  pp_valid,
  input  logic [PPW-1:0]        pp_data,
  output logic                  pp_release,
  // per-key result
  output logic                  cnt_valid,
  input  logic                  cnt_ready,
  output logic [N_CE-1:0][CW-1:0] cnt,
  output logic [PW-1:0]         cnt_key
);
  logic [N-1:0]  obs, exp_val;
  logic [PW-1:0] key_idx;
  logic          last;
  logic [DW-1:0] slot;
  logic          proc, handoff, pend;

  assign {last, key_idx, exp_val, obs} = pp_data;

  assign handoff    = pend && cnt_ready;
  assign proc       = pp_valid && (!pend || cnt_ready);
  assign pp_release = proc && (slot == DW'(D - 1));
  assign cnt_valid  = pend;

  for (genvar c = 0; c < N_CE; c++) begin : g_ce
    cnf_checking_engine #(
      .N(N), .N_CE(N_CE), .CE_ID(c), .CW(CW)
    ) u_ce (
      .clk     (clk),
      .rst_n   (rst_n),
      .cfg_we  (cfg_we && cfg_ce == CEW'(c)),
      .cfg_slot(cfg_slot),
      .cfg_idx (cfg_idx),
      .cfg_len (cfg_len),
      .obs     (obs),
      .exp_val (exp_val),
      .check   (proc),
      .slot    (slot),
      .clear   (handoff),
      .count   (cnt[c])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot    <= '0;
      pend    <= 1'b0;
      cnt_key <= '0;
    end else begin
      if (proc) slot <= (slot == DW'(D - 1)) ? '0 : slot + 1'b1;
      if (pp_release && last) begin
        pend    <= 1'b1;
        cnt_key <= key_idx;
      end else if (handoff) begin
        pend <= 1'b0;
      end
    end
  end
endmodule
