// galu_top: GALU genetic-algorithm key-search accelerator for logic
// unlocking.
//
// The accelerator searches for keys of a logic-locked circuit whose
// responses match a set of ground-truth input/output pairs taken from an
// unlocked chip. The locked netlist is mapped into the design itself
// (circuit emulation), and a population of P candidate keys evolves on chip:
//
//   emulator_stage -> pingpong_buffer -> cnf_eval_unit (N_CE checking
//   engines) -> fitness_accumulator -> sorting_engine -> selection_unit ->
//   crossover_mutation_unit -> key_buffer -> emulator_stage ...
//                          diversity_unit (built alongside emulation)
//
// There is no central controller: each stage starts on the completion flag
// of the stage before it. The only top-level state is the generation
// counter and the termination test. A run starts with `start` after the
// host has filled the random buffer, the training buffer and the initial
// population. Each generation: every key is emulated on every training pair
// and scored (number of matching outputs, out of T*N). When all scores are
// in, the population is sorted and the diversity computed. The search ends
// with success when the best score exceeds (1 - eps) * T * N
// (eps = EPS_PPM / 10^6), or without success after G generations. Otherwise
// L parents are selected, paired and bred into P children that overwrite
// the key buffer; the next generation's emulation starts with the first
// child (early start), so breeding is hidden behind evaluation. After
// `done`, the host reads keys and scores through rd_addr (the best key is
// best_idx), and the ensemble voter answers queries with the majority of
// the top E keys.
//
// The pipeline, the operators and the default sizes (P = 100, L = 50, C = 4,
// G = 50, T = 100, N_CE = 16, eps = 0.001, p_cross = 0.9, p_exch = 0.5,
// p_flip = 0.05) follow the design. The emulated circuit defaults to a
// synthetic locked benchmark with the size of c432 at 10 % key overhead
// (36 inputs, 7 outputs, 160 gates, 16 key bits); the host interface,
// random-buffer depth and handshakes are this design's own.
module galu_top import galu_pkg::*; #(
  parameter int          P          = 100,
  parameter int          L          = 50,
  parameter int          C          = 4,
  parameter int          G          = 50,
  parameter int          T          = 100,
  parameter int          M          = 36,
  parameter int          N          = 7,
  parameter int          K          = 16,
  parameter int          N_CE       = 16,
  parameter int          E          = 3,
  parameter int          EPS_PPM    = 1000,
  parameter int          RAND_DEPTH = 4096,
  parameter int          CIRCUIT    = CIRC_SYNTH,
  parameter int          GATES      = 160,
  parameter int unsigned SEED       = 32'h0000_17a5,
  localparam int PW  = $clog2(P),
  localparam int TW  = $clog2(T),
  localparam int RW  = $clog2(RAND_DEPTH),
  localparam int FW  = $clog2(T * N + 1),
  localparam int GW  = $clog2(G + 1),
  localparam int D   = (N + N_CE - 1) / N_CE,
  localparam int DW  = (D > 1) ? $clog2(D) : 1,
  localparam int NW  = (N > 1) ? $clog2(N) : 1,
  localparam int CEW = (N_CE > 1) ? $clog2(N_CE) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  // host loading
  input  logic            rnd_we,
  input  logic [RW-1:0]   rnd_addr,
  input  logic [31:0]     rnd_data,
  input  logic            trn_we,
  input  logic [TW-1:0]   trn_addr,
  input  logic [M-1:0]    trn_in,
  input  logic [N-1:0]    trn_exp,
  input  logic            key_we,
  input  logic [PW-1:0]   key_addr,
  input  logic [K-1:0]    key_wdata,
  input  logic            cnf_cfg_we,
  input  logic [CEW-1:0]  cnf_cfg_ce,
  input  logic [DW-1:0]   cnf_cfg_slot,
  input  logic [NW-1:0]   cnf_cfg_idx,
  input  logic [DW:0]     cnf_cfg_len,
  // run control and status
  input  logic            start,
  output logic            busy,
  output logic            done,
  output logic            success,
  output logic [GW-1:0]   generation,
  output logic [FW-1:0]   best_fit,
  output logic [PW-1:0]   best_idx,
  // result readback
  input  logic [PW-1:0]   rd_addr,
  output logic [K-1:0]    rd_key,
  output logic [FW-1:0]   rd_fit,
  // ensemble unlocking
  input  logic            ens_start,
  input  logic [M-1:0]    ens_query,
  output logic            ens_busy,
  output logic            ens_valid,
  output logic [N-1:0]    ens_out
);
  localparam int PPW    = 2 * N + PW + 1;
  localparam int THRESH = int'(fit_threshold(T * N, EPS_PPM));

  // ---------------- buffers ----------------
  logic [1:0]        rnd_next;
  logic [1:0][31:0]  rnd_rdata;
  logic [TW-1:0]     pair_addr;
  logic [M-1:0]      pair_in;
  logic [N-1:0]      pair_exp;
  logic [PW-1:0]     emu_kaddr, sel_kaddr, ens_kaddr, c_addr;
  logic [K-1:0]      emu_kdata, sel_kdata, c_kdata;
  logic              brd_we;
  logic [PW-1:0]     brd_waddr;
  logic [K-1:0]      brd_wdata;

  rand_buffer #(.DEPTH(RAND_DEPTH), .W(32), .NRD(2)) u_rand (
    .clk(clk), .rst_n(rst_n), .wr_en(rnd_we), .wr_addr(rnd_addr), .wr_data(rnd_data),
    .rd_next(rnd_next), .rd_data(rnd_rdata)
  );

  training_buffer #(.T(T), .M(M), .N(N)) u_train (
    .clk(clk), .wr_en(trn_we), .wr_addr(trn_addr), .wr_in(trn_in), .wr_exp(trn_exp),
    .rd_addr(pair_addr), .rd_in(pair_in), .rd_exp(pair_exp)
  );

  assign c_addr = ens_busy ? ens_kaddr : rd_addr;
  assign rd_key = c_kdata;

  key_buffer #(.P(P), .K(K)) u_keys (
    .clk(clk),
    .host_we(key_we), .host_waddr(key_addr), .host_wdata(key_wdata),
    .brd_we(brd_we), .brd_waddr(brd_waddr), .brd_wdata(brd_wdata),
    .a_addr(emu_kaddr), .a_data(emu_kdata),
    .b_addr(sel_kaddr), .b_data(sel_kdata),
    .c_addr(c_addr), .c_data(c_kdata)
  );

  // ---------------- generation control ----------------
  logic            running, init_avail, sel_pend;
  logic            gen_start, launch;
  logic [PW:0]     keys_avail, brd_written;
  logic            eval_done, sort_done, sel_done, brd_done, div_ready, brd_busy;

  assign keys_avail = init_avail ? (PW + 1)'(P) : brd_written;
  assign launch     = sel_pend && div_ready && !brd_busy;
  assign gen_start  = (start && !running) || launch;
  assign busy       = running;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running    <= 1'b0;
      init_avail <= 1'b0;
      sel_pend   <= 1'b0;
      generation <= '0;
      done       <= 1'b0;
      success    <= 1'b0;
    end else begin
      if (start && !running) begin
        running    <= 1'b1;
        init_avail <= 1'b1;
        generation <= '0;
        done       <= 1'b0;
        success    <= 1'b0;
      end
      if (sort_done) begin
        if (32'(best_fit) >= THRESH) begin
          running <= 1'b0;
          done    <= 1'b1;
          success <= 1'b1;
        end else if (generation == GW'(G - 1)) begin
          running <= 1'b0;
          done    <= 1'b1;
        end
      end
      if (sel_done) sel_pend <= 1'b1;
      if (launch) begin
        sel_pend   <= 1'b0;
        init_avail <= 1'b0;
        generation <= generation + 1'b1;
      end
    end
  end

  // ---------------- evaluation ----------------
  logic           pp_wvalid, pp_wready, pp_rvalid, pp_release;
  logic [PPW-1:0] pp_wdata, pp_rdata;
  logic           key_seen, emu_stall;
  logic [K-1:0]   key_seen_data;
  logic           cnt_valid, cnt_ready;
  logic [N_CE-1:0][FW-1:0] cnt;
  logic [PW-1:0]  cnt_key;
  logic [P-1:0][FW-1:0] fitness;

  emulator_stage #(
    .P(P), .T(T), .M(M), .N(N), .K(K), .CIRCUIT(CIRCUIT), .GATES(GATES), .SEED(SEED)
  ) u_emu (
    .clk(clk), .rst_n(rst_n), .start(gen_start), .keys_avail(keys_avail),
    .key_addr(emu_kaddr), .key_data(emu_kdata),
    .pair_addr(pair_addr), .pair_in(pair_in), .pair_exp(pair_exp),
    .pp_valid(pp_wvalid), .pp_ready(pp_wready), .pp_data(pp_wdata),
    .key_seen(key_seen), .key_seen_data(key_seen_data),
    .stall(emu_stall), .busy(), .done()
  );

  pingpong_buffer #(.W(PPW)) u_pp (
    .clk(clk), .rst_n(rst_n),
    .wr_valid(pp_wvalid), .wr_ready(pp_wready), .wr_data(pp_wdata),
    .rd_valid(pp_rvalid), .rd_data(pp_rdata), .rd_release(pp_release)
  );

  cnf_eval_unit #(.P(P), .T(T), .N(N), .N_CE(N_CE)) u_cnf (
    .clk(clk), .rst_n(rst_n),
    .cfg_we(cnf_cfg_we), .cfg_ce(cnf_cfg_ce), .cfg_slot(cnf_cfg_slot),
    .cfg_idx(cnf_cfg_idx), .cfg_len(cnf_cfg_len),
    .pp_valid(pp_rvalid), .pp_data(pp_rdata), .pp_release(pp_release),
    .cnt_valid(cnt_valid), .cnt_ready(cnt_ready), .cnt(cnt), .cnt_key(cnt_key)
  );

  fitness_accumulator #(.P(P), .T(T), .N(N), .N_CE(N_CE)) u_acc (
    .clk(clk), .rst_n(rst_n), .start(gen_start),
    .cnt_valid(cnt_valid), .cnt_ready(cnt_ready), .cnt(cnt), .cnt_key(cnt_key),
    .fitness(fitness), .best_fit(best_fit), .best_idx(best_idx),
    .eval_done(eval_done), .host_addr(rd_addr), .host_fit(rd_fit)
  );

  // ---------------- diversity ----------------
  logic              mutate_en;
  logic [PROB_W-1:0] p_mutate;

  diversity_unit #(.P(P), .K(K)) u_div (
    .clk(clk), .rst_n(rst_n), .clear(gen_start),
    .key_valid(key_seen), .key(key_seen_data),
    .compute(eval_done), .first(generation == '0),
    .div(), .div_th(), .mutate_en(mutate_en), .p_mutate(p_mutate),
    .ready(div_ready), .done()
  );

  // ---------------- sorting and selection ----------------
  logic [P-1:0][PW-1:0] order;
  logic [P-1:0][FW-1:0] fit_s;
  logic [L-1:0][K-1:0]  parents;
  logic                 continue_search;

  sorting_engine #(.P(P), .FW(FW)) u_sort (
    .clk(clk), .rst_n(rst_n), .start(eval_done), .fit_in(fitness),
    .order(order), .fit_s(fit_s), .busy(), .done(sort_done)
  );

  assign continue_search = sort_done && (32'(best_fit) < THRESH) &&
                           (generation != GW'(G - 1));

  selection_unit #(.P(P), .L(L), .K(K), .FW(FW)) u_sel (
    .clk(clk), .rst_n(rst_n), .start(continue_search),
    .order(order), .fit_s(fit_s),
    .rand_data(rnd_rdata[0]), .rand_next(rnd_next[0]),
    .key_addr(sel_kaddr), .key_data(sel_kdata),
    .parents(parents), .zero_sum(), .busy(), .done(sel_done)
  );

  // ---------------- breeding ----------------
  crossover_mutation_unit #(.P(P), .L(L), .C(C), .K(K)) u_brd (
    .clk(clk), .rst_n(rst_n), .start(launch), .parents(parents),
    .mutate_en(mutate_en), .p_mutate(p_mutate),
    .rand_data(rnd_rdata[1]), .rand_next(rnd_next[1]),
    .wr_en(brd_we), .wr_addr(brd_waddr), .wr_data(brd_wdata), .written(brd_written),
    .ev_cross(), .ev_mutate(), .busy(brd_busy), .done(brd_done)
  );

  // ---------------- ensemble unlocking ----------------
  ensemble_voter #(
    .P(P), .E(E), .M(M), .N(N), .K(K), .CIRCUIT(CIRCUIT), .GATES(GATES), .SEED(SEED)
  ) u_ens (
    .clk(clk), .rst_n(rst_n), .start(ens_start && done), .query(ens_query),
    .top_idx(order[E-1:0]), .key_addr(ens_kaddr), .key_data(c_kdata),
    .vote_out(ens_out), .busy(ens_busy), .valid(ens_valid)
  );
endmodule
