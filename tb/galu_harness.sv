// galu_harness: end-to-end test body for the GALU accelerator at one
// configuration.
//
// It plays the host: fills the random buffer, builds the training set the
// way the attack does (random inputs are kept only when two random keys give
// different outputs of the locked circuit; the expected output is the
// response of the unlocked circuit, modelled as the locked circuit under its
// correct key), loads a random initial population and starts the search.
// After `done` it re-scores every final key in software and compares with
// the accelerator's scores, checks the best score and the success flag
// against the termination rule, and checks the ensemble voter against a
// majority vote of the three best keys computed here. It counts how often
// each mechanism of the design occurred and reports it to the enclosing
// testbench. With NOISE_PCT > 0 a share of the expected output bits is
// flipped, which keeps any key from full fitness and drives the population
// to low diversity, so mutation and the generation limit are exercised.
module galu_harness import galu_pkg::*; #(
  parameter int          P          = 100,
  parameter int          L          = 50,
  parameter int          C          = 4,
  parameter int          G          = 50,
  parameter int          T          = 100,
  parameter int          M          = 36,
  parameter int          N          = 7,
  parameter int          K          = 16,
  parameter int          N_CE       = 16,
  parameter int          EPS_PPM    = 1000,
  parameter int          RAND_DEPTH = 4096,
  parameter int          CIRCUIT    = CIRC_SYNTH,
  parameter int          GATES      = 160,
  parameter int unsigned SEED       = 32'h0000_17a5,
  parameter int          NQ         = 40,
  parameter int          NOISE_PCT  = 0
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output bit   finished,
  output int   n_cross,
  output int   n_copy,
  output int   n_mut,
  output int   n_stall,
  output int   n_wait,
  output int   n_overlap,
  output int   n_gen,
  output int   n_success,
  output int   n_exhaust
);
  localparam int E      = 3;
  localparam int PW     = $clog2(P);
  localparam int TW     = $clog2(T);
  localparam int FW     = $clog2(T * N + 1);
  localparam int GW     = $clog2(G + 1);
  localparam int D      = (N + N_CE - 1) / N_CE;
  localparam int DW     = (D > 1) ? $clog2(D) : 1;
  localparam int NW     = (N > 1) ? $clog2(N) : 1;
  localparam int CEW    = (N_CE > 1) ? $clog2(N_CE) : 1;
  localparam int RW     = $clog2(RAND_DEPTH);
  localparam int THRESH = int'(fit_threshold(T * N, EPS_PPM));

  logic            rst_n = 1'b0;
  logic            rnd_we = 0, trn_we = 0, key_we = 0, start = 0, ens_start = 0;
  logic [RW-1:0]   rnd_addr = '0;
  logic [31:0]     rnd_data = '0;
  logic [TW-1:0]   trn_addr = '0;
  logic [M-1:0]    trn_in = '0, ens_query = '0;
  logic [N-1:0]    trn_exp = '0;
  logic [PW-1:0]   key_addr = '0, rd_addr = '0;
  logic [K-1:0]    key_wdata = '0;
  logic            busy, done, success, ens_busy, ens_valid;
  logic [GW-1:0]   generation;
  logic [FW-1:0]   best_fit, rd_fit;
  logic [PW-1:0]   best_idx;
  logic [K-1:0]    rd_key;
  logic [N-1:0]    ens_out;

  galu_top #(
    .P(P), .L(L), .C(C), .G(G), .T(T), .M(M), .N(N), .K(K), .N_CE(N_CE),
    .E(E), .EPS_PPM(EPS_PPM), .RAND_DEPTH(RAND_DEPTH), .CIRCUIT(CIRCUIT),
    .GATES(GATES), .SEED(SEED)
  ) dut (
    .clk(clk), .rst_n(rst_n),
    .rnd_we(rnd_we), .rnd_addr(rnd_addr), .rnd_data(rnd_data),
    .trn_we(trn_we), .trn_addr(trn_addr), .trn_in(trn_in), .trn_exp(trn_exp),
    .key_we(key_we), .key_addr(key_addr), .key_wdata(key_wdata),
    .cnf_cfg_we(1'b0), .cnf_cfg_ce(CEW'(0)), .cnf_cfg_slot(DW'(0)),
    .cnf_cfg_idx(NW'(0)), .cnf_cfg_len((DW + 1)'(0)),
    .start(start), .busy(busy), .done(done), .success(success),
    .generation(generation), .best_fit(best_fit), .best_idx(best_idx),
    .rd_addr(rd_addr), .rd_key(rd_key), .rd_fit(rd_fit),
    .ens_start(ens_start), .ens_query(ens_query), .ens_busy(ens_busy),
    .ens_valid(ens_valid), .ens_out(ens_out)
  );

  // Reference copy of the locked circuit, evaluated by the test.
  logic [M-1:0] r_pi;
  logic [K-1:0] r_key;
  logic [N-1:0] r_po;
  target_circuit #(
    .CIRCUIT(CIRCUIT), .M(M), .N(N), .K(K), .GATES(GATES), .SEED(SEED)
  ) u_ref (.pi(r_pi), .key(r_key), .po(r_po));

  task automatic eval(input logic [M-1:0] pi, input logic [K-1:0] k, output logic [N-1:0] po);
    r_pi  = pi;
    r_key = k;
    #1;
    po = r_po;
  endtask

  function automatic logic [K-1:0] correct_key();
    logic [K-1:0] ck;
    if (CIRCUIT == CIRC_C17) return K'(2'b01);
    for (int i = 0; i < K; i++) ck[i] = logic'(hash32(SEED ^ 32'h9e37_79b9 ^ i) & 1);
    return ck;
  endfunction

  function automatic logic [M-1:0] rand_in();
    logic [M-1:0] v;
    for (int b = 0; b < M; b++) v[b] = 1'($urandom_range(0, 1));
    return v;
  endfunction

  function automatic logic [K-1:0] rand_key();
    logic [K-1:0] v;
    for (int b = 0; b < K; b++) v[b] = 1'($urandom_range(0, 1));
    return v;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Mechanism counters, from the design's internal hand-shakes.
  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.u_brd.ev_cross) n_cross++;
      if (dut.u_brd.state == dut.u_brd.S_XDEC && !(dut.u_brd.rand_data[15:0] < dut.u_brd.P_CROSS)) n_copy++;
      if (dut.u_brd.ev_mutate) n_mut++;
      if (dut.u_emu.stall) n_stall++;
      if (dut.u_emu.running && !dut.u_emu.have_key) n_wait++;
      if (dut.u_emu.fire && dut.u_brd.busy) n_overlap++;
    end
  end

  logic [M-1:0] tin  [T];
  logic [N-1:0] texp [T];
  int           eval_cycles;

  initial begin
    logic [M-1:0] pi;
    logic [K-1:0] k1, k2, ck;
    logic [N-1:0] o1, o2, oc;
    logic [K-1:0] fkey [P];
    int           ffit [P];
    int           nt, tries, cnt, mx, top [E];
    bit           taken [P];

    checks = 0; failures = 0; finished = 0;
    n_cross = 0; n_copy = 0; n_mut = 0; n_stall = 0; n_wait = 0; n_overlap = 0;
    n_gen = 0; n_success = 0; n_exhaust = 0;
    ck = correct_key();

    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // Random buffer.
    for (int i = 0; i < RAND_DEPTH; i++) begin
      @(negedge clk);
      rnd_we = 1; rnd_addr = RW'(i); rnd_data = $urandom();
    end
    @(negedge clk); rnd_we = 0;

    // Training data: keep only inputs that two random keys tell apart.
    nt = 0; tries = 0;
    while (nt < T) begin
      pi = rand_in(); k1 = rand_key(); k2 = rand_key();
      eval(pi, k1, o1); eval(pi, k2, o2);
      tries++;
      if (o1 != o2 || tries > 200 * T) begin
        eval(pi, ck, oc);
        // Optional noisy oracle: flip some expected bits so that no key
        // can reach full fitness and the search runs to its limit.
        for (int b = 0; b < N; b++) if ($urandom_range(0, 99) < NOISE_PCT) oc[b] = ~oc[b];
        tin[nt] = pi; texp[nt] = oc; nt++;
      end
    end
    for (int t = 0; t < T; t++) begin
      @(negedge clk);
      trn_we = 1; trn_addr = TW'(t); trn_in = tin[t]; trn_exp = texp[t];
    end
    @(negedge clk); trn_we = 0;

    // Random initial population.
    for (int p = 0; p < P; p++) begin
      @(negedge clk);
      key_we = 1; key_addr = PW'(p); key_wdata = rand_key();
    end
    @(negedge clk); key_we = 0;

    // Run.
    start = 1; @(negedge clk); start = 0;
    eval_cycles = 0;
    while (!dut.eval_done) begin @(posedge clk); eval_cycles++; end
    check(eval_cycles >= P * T * D && eval_cycles <= P * T * D + N_CE + 8,
          $sformatf("first-generation evaluation took %0d cycles, expected %0d + accumulation",
                    eval_cycles, P * T * D));
    while (!done) @(posedge clk);
    @(negedge clk);
    n_gen = int'(generation) + 1;
    if (success) n_success++; else n_exhaust++;
    while (!dut.div_ready) @(posedge clk);
    $display("run: %0d generations, best fitness %0d of %0d, success %0d, diversity %0d (threshold %0d)",
             n_gen, best_fit, T * N, success, dut.u_div.div, dut.u_div.div_th);

    // Re-score every final key.
    mx = 0;
    for (int p = 0; p < P; p++) begin
      rd_addr = PW'(p); #1;
      fkey[p] = rd_key;
      cnt = 0;
      for (int t = 0; t < T; t++) begin
        eval(tin[t], fkey[p], oc);
        for (int b = 0; b < N; b++) cnt += int'(oc[b] == texp[t][b]);
      end
      ffit[p] = cnt;
      check(int'(rd_fit) == cnt, $sformatf("key %0d fitness %0d, expected %0d", p, rd_fit, cnt));
      if (cnt > mx) mx = cnt;
    end
    check(int'(best_fit) == mx, $sformatf("best fitness %0d, expected %0d", best_fit, mx));
    check(ffit[best_idx] == mx, "best index does not hold the best key");
    check(success == (mx >= THRESH), "success flag disagrees with the termination rule");
    check(success || n_gen == G, $sformatf("stopped after %0d generations without success", n_gen));

    // Ensemble of the three best keys (rank by fitness, then index).
    for (int p = 0; p < P; p++) taken[p] = 0;
    for (int e = 0; e < E; e++) begin
      top[e] = -1;
      for (int p = 0; p < P; p++)
        if (!taken[p] && (top[e] < 0 || ffit[p] > ffit[top[e]])) top[e] = p;
      taken[top[e]] = 1;
    end
    for (int q = 0; q < NQ; q++) begin
      logic [N-1:0] r [E];
      logic [N-1:0] want;
      pi = rand_in();
      for (int e = 0; e < E; e++) eval(pi, fkey[top[e]], r[e]);
      for (int b = 0; b < N; b++) want[b] = (int'(r[0][b]) + int'(r[1][b]) + int'(r[2][b])) >= 2;
      @(negedge clk);
      ens_query = pi; ens_start = 1;
      @(negedge clk); ens_start = 0;
      while (!ens_valid) @(posedge clk);
      #1;
      check(ens_out == want, $sformatf("ensemble output %b, expected %b", ens_out, want));
    end
    finished = 1;
  end
endmodule
