// tb_emulator_stage: emulator front end on the c17 target with P = 4 keys
// and T = 3 pairs. The ping-pong side accepts at random; keys become
// available one at a time. Every word pushed must carry the c17 response
// (written out here) to the right pair and key, in key-major order, with the
// last-pair flag on pair T-1; key_seen must fire once per key; with the
// buffer always ready and all keys present one pair goes out per cycle and
// done follows the last one a cycle later (P*T + 1 cycles from start).
module tb_emulator_stage;
  import galu_pkg::*;
  localparam int P = 4, T = 3, M = 5, N = 2, K = 2, PW = 2, TW = 2;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0, start = 0, pp_ready = 0;
  logic [PW:0] keys_avail = '0;
  logic [PW-1:0] key_addr;
  logic [K-1:0] key_data, key_seen_data;
  logic [TW-1:0] pair_addr;
  logic [M-1:0] pair_in;
  logic [N-1:0] pair_exp;
  logic pp_valid, key_seen, stall, busy, done;
  logic [2*N+PW:0] pp_data;
  logic [K-1:0] keys [P];
  logic [M-1:0] ins [T];
  logic [N-1:0] exps [T];
  int checks = 0, failures = 0, nword = 0, nseen = 0, ndone = 0;

  assign key_data = keys[key_addr];
  assign pair_in  = (pair_addr < TW'(T)) ? ins[pair_addr] : '0;
  assign pair_exp = (pair_addr < TW'(T)) ? exps[pair_addr] : '0;

  emulator_stage #(.P(P), .T(T), .M(M), .N(N), .K(K), .CIRCUIT(CIRC_C17)) dut (.*);

  function automatic logic [N-1:0] c17(logic [4:0] x, logic [1:0] k);
    logic a, b, c, d, e;
    {e, d, c, b, a} = x;
    return {~(b & d) & (c | e | k[1]), (a & b) | (c & ~(b & d) & k[0])};
  endfunction

  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (pp_valid && pp_ready) begin
      int j, t;
      j = nword / T; t = nword % T;
      check(pp_data == {(t == T - 1), PW'(j), exps[t], c17(ins[t], keys[j])},
            $sformatf("word %0d = %h", nword, pp_data));
      check(stall == 0, "stall while accepted");
      nword++;
    end else if (pp_valid) check(stall == 1, "no stall while refused");
    if (key_seen) begin
      check(key_seen_data == keys[nseen], "key_seen data");
      nseen++;
    end
    if (done) ndone++;
  end

  initial begin
    int cyc;
    for (int p = 0; p < P; p++) keys[p] = K'(p);
    for (int t = 0; t < T; t++) begin ins[t] = M'($urandom()); exps[t] = N'($urandom()); end
    repeat (2) @(negedge clk); rst_n = 1;
    // run 1: keys arrive one by one, random back-pressure
    start = 1; @(negedge clk); start = 0;
    for (int c = 0; c < 200 && ndone == 0; c++) begin
      pp_ready = 1'($urandom_range(0, 1));
      if (c % 7 == 0 && keys_avail < (PW + 1)'(P)) keys_avail++;
      @(negedge clk);
    end
    check(nword == P * T && nseen == P && ndone == 1, $sformatf("run 1 words %0d seen %0d", nword, nseen));
    // run 2: full rate
    nword = 0; nseen = 0; ndone = 0; pp_ready = 1; keys_avail = (PW + 1)'(P);
    start = 1; @(negedge clk); start = 0;
    cyc = 0;
    while (ndone == 0) begin @(negedge clk); cyc++; end
    check(cyc == P * T + 1, $sformatf("full-rate run took %0d cycles, expected %0d", cyc, P * T + 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
endmodule
