// tb_fitness_accumulator: offers the per-CE counts of P = 8 keys (in
// shuffled key order) with 16 CEs. Each key's score must be the sum of its
// counts and land in its own entry; accumulation must take N_CE cycles
// (cnt_ready low that long); best score and index, eval_done after the last
// key, the host read port and `start` clearing the statistics are checked.
module tb_fitness_accumulator;
  localparam int P = 8, T = 100, N = 7, N_CE = 16, PW = 3, CW = 10;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0, start = 0, cnt_valid = 0, cnt_ready, eval_done;
  logic [N_CE-1:0][CW-1:0] cnt = '0;
  logic [PW-1:0] cnt_key = '0, best_idx, host_addr = '0;
  logic [P-1:0][CW-1:0] fitness;
  logic [CW-1:0] best_fit, host_fit;
  int checks = 0, failures = 0;
  int sums [P];

  fitness_accumulator #(.P(P), .T(T), .N(N), .N_CE(N_CE)) dut (.*);

  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int perm [P];
    int mx, mi, busy, ndone;
    for (int run = 0; run < 2; run++) begin
      for (int p = 0; p < P; p++) perm[p] = (p * 5 + run) % P;
      repeat (2) @(negedge clk); rst_n = 1;
      start = 1; @(negedge clk); start = 0;
      mx = -1; mi = 0; ndone = 0;
      for (int i = 0; i < P; i++) begin
        int k = perm[i];
        sums[k] = 0;
        for (int c = 0; c < N_CE; c++) begin cnt[c] = CW'($urandom_range(0, 40)); sums[k] += int'(cnt[c]); end
        if (sums[k] > mx || (sums[k] == mx && 0)) begin mx = sums[k]; mi = k; end
        cnt_key = PW'(k); cnt_valid = 1;
        check(cnt_ready, "accumulator not ready");
        @(negedge clk); cnt_valid = 0;
        busy = 0;
        while (!cnt_ready) begin
          if (eval_done) ndone++;
          busy++; @(negedge clk);
        end
        if (eval_done) ndone++;
        check(busy == N_CE, $sformatf("accumulation took %0d cycles", busy));
        check(int'(fitness[k]) == sums[k], $sformatf("key %0d score %0d expected %0d", k, fitness[k], sums[k]));
      end
      @(negedge clk); if (eval_done) ndone++;
      check(ndone == 1, $sformatf("eval_done pulses %0d", ndone));
      check(int'(best_fit) == mx && int'(best_idx) == mi, $sformatf("best %0d@%0d expected %0d@%0d", best_fit, best_idx, mx, mi));
      for (int p = 0; p < P; p++) begin
        host_addr = PW'(p); #1;
        check(int'(host_fit) == sums[p], "host read");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
endmodule
