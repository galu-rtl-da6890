// tb_cnf_eval_unit: three CEs over 7 wires (3 slots per pair), 4 keys of 5
// pairs each. A model ping-pong source offers words whenever it has one; the
// accumulator side accepts at random. For every key the per-CE counts and
// key index must match counts made here from the round-robin partition,
// each bank must be released exactly D = 3 cycles after it is taken when
// nothing waits, and no bank may be taken while a result is pending.
module tb_cnf_eval_unit;
  localparam int P = 4, T = 5, N = 7, N_CE = 3, PW = 2, CW = 6, D = 3;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0, pp_valid = 0, pp_release, cnt_valid, cnt_ready = 0;
  logic [2*N+PW:0] pp_data = '0;
  logic [N_CE-1:0][CW-1:0] cnt;
  logic [PW-1:0] cnt_key;
  logic [N-1:0] obs [P*T], expv [P*T];
  int checks = 0, failures = 0, widx = 0, nres = 0, taken_at = 0, busy_cyc = 0;

  cnf_eval_unit #(.P(P), .T(T), .N(N), .N_CE(N_CE)) dut (
    .clk(clk), .rst_n(rst_n), .cfg_we(1'b0), .cfg_ce('0), .cfg_slot('0), .cfg_idx('0), .cfg_len('0),
    .pp_valid(pp_valid), .pp_data(pp_data), .pp_release(pp_release),
    .cnt_valid(cnt_valid), .cnt_ready(cnt_ready), .cnt(cnt), .cnt_key(cnt_key)
  );

  always_comb begin
    pp_valid = (widx < P * T);
    pp_data  = (widx < P * T) ? {(widx % T == T - 1), PW'(widx / T), expv[widx], obs[widx]} : '0;
  end

  always @(posedge clk) if (rst_n) begin
    if (pp_release) begin
      checks++;
      if (busy_cyc != D - 1) begin failures++; $display("FAIL bank held %0d cycles", busy_cyc + 1); end
      widx <= widx + 1;
      busy_cyc <= 0;
    end else if (dut.proc) busy_cyc <= busy_cyc + 1;
    if (cnt_valid && cnt_ready) begin
      checks++;
      if (cnt_key != PW'(nres)) begin failures++; $display("FAIL key index %0d", cnt_key); end
      for (int c = 0; c < N_CE; c++) begin
        int m;
        m = 0;
        for (int t = 0; t < T; t++)
          for (int w = c; w < N; w += N_CE) m += int'(obs[nres*T+t][w] == expv[nres*T+t][w]);
        checks++;
        if (int'(cnt[c]) != m) begin failures++; $display("FAIL key %0d CE %0d count %0d expected %0d", nres, c, cnt[c], m); end
      end
      nres <= nres + 1;
    end
    if (cnt_valid && !cnt_ready && dut.proc) begin
      checks++; failures++; $display("FAIL bank taken while result pending");
    end
  end

  initial begin
    for (int i = 0; i < P * T; i++) begin obs[i] = N'($urandom()); expv[i] = N'($urandom()); end
    repeat (2) @(negedge clk); rst_n = 1;
    for (int c = 0; c < 2000 && nres < P; c++) begin
      cnt_ready = ($urandom_range(0, 3) == 0);
      @(negedge clk);
    end
    checks++; if (nres != P) begin failures++; $display("FAIL only %0d results", nres); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
endmodule
