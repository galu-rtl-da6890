// tb_crossover_mutation_unit: L = 4 parents, C = 4 children per pair,
// P = 8 children, 10-bit keys, a known random stream. A model written here
// repeats the pairing rule (fittest unpaired parent with the unpaired parent
// at largest Hamming distance, ties to the fitter), the p_cross decision,
// the exchange masks (two mask bits per random word), the complementary
// children and the p_mutate / p_flip mutation, and the written children
// must match it in value and order. Runs cover mutation off, mutation on at
// probability 1 and at about one half, and check the written count.
module tb_crossover_mutation_unit;
  import galu_pkg::*;
  localparam int P = 8, L = 4, C = 4, K = 10, PW = 3;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0, start = 0, mutate_en = 0, rand_next, wr_en, ev_cross, ev_mutate, busy, done;
  logic [L-1:0][K-1:0] parents;
  logic [PROB_W-1:0] p_mutate = '0;
  logic [31:0] rand_data;
  logic [PW-1:0] wr_addr;
  logic [K-1:0] wr_data;
  logic [PW:0] written;
  logic [31:0] rnd [512];
  int rp = 0, nw = 0;
  logic [K-1:0] got [P];
  int checks = 0, failures = 0, nmut = 0, ncross = 0;

  assign rand_data = rnd[rp % 512];
  always @(posedge clk) begin
    if (rand_next) rp <= rp + 1;
    if (wr_en) begin
      if (int'(wr_addr) != nw) begin checks++; failures++; $display("FAIL write address %0d", wr_addr); end
      got[nw % P] <= wr_data; nw <= nw + 1;
    end
    if (ev_mutate) nmut <= nmut + 1;
    if (ev_cross) ncross <= ncross + 1;
  end

  crossover_mutation_unit #(.P(P), .L(L), .C(C), .K(K)) dut (.*);

  function automatic int hd(logic [K-1:0] a, logic [K-1:0] b);
    int d = 0;
    d = 0;
    for (int i = 0; i < K; i++) d += int'(a[i] != b[i]);
    return d;
  endfunction

  task automatic model(input int r0, output logic [K-1:0] kids [P], output int used_words);
    bit used [L];
    int ri, n;
    ri = r0; n = 0;
    for (int i = 0; i < L; i++) used[i] = 0;
    for (int pr = 0; pr < L / 2; pr++) begin
      int f, b;
      logic [K-1:0] p1, p2, mask, ch;
      bit cr;
      f = -1;
      for (int i = 0; i < L; i++) if (!used[i] && f < 0) f = i;
      used[f] = 1; p1 = parents[f];
      b = -1;
      for (int q = 0; q < L; q++) if (!used[q] && (b < 0 || hd(p1, parents[q]) > hd(p1, parents[b]))) b = q;
      used[b] = 1; p2 = parents[b];
      cr = rnd[ri % 512][15:0] < P_CROSS_DEFAULT; ri++;
      for (int cp = 0; cp < C / 2; cp++) begin
        mask = '0;
        if (cr) for (int mb = 0; mb < K; mb += 2) begin
          mask[mb] = rnd[ri % 512][15:0] < P_EXCH_DEFAULT;
          if (mb + 1 < K) mask[mb+1] = rnd[ri % 512][31:16] < P_EXCH_DEFAULT;
          ri++;
        end
        for (int cs = 0; cs < 2; cs++) begin
          ch = cs ? (p2 ^ (mask & (p1 ^ p2))) : (p1 ^ (mask & (p1 ^ p2)));
          if (mutate_en) begin
            bit m;
            m = rnd[ri % 512][15:0] < p_mutate; ri++;
            if (m) for (int mb = 0; mb < K; mb += 2) begin
              ch[mb] ^= rnd[ri % 512][15:0] < P_FLIP_DEFAULT;
              if (mb + 1 < K) ch[mb+1] ^= rnd[ri % 512][31:16] < P_FLIP_DEFAULT;
              ri++;
            end
          end
          kids[n] = ch; n++;
        end
      end
    end
    used_words = ri - r0;
  endtask

  initial begin
    logic [K-1:0] kids [P];
    int uw, rp0;
    for (int i = 0; i < 512; i++) rnd[i] = $urandom();
    // force a few low words so flips happen at p_flip = 0.05
    for (int i = 0; i < 512; i += 3) rnd[i][15:0] = 16'($urandom_range(0, 4000));
    repeat (2) @(negedge clk); rst_n = 1;
    for (int run = 0; run < 9; run++) begin
      for (int i = 0; i < L; i++) parents[i] = K'($urandom());
      mutate_en = (run % 3 != 0);
      p_mutate  = (run % 3 == 1) ? 16'hFFFF : 16'h8000;
      rp0 = rp; nw = 0;
      model(rp0, kids, uw);
      start = 1; @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      @(negedge clk);
      checks++;
      if (rp - rp0 != uw) begin failures++; $display("FAIL run %0d used %0d words, model %0d", run, rp - rp0, uw); end
      checks++;
      if (nw != P || int'(written) != P) begin failures++; $display("FAIL wrote %0d children", nw); end
      for (int i = 0; i < P; i++) begin
        checks++;
        if (got[i] != kids[i]) begin failures++; $display("FAIL run %0d child %0d = %b expected %b", run, i, got[i], kids[i]); end
      end
    end
    checks++;
    if (nmut == 0 || ncross == 0) begin failures++; $display("FAIL no mutation or crossover seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
endmodule
