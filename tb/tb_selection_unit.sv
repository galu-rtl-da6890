// tb_selection_unit: P = 10 sorted candidates, L = 6 parents. With a known
// random stream, each draw must pick rank r = #{cum <= floor(u*S/2^32)}
// (cum = prefix sums of fitness minus the worst fitness) or, when all
// fitness values are equal, floor(u*P/2^32); the parents must be the drawn
// keys in rank order. Also checks that the worst key is never drawn when S
// is non-zero, that exactly L random words are used and the cycle count
// P + L + (number of ranks visited) + ... stays within P + L + P + L.
module tb_selection_unit;
  localparam int P = 10, L = 6, K = 8, FW = 10, PW = 4;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0, start = 0, rand_next, zero_sum, busy, done;
  logic [P-1:0][PW-1:0] order;
  logic [P-1:0][FW-1:0] fit_s;
  logic [31:0] rand_data;
  logic [PW-1:0] key_addr;
  logic [K-1:0] key_data;
  logic [L-1:0][K-1:0] parents;
  logic [K-1:0] keys [P];
  logic [31:0] rnd [64];
  int rp = 0;
  int checks = 0, failures = 0;

  assign rand_data = rnd[rp % 64];
  assign key_data  = keys[key_addr];
  always @(posedge clk) if (rand_next) rp <= rp + 1;

  selection_unit #(.P(P), .L(L), .K(K), .FW(FW)) dut (.*);

  initial begin
    for (int i = 0; i < 64; i++) rnd[i] = $urandom();
    for (int i = 0; i < P; i++) keys[i] = K'($urandom());
    repeat (2) @(negedge clk); rst_n = 1;
    for (int run = 0; run < 8; run++) begin
      longint cum [P];
      longint s, x;
      int hist [P];
      int n, cyc, rp0;
      int f [P];
      // descending fitness, random key permutation
      for (int i = 0; i < P; i++) f[i] = (run == 3) ? 50 : $urandom_range(0, 700);
      f.rsort();
      for (int i = 0; i < P; i++) begin fit_s[i] = FW'(f[i]); order[i] = PW'((i * 3 + run) % P); end
      s = 0;
      for (int i = 0; i < P; i++) begin s += f[i] - f[P-1]; cum[i] = s; hist[i] = 0; end
      rp0 = rp;
      for (int d = 0; d < L; d++) begin
        logic [31:0] u;
        int r;
        u = rnd[(rp0 + d) % 64];
        if (s == 0) r = int'((longint'(u) * P) >> 32);
        else begin
          x = (longint'(u) * s) >> 32;
          r = 0;
          for (int i = 0; i < P; i++) if (cum[i] <= x) r++;
        end
        hist[r]++;
      end
      start = 1; @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (rp - rp0 != L) begin failures++; $display("FAIL used %0d random words", rp - rp0); end
      checks++;
      if (cyc > 2 * (P + L) + 2) begin failures++; $display("FAIL took %0d cycles", cyc); end
      checks++;
      if (zero_sum != (s == 0)) begin failures++; $display("FAIL zero_sum flag"); end
      if (s != 0) begin
        checks++; if (hist[P-1] != 0) begin failures++; $display("FAIL worst key drawn"); end
      end
      n = 0;
      for (int r = 0; r < P; r++)
        for (int c = 0; c < hist[r]; c++) begin
          checks++;
          if (parents[n] != keys[order[r]]) begin
            failures++; $display("FAIL run %0d parent %0d = %h expected %h", run, n, parents[n], keys[order[r]]);
          end
          n++;
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
