// tb_ensemble_voter: three keys of a c17 population are applied to random
// queries; the output must be the bitwise majority of the three locked-c17
// responses (written out here) and arrive E + 2 clock edges after start.
module tb_ensemble_voter;
  import galu_pkg::*;
  localparam int P = 8, E = 3, M = 5, N = 2, K = 2, PW = 3;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0, start = 0, busy, valid;
  logic [M-1:0] query = '0;
  logic [E-1:0][PW-1:0] top_idx = '0;
  logic [PW-1:0] key_addr;
  logic [K-1:0] key_data;
  logic [N-1:0] vote_out;
  logic [K-1:0] keys [P];
  int checks = 0, failures = 0;

  assign key_data = keys[key_addr];

  ensemble_voter #(.P(P), .E(E), .M(M), .N(N), .K(K), .CIRCUIT(CIRC_C17)) dut (.*);

  function automatic logic [N-1:0] c17(logic [4:0] x, logic [1:0] k);
    logic a, b, c, d, e;
    {e, d, c, b, a} = x;
    return {~(b & d) & (c | e | k[1]), (a & b) | (c & ~(b & d) & k[0])};
  endfunction

  initial begin
    int cyc;
    logic [N-1:0] r0, r1, r2, want;
    for (int i = 0; i < P; i++) keys[i] = K'(i);
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      for (int e = 0; e < E; e++) top_idx[e] = PW'($urandom_range(0, P - 1));
      query = M'($urandom());
      r0 = c17(query, keys[top_idx[0]]); r1 = c17(query, keys[top_idx[1]]); r2 = c17(query, keys[top_idx[2]]);
      want = (r0 & r1) | (r0 & r2) | (r1 & r2);
      start = 1; @(negedge clk); start = 0;
      cyc = 1;
      while (!valid) begin @(negedge clk); cyc++; end
      checks++;
      if (vote_out != want) begin failures++; $display("FAIL vote %b expected %b", vote_out, want); end
      checks++;
      if (cyc != E + 2) begin failures++; $display("FAIL latency %0d", cyc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
endmodule
