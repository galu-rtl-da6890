// tb_sorting_engine: sorts random fitness tables of the default population
// (P = 100) with many ties. The order must be by descending score, ties by
// ascending key index, as computed here by a selection sort, and `done` must
// come exactly P + 1 cycles after `start` (linear latency).
module tb_sorting_engine;
  localparam int P = 100, FW = 10, PW = 7;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0, start = 0, busy, done;
  logic [P-1:0][FW-1:0] fit_in = '0, fit_s;
  logic [P-1:0][PW-1:0] order;
  int checks = 0, failures = 0;

  sorting_engine #(.P(P), .FW(FW)) dut (.*);

  initial begin
    int idx [P];
    int cyc;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int run = 0; run < 6; run++) begin
      for (int i = 0; i < P; i++) fit_in[i] = FW'((run % 2) ? $urandom_range(0, 700) : $urandom_range(600, 610));
      for (int i = 0; i < P; i++) idx[i] = i;
      for (int i = 0; i < P; i++)
        for (int j = i + 1; j < P; j++)
          if (fit_in[idx[j]] > fit_in[idx[i]] || (fit_in[idx[j]] == fit_in[idx[i]] && idx[j] < idx[i])) begin
            int tmp;
            tmp = idx[i]; idx[i] = idx[j]; idx[j] = tmp;
          end
      start = 1; @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != P + 1) begin failures++; $display("FAIL latency %0d", cyc); end
      for (int r = 0; r < P; r++) begin
        checks++;
        if (int'(order[r]) != idx[r] || fit_s[r] != fit_in[idx[r]]) begin
          failures++; $display("FAIL rank %0d: %0d expected %0d", r, order[r], idx[r]);
        end
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
