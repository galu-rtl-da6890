// tb_cnf_checking_engine: CE 1 of 3 over 7 wires owns wires 1 and 4 after
// reset. Random observed/expected vectors are checked slot by slot and the
// match count is compared with a count made here; then the CNF buffer is
// reprogrammed (wires 6 and 0, then a single wire 3) and checked again,
// and `clear` must restart the count.
module tb_cnf_checking_engine;
  localparam int N = 7, N_CE = 3, CE_ID = 1, CW = 10;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0, cfg_we = 0, check = 0, clear = 0;
  logic [1:0] cfg_slot = '0, slot = '0;
  logic [2:0] cfg_idx = '0;
  logic [2:0] cfg_len = '0;
  logic [N-1:0] obs = '0, exp_val = '0;
  logic [CW-1:0] count;
  int checks = 0, failures = 0, mdl = 0;
  int wires [3];
  int nw;

  cnf_checking_engine #(.N(N), .N_CE(N_CE), .CE_ID(CE_ID), .CW(CW)) dut (.*);

  task automatic run_pairs(int npairs);
    for (int p = 0; p < npairs; p++) begin
      @(negedge clk);
      obs = N'($urandom()); exp_val = N'($urandom());
      for (int s = 0; s < 3; s++) begin
        check = 1; slot = 2'(s);
        if (s < nw) mdl += int'(obs[wires[s]] == exp_val[wires[s]]);
        @(negedge clk);
      end
      check = 0;
      checks++;
      if (int'(count) != mdl) begin failures++; $display("FAIL count %0d expected %0d", count, mdl); end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    wires[0] = 1; wires[1] = 4; nw = 2;
    run_pairs(40);
    // clear with a check in the same cycle
    @(negedge clk); obs = '1; exp_val = '1; clear = 1; check = 1; slot = 0;
    @(negedge clk); clear = 0; check = 0; mdl = 1;
    checks++; if (count != 1) begin failures++; $display("FAIL clear"); end
    // reprogram: wires 6, 0
    @(negedge clk); cfg_we = 1; cfg_slot = 0; cfg_idx = 6; cfg_len = 2;
    @(negedge clk); cfg_slot = 1; cfg_idx = 0;
    @(negedge clk); cfg_we = 0;
    wires[0] = 6; wires[1] = 0; nw = 2;
    run_pairs(40);
    @(negedge clk); cfg_we = 1; cfg_slot = 0; cfg_idx = 3; cfg_len = 1;
    @(negedge clk); cfg_we = 0;
    wires[0] = 3; nw = 1;
    run_pairs(40);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
endmodule
