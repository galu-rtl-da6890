// tb_training_buffer: writes T random input/expected pairs, reads them back
// in random order and compares with a copy kept here.
module tb_training_buffer;
  localparam int T = 100, M = 36, N = 7;
  logic clk = 0;
  always #5 clk = ~clk;
  logic wr_en = 0;
  logic [6:0] wr_addr = '0, rd_addr = '0;
  logic [M-1:0] wr_in = '0, rd_in, ref_in [T];
  logic [N-1:0] wr_exp = '0, rd_exp, ref_exp [T];
  int checks = 0, failures = 0;

  training_buffer dut (.*);

  initial begin
    for (int t = 0; t < T; t++) begin
      ref_in[t] = {4'($urandom()), $urandom()};
      ref_exp[t] = N'($urandom());
      @(negedge clk); wr_en = 1; wr_addr = 7'(t); wr_in = ref_in[t]; wr_exp = ref_exp[t];
    end
    @(negedge clk); wr_en = 0;
    for (int n = 0; n < 300; n++) begin
      rd_addr = 7'($urandom_range(0, T - 1)); #1;
      checks++;
      if (rd_in != ref_in[rd_addr] || rd_exp != ref_exp[rd_addr]) begin
        failures++; $display("FAIL entry %0d", rd_addr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
endmodule
