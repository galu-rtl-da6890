// tb_rand_buffer: fills a small random buffer, then advances the two read
// ports independently and checks that each returns the words in order from
// its own start position, wrapping at the end.
module tb_rand_buffer;
  localparam int DEPTH = 64, W = 32;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0, wr_en = 0;
  logic [5:0] wr_addr = '0;
  logic [W-1:0] wr_data = '0;
  logic [1:0] rd_next = '0;
  logic [1:0][W-1:0] rd_data;
  logic [W-1:0] mdl [DEPTH];
  int ptr [2];
  int checks = 0, failures = 0;

  rand_buffer #(.DEPTH(DEPTH), .W(W), .NRD(2)) dut (.*);

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); wr_en = 1; wr_addr = 6'(i); wr_data = $urandom(); mdl[i] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    ptr[0] = 0; ptr[1] = DEPTH / 2;
    for (int n = 0; n < 300; n++) begin
      #1;
      for (int p = 0; p < 2; p++) begin
        checks++;
        if (rd_data[p] != mdl[ptr[p]]) begin failures++; $display("FAIL port %0d at %0d", p, ptr[p]); end
      end
      rd_next = 2'($urandom());
      @(negedge clk);
      for (int p = 0; p < 2; p++) if (rd_next[p]) ptr[p] = (ptr[p] + 1) % DEPTH;
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
