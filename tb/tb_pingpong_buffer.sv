// tb_pingpong_buffer: a random writer and a random reader exchange words
// through the two banks. Every word must arrive once and in order, the
// writer must be refused exactly when both banks are full, and the reader
// must see data exactly when a bank is full.
module tb_pingpong_buffer;
  localparam int W = 16;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0, wr_valid = 0, rd_release = 0, wr_ready, rd_valid;
  logic [W-1:0] wr_data = '0, rd_data;
  logic [W-1:0] q [$];
  int checks = 0, failures = 0, stalls = 0, received = 0;

  pingpong_buffer #(.W(W)) dut (.*);

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      // flags against the model occupancy
      checks++;
      if (wr_ready != (q.size() < 2) || rd_valid != (q.size() > 0)) begin
        failures++; $display("FAIL flags with %0d words held", q.size());
      end
      if (rd_valid) begin
        checks++;
        if (rd_data != q[0]) begin failures++; $display("FAIL data %h expected %h", rd_data, q[0]); end
      end
      wr_valid   = ($urandom_range(0, 3) != 0);
      wr_data    = W'($urandom());
      rd_release = rd_valid && ($urandom_range(0, 2) == 0);
      if (wr_valid && !wr_ready) stalls++;
      @(posedge clk); #1;
      if (rd_release) begin void'(q.pop_front()); received++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model update at the clock edge, using the values the DUT saw
  always @(posedge clk) if (rst_n && wr_valid && wr_ready) q.push_back(wr_data);

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
endmodule
