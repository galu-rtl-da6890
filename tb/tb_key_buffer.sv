// tb_key_buffer: loads a population through the host port, overwrites
// random entries through the breeding port (also in the same cycle as a
// host write, where breeding must win), and checks all three read ports
// against a model.
module tb_key_buffer;
  localparam int P = 100, K = 16;
  logic clk = 0;
  always #5 clk = ~clk;
  logic host_we = 0, brd_we = 0;
  logic [6:0] host_waddr = '0, brd_waddr = '0, a_addr = '0, b_addr = '0, c_addr = '0;
  logic [K-1:0] host_wdata = '0, brd_wdata = '0, a_data, b_data, c_data;
  logic [K-1:0] mdl [P];
  int checks = 0, failures = 0;

  key_buffer dut (.*);

  initial begin
    for (int p = 0; p < P; p++) begin
      @(negedge clk); host_we = 1; host_waddr = 7'(p); host_wdata = K'($urandom()); mdl[p] = host_wdata;
    end
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      host_we = 1'($urandom_range(0, 1)); brd_we = 1'($urandom_range(0, 1));
      host_waddr = 7'($urandom_range(0, P - 1));
      brd_waddr = (n % 5 == 0) ? host_waddr : 7'($urandom_range(0, P - 1));
      host_wdata = K'($urandom()); brd_wdata = K'($urandom());
      if (brd_we) mdl[brd_waddr] = brd_wdata;
      else if (host_we) mdl[host_waddr] = host_wdata;
    end
    @(negedge clk); host_we = 0; brd_we = 0;
    for (int n = 0; n < 300; n++) begin
      a_addr = 7'($urandom_range(0, P - 1)); b_addr = 7'($urandom_range(0, P - 1));
      c_addr = 7'($urandom_range(0, P - 1)); #1;
      checks++;
      if (a_data != mdl[a_addr] || b_data != mdl[b_addr] || c_data != mdl[c_addr]) begin
        failures++; $display("FAIL read");
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
