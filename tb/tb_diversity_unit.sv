// tb_diversity_unit: default population (P = 100, K = 16). Generation 0
// sees random keys: diversity D = sum_j c_j (P - c_j), threshold D/2 and no
// mutation are expected. Generation 1 sees a nearly uniform population:
// mutation must switch on with p_mutate = min(2^16 - 1,
// (Dth - D) * 2^32 / (P^2 K p_flip_fx)). Generation 2 sees random keys
// again and mutation must switch off. Latencies K + 1 (no division) and
// K + 67 (with division) are checked.
module tb_diversity_unit;
  import galu_pkg::*;
  localparam int P = 100, K = 16;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0, clear = 0, key_valid = 0, compute = 0, first = 0;
  logic [K-1:0] key = '0;
  logic [31:0] div, div_th;
  logic mutate_en, ready, done;
  logic [PROB_W-1:0] p_mutate;
  int checks = 0, failures = 0;

  diversity_unit #(.P(P), .K(K)) dut (.*);

  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic generation(input int mode, input bit is_first, output longint d, output int lat);
    int c [K];
    logic [K-1:0] base;
    base = K'($urandom());
    for (int j = 0; j < K; j++) c[j] = 0;
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    for (int p = 0; p < P; p++) begin
      key = (mode == 0) ? K'($urandom()) : (base ^ (($urandom_range(0, 9) == 0) ? K'(1 << $urandom_range(0, K - 1)) : '0));
      for (int j = 0; j < K; j++) c[j] += int'(key[j]);
      key_valid = 1; @(negedge clk);
      key_valid = 0; if (p % 3 == 0) @(negedge clk);
    end
    d = 0;
    for (int j = 0; j < K; j++) d += longint'(c[j]) * longint'(P - c[j]);
    first = is_first; compute = 1; @(negedge clk); compute = 0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
  endtask

  initial begin
    longint d0, d1, d2, th, pm;
    int lat;
    repeat (2) @(negedge clk); rst_n = 1;
    generation(0, 1, d0, lat);
    th = d0 / 2;
    check(longint'(div) == d0 && longint'(div_th) == th, $sformatf("gen0 div %0d th %0d expected %0d", div, div_th, d0));
    check(!mutate_en, "gen0 mutation");
    check(lat == K + 1, $sformatf("gen0 latency %0d", lat));
    generation(1, 0, d1, lat);
    pm = ((th - d1) << 32) / (longint'(P) * P * K * longint'(P_FLIP_DEFAULT));
    if (pm > 65535) pm = 65535;
    check(longint'(div) == d1, $sformatf("gen1 div %0d expected %0d", div, d1));
    check(mutate_en == (d1 < th), "gen1 mutation decision");
    check(longint'(p_mutate) == pm, $sformatf("gen1 p_mutate %0d expected %0d", p_mutate, pm));
    check(lat == K + 67, $sformatf("gen1 latency %0d", lat));
    check(ready, "ready after computation");
    generation(0, 0, d2, lat);
    check(longint'(div) == d2 && mutate_en == (d2 < th), "gen2 decision");
    check(longint'(div_th) == th, "threshold kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
endmodule
