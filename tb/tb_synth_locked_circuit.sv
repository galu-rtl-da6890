// tb_synth_locked_circuit: compares the synthetic locked circuit with a
// procedural model of the same construction (hash-drawn gate types and
// fan-ins, key gates spread over the non-output gates) for random inputs and
// keys, and checks that the correct key locks nothing: flipping any single
// key bit from the correct key must be equivalent to inverting that gate.
module tb_synth_locked_circuit;
  import galu_pkg::*;
  localparam int M = 36, N = 7, K = 16, GATES = 160, WIN = 24;
  localparam int unsigned SEED = 32'h0000_17a5;
  logic [M-1:0] pi;
  logic [K-1:0] key;
  logic [N-1:0] po;
  int checks = 0, failures = 0;

  synth_locked_circuit dut (.pi(pi), .key(key), .po(po));

  function automatic logic [N-1:0] model(logic [M-1:0] x, logic [K-1:0] k);
    logic net [M + GATES];
    logic [N-1:0] o;
    for (int i = 0; i < M; i++) net[i] = x[i];
    for (int g = 0; g < GATES; g++) begin
      int unsigned h1, h2, h3;
      int w, a, b, ki;
      logic y;
      h1 = hash32(SEED + 3 * g); h2 = hash32(SEED + 3 * g + 1); h3 = hash32(SEED + 3 * g + 2);
      w = (M + g < WIN) ? M + g : WIN;
      a = (g < M) ? g : M + g - 1 - int'(h1 % w);
      b = M + g - 1 - int'(h2 % w);
      case (h3 % 6)
        0: y = net[a] & net[b];
        1: y = net[a] | net[b];
        2: y = ~(net[a] & net[b]);
        3: y = ~(net[a] | net[b]);
        4: y = net[a] ^ net[b];
        default: y = ~(net[a] ^ net[b]);
      endcase
      ki = -1;
      for (int i = 0; i < K; i++)
        if (((GATES - N) * i) / K + (GATES - N) / (2 * K) == g) ki = i;
      if (ki >= 0) y = y ^ k[ki] ^ logic'(hash32(SEED ^ 32'h9e37_79b9 ^ ki) & 1);
      net[M + g] = y;
    end
    for (int i = 0; i < N; i++) o[i] = net[M + GATES - N + i];
    return o;
  endfunction

  initial begin
    logic [K-1:0] ck;
    for (int i = 0; i < K; i++) ck[i] = logic'(hash32(SEED ^ 32'h9e37_79b9 ^ i) & 1);
    for (int n = 0; n < 2000; n++) begin
      for (int b = 0; b < M; b++) pi[b] = 1'($urandom_range(0, 1));
      key = (n % 4 == 0) ? ck : K'($urandom());
      #1;
      checks++;
      if (po != model(pi, key)) begin
        failures++;
        $display("FAIL in=%h key=%h po=%b model=%b", pi, key, po, model(pi, key));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
endmodule
