// synth_locked_circuit: synthetic combinational benchmark with random gate
// types and connections, locked by XOR/XNOR key gates.
//
// How it works. The circuit has M primary inputs and GATES two-input gates,
// net n = M + g being the output of gate g. Gate g draws its type (AND, OR,
// NAND, NOR, XOR, XNOR) and its two fan-ins from a hash of SEED and g; the
// first M gates take input g as one fan-in so every primary input is used,
// and later gates draw their fan-ins from the WIN most recent nets. The last N
// nets are the primary outputs. Key bit i is inserted after gate KGATE(i),
// spread evenly over the non-output gates: it is an XOR gate when the correct
// key bit is 0 and an XNOR gate when it is 1, the correct bit also being drawn
// from the hash. With the correct key the locked circuit equals the unlocked
// one; correct_key() gives that key so a test can build the oracle.
//
// Interface and timing: purely combinational, pi in, key in, po out.
//
// The random structure and the key-gate style follow the synthetic circuits
// and the XOR locking the design is evaluated with; the hash, the fan-in
// window and the key positions are this design's own choices. Gates whose
// output reaches no primary output are left in place (a random netlist has
// them); synthesis removes them, so unused-signal warnings on `net` stand.
// The window keeps paths short at c432 size, where every key gate matters;
// at sizes of a thousand gates and more many key gates are masked before
// the outputs, so such a build locks the circuit far more weakly than its
// key length suggests.
module synth_locked_circuit import galu_pkg::*; #(
  parameter int          M     = 36,
  parameter int          N     = 7,
  parameter int          K     = 16,
  parameter int          GATES = 160,
  parameter int          WIN   = 24,
  parameter int unsigned SEED  = 32'h0000_17a5
) (
  input  logic [M-1:0] pi,
  input  logic [K-1:0] key,
  output logic [N-1:0] po
);
  localparam int NETS = M + GATES;

  // Gate that key bit i follows.
  function automatic int kgate(int i);
    return ((GATES - N) * i) / K + (GATES - N) / (2 * K);
  endfunction

  // Key index locking gate g, or -1.
  function automatic int key_of_gate(int g);
    for (int i = 0; i < K; i++) if (kgate(i) == g) return i;
    return -1;
  endfunction

  function automatic logic correct_bit(int i);
    return logic'(hash32(SEED ^ 32'h9e37_79b9 ^ i) & 1);
  endfunction

  logic [NETS-1:0] net;
  assign net[M-1:0] = pi;

  for (genvar g = 0; g < GATES; g++) begin : g_gate
    localparam int unsigned H1  = hash32(SEED + 3 * g);
    localparam int unsigned H2  = hash32(SEED + 3 * g + 1);
    localparam int unsigned H3  = hash32(SEED + 3 * g + 2);
    localparam int          W   = (M + g < WIN) ? M + g : WIN;
    localparam int          A   = (g < M) ? g : M + g - 1 - int'(H1 % W);
    localparam int          B   = M + g - 1 - int'(H2 % W);
    localparam gate_e       TYP = gate_e'(H3 % 6);
    localparam int          KI  = key_of_gate(g);
    logic y;
    always_comb begin
      unique case (TYP)
        G_AND:   y = net[A] & net[B];
        G_OR:    y = net[A] | net[B];
        G_NAND:  y = ~(net[A] & net[B]);
        G_NOR:   y = ~(net[A] | net[B]);
        G_XOR:   y = net[A] ^ net[B];
        default: y = ~(net[A] ^ net[B]);
      endcase
    end
    if (KI >= 0) begin : g_key
      // XOR key gate when the correct bit is 0, XNOR when it is 1.
      assign net[M+g] = y ^ key[KI] ^ correct_bit(KI);
    end else begin : g_plain
      assign net[M+g] = y;
    end
  end

  assign po = net[NETS-1 -: N];

  // The key that unlocks this instance.
  function automatic logic [K-1:0] correct_key();
    logic [K-1:0] k;
    for (int i = 0; i < K; i++) k[i] = correct_bit(i);
    return k;
  endfunction

endmodule
