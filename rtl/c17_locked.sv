// c17_locked: the ISCAS-85 c17 case-study circuit, locked with two key gates
// and extended with the auxiliary comparator logic used for fitness checks.
//
// Function. The unlocked circuit is
//   PO1 = (PI1 & PI2) | (PI3 & ~(PI2 & PI4))
//   PO2 = ~(PI2 & PI4) & (PI3 | PI5).
// Key bit 0 gates the second term of PO1 through an AND gate and key bit 1
// enters the OR that feeds PO2, so the circuit behaves like the original only
// for key = 2'b01 (key[0] = 1, key[1] = 0), written "10" as keyinput0
// keyinput1. The comparators are XNORs of each primary output with its
// ground-truth value g_po, and `equal` is the AND of both comparators: it is
// 1 exactly when the applied key reproduces the oracle response.
//
// Interface and timing: purely combinational. pi[0] is PI1 ... pi[4] is PI5;
// po[0] is PO1, po[1] is PO2.
//
// The gate-level structure, key positions and comparator logic follow the
// published case study; the bit ordering of the ports is this design's own.
module c17_locked (
  input  logic [4:0] pi,
  input  logic [1:0] key,
  input  logic [1:0] g_po,
  output logic [1:0] po,
  output logic [1:0] comp,
  output logic       equal
);
  logic n00, n01, n02, n021, n03, n031;

  always_comb begin
    n00   = pi[0] & pi[1];          // AND(PI1, PI2)
    n01   = ~(pi[1] & pi[3]);       // NAND(PI2, PI4)
    n02   = pi[2] & n01;            // AND(PI3, N01)
    n021  = n02 & key[0];           // key gate 0
    n03   = pi[2] | pi[4];          // OR(PI3, PI5)
    n031  = n03 | key[1];           // key gate 1
    po[0] = n00 | n021;             // PO1
    po[1] = n01 & n031;             // PO2
    comp  = po ~^ g_po;             // auxiliary comparators
    equal = &comp;
  end
endmodule
