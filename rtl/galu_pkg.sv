// galu_pkg: constants and helpers shared by the GALU key-search accelerator.
//
// Probabilities of the genetic operators are unsigned 16-bit fractions of
// 2^16 (a random 16-bit value r fires an event of probability p when
// r < p). The defaults below are the operator settings the design is tuned
// for: crossover probability 0.9, bit-exchange probability 0.5 and a fixed
// bit-flip probability of 0.05. The integer hash is used only at elaboration
// time, to draw the gate structure of the synthetic locked benchmark.
package galu_pkg;

  // Width of a probability and of one random word.
  localparam int PROB_W = 16;
  localparam int RAND_W = 32;

  // Default operator probabilities, as fractions of 2^16.
  localparam logic [PROB_W-1:0] P_CROSS_DEFAULT = 16'd58982;  // 0.9
  localparam logic [PROB_W-1:0] P_EXCH_DEFAULT  = 16'd32768;  // 0.5
  localparam logic [PROB_W-1:0] P_FLIP_DEFAULT  = 16'd3277;   // 0.05

  // Selection of the emulated target circuit.
  typedef enum int {
    CIRC_SYNTH = 0,   // synthetic XOR/XNOR-locked random-gate circuit
    CIRC_C17   = 1    // key-locked c17 case study (5 in, 2 out, 2 key bits)
  } circuit_e;

  // Gate types of the synthetic circuit.
  typedef enum logic [2:0] {
    G_AND  = 3'd0,
    G_OR   = 3'd1,
    G_NAND = 3'd2,
    G_NOR  = 3'd3,
    G_XOR  = 3'd4,
    G_XNOR = 3'd5
  } gate_e;

  // 32-bit integer mixing function (xorshift-multiply), used as a
  // deterministic source of "random" structure at elaboration time.
  function automatic int unsigned hash32(int unsigned x);
    int unsigned h;
    h = x;
    h = h ^ (h >> 16);
    h = h * 32'h7feb352d;
    h = h ^ (h >> 15);
    h = h * 32'h846ca68b;
    h = h ^ (h >> 16);
    return h;
  endfunction

  // Smallest number of matching observable bits, out of TOTAL, for which
  // the fitness ratio exceeds 1 - eps, with eps given in parts per million.
  function automatic int unsigned fit_threshold(int unsigned total, int unsigned eps_ppm);
    longint unsigned num;
    num = longint'(total) * (longint'(1000000) - longint'(eps_ppm));
    return int'(num / 1000000) + 1;
  endfunction

endpackage
