// target_circuit: the locked netlist C_e as mapped onto the accelerator.
//
// Selects, at elaboration, which encrypted circuit is emulated: the
// synthetic XOR/XNOR-locked benchmark (CIRCUIT = CIRC_SYNTH) or the c17 case
// study (CIRCUIT = CIRC_C17, which needs M = 5, N = 2, K = 2). The output is
// the response of the locked circuit to primary input `pi` under candidate
// key `key`. Purely combinational; the emulator registers the result.
module target_circuit import galu_pkg::*; #(
  parameter int          CIRCUIT = CIRC_SYNTH,
  parameter int          M       = 36,
  parameter int          N       = 7,
  parameter int          K       = 16,
  parameter int          GATES   = 160,
  parameter int unsigned SEED    = 32'h0000_17a5
) (
  input  logic [M-1:0] pi,
  input  logic [K-1:0] key,
  output logic [N-1:0] po
);
  if (CIRCUIT == CIRC_C17) begin : g_c17
    if (M != 5 || N != 2 || K != 2) begin : g_bad
      $error("c17 target needs M=5, N=2, K=2");
    end
    c17_locked u_c17 (
      .pi   (pi[4:0]),
      .key  (key[1:0]),
      .g_po (2'b00),
      .po   (po[1:0]),
      .comp (),
      .equal()
    );
  end else begin : g_synth
    synth_locked_circuit #(
      .M(M), .N(N), .K(K), .GATES(GATES), .SEED(SEED)
    ) u_synth (
      .pi (pi),
      .key(key),
      .po (po)
    );
  end
endmodule
