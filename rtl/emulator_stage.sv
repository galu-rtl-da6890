// emulator_stage: circuit emulation front end of the fitness evaluation.
//
// For every key j of the population and every training pair t, the stage
// applies input vector I_t and key K_j to the emulated locked circuit and
// registers the observable outputs, together with the expected outputs, into
// the ping-pong buffer. Keys are visited in order 0..P-1, pairs 0..T-1 for
// each key. A pulse on `start` begins a generation. Key j is emulated only
// once j < keys_avail: in the first generation the whole host-loaded
// population is available, in later ones keys_avail is the number of
// offspring already written, so evaluation of a new epoch starts while the
// previous epoch is still breeding (early start). When the ping-pong bank is
// full the stage waits (stall is high). One (key, pair) is emulated per
// cycle when nothing stalls. The first time a key is applied it is also
// passed to the diversity unit (key_seen) so the population average is built
// while emulating. `done` pulses after the last pair of key P-1 is written.
//
// Ping-pong word layout, LSB first: obs[N], exp[N], key index, last-pair flag.
//
// Emulation with registered observable wires, the ping-pong hand-off, the
// early start and building the average key alongside emulation follow the
// design; the visiting order and handshake are this design's own.
module emulator_stage import galu_pkg::*; #(
  parameter int          P       = 100,
  parameter int          T       = 100,
  parameter int          M       = 36,
  parameter int          N       = 7,
  parameter int          K       = 16,
  parameter int          CIRCUIT = CIRC_SYNTH,
  parameter int          GATES   = 160,
  parameter int unsigned SEED    = 32'h0000_17a5,
  localparam int PW  = $clog2(P),
  localparam int TW  = $clog2(T),
  localparam int PPW = 2 * N + PW + 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [PW:0]    keys_avail,
  output logic [PW-1:0]  key_addr,
  input  logic [K-1:0]   key_data,
  output logic [TW-1:0]  pair_addr,
  input  logic [M-1:0]   pair_in,
  input  logic [N-1:0]   pair_exp,
  output logic           pp_valid,
  input  logic           pp_ready,
  output logic [PPW-1:0] pp_data,
  output logic           key_seen,
  output logic [K-1:0]   key_seen_data,
  output logic           stall,
  output logic           busy,
  output logic           done
);
  logic [PW-1:0] j;
  logic [TW-1:0] t;
  logic          running;
  logic [N-1:0]  obs;
  logic          have_key, fire;

  target_circuit #(
    .CIRCUIT(CIRCUIT), .M(M), .N(N), .K(K), .GATES(GATES), .SEED(SEED)
  ) u_circ (
    .pi (pair_in),
    .key(key_data),
    .po (obs)
  );

  assign key_addr  = j;
  assign pair_addr = t;
  assign have_key  = ({1'b0, j} < keys_avail);
  assign pp_valid  = running && have_key;
  assign fire      = pp_valid && pp_ready;
  assign stall     = pp_valid && !pp_ready;
  assign pp_data   = {(t == TW'(T - 1)), j, pair_exp, obs};
  assign key_seen      = fire && (t == '0);
  assign key_seen_data = key_data;
  assign busy      = running;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      j       <= '0;
      t       <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        running <= 1'b1;
        j       <= '0;
        t       <= '0;
      end else if (fire) begin
        if (t == TW'(T - 1)) begin
          t <= '0;
          if (j == PW'(P - 1)) begin
            running <= 1'b0;
            done    <= 1'b1;
          end else begin
            j <= j + 1'b1;
          end
        end else begin
          t <= t + 1'b1;
        end
      end
    end
  end
endmodule
