// training_buffer: on-chip store of the T training input/output pairs.
//
// Each entry holds one primary-input vector (M bits) and the ground-truth
// response of the unlocked chip to it (N bits), collected by the host before
// the key search. The host writes entries through the write port; the
// emulator reads the entry at rd_addr combinationally. The buffer is read
// once per (key, pair) and never changes during a run, so no training data
// moves between off-chip memory and the accelerator while keys evolve.
//
// Holding the training set on chip follows the design; the entry layout
// and single write port are this design's own.
module training_buffer #(
  parameter int T = 100,
  parameter int M = 36,
  parameter int N = 7,
  localparam int AW = $clog2(T)
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [M-1:0]  wr_in,
  input  logic [N-1:0]  wr_exp,
  input  logic [AW-1:0] rd_addr,
  output logic [M-1:0]  rd_in,
  output logic [N-1:0]  rd_exp
);
  logic [M-1:0] in_mem  [T];
  logic [N-1:0] exp_mem [T];

  always_ff @(posedge clk) begin
    if (wr_en) begin
      in_mem[wr_addr]  <= wr_in;
      exp_mem[wr_addr] <= wr_exp;
    end
  end

  assign rd_in  = in_mem[rd_addr];
  assign rd_exp = exp_mem[rd_addr];
endmodule
