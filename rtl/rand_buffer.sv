// rand_buffer: on-chip store of random words precomputed by the host.
//
// The probabilistic operators (selection, crossover, mutation) draw their
// random numbers from this buffer instead of an on-chip generator. The host
// fills it through the write port before a run. Each of the NRD read ports
// has its own pointer that walks the buffer circularly: rd_data[p] is the
// word at the pointer (combinational read) and a pulse on rd_next[p]
// advances the pointer by one. Port p starts at word p*DEPTH/NRD so the
// consumers begin in different parts of the buffer. Pointers reset to their
// start positions; the contents are not reset.
//
// Keeping precomputed random numbers in a buffer follows the design; the
// depth, word width and the multi-pointer arrangement are this design's own.
module rand_buffer #(
  parameter int DEPTH = 4096,
  parameter int W     = 32,
  parameter int NRD   = 2,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                wr_en,
  input  logic [AW-1:0]       wr_addr,
  input  logic [W-1:0]        wr_data,
  input  logic [NRD-1:0]      rd_next,
  output logic [NRD-1:0][W-1:0] rd_data
);
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] ptr [NRD];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  for (genvar p = 0; p < NRD; p++) begin : g_port
    localparam int START = p * DEPTH / NRD;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)          ptr[p] <= AW'(START);
      else if (rd_next[p]) ptr[p] <= (ptr[p] == AW'(DEPTH - 1)) ? '0 : ptr[p] + 1'b1;
    end
    assign rd_data[p] = mem[ptr[p]];
  end
endmodule
