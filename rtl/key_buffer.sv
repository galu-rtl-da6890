// key_buffer: the population of P candidate keys, K bits each.
//
// Two write ports: the host port loads the initial population, and the
// breeding port receives each offspring key from the crossover/mutation
// unit; when both write in the same cycle the breeding port wins. Three
// combinational read ports serve the emulator (port A), the selection unit
// copying parents (port B) and the host or ensemble voter (port C).
// Offspring overwrite the old population in place: the parents have already
// been copied into the selection unit's parent buffer, which lets the next
// generation's evaluation start as soon as the first child is written.
//
// Keeping the population on chip follows the design; the port arrangement
// and the in-place overwrite are this design's own.
module key_buffer #(
  parameter int P = 100,
  parameter int K = 16,
  localparam int AW = $clog2(P)
) (
  input  logic          clk,
  input  logic          host_we,
  input  logic [AW-1:0] host_waddr,
  input  logic [K-1:0]  host_wdata,
  input  logic          brd_we,
  input  logic [AW-1:0] brd_waddr,
  input  logic [K-1:0]  brd_wdata,
  input  logic [AW-1:0] a_addr,
  output logic [K-1:0]  a_data,
  input  logic [AW-1:0] b_addr,
  output logic [K-1:0]  b_data,
  input  logic [AW-1:0] c_addr,
  output logic [K-1:0]  c_data
);
  logic [K-1:0] mem [P];

  always_ff @(posedge clk) begin
    if (brd_we)       mem[brd_waddr]  <= brd_wdata;
    else if (host_we) mem[host_waddr] <= host_wdata;
  end

  assign a_data = mem[a_addr];
  assign b_data = mem[b_addr];
  assign c_data = mem[c_addr];
endmodule
