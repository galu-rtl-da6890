// tb_galu_benchmarks: the accelerator built for larger benchmark sizes.
//
// The default build holds a c432-sized circuit. Other benchmarks differ
// only in their sizes (inputs, outputs, gates, key length at 10 % overhead),
// so each is a build of the same design with other M, N, K and GATES over a
// synthetic locked netlist of that size. Runs here, all with the default GA
// settings (P = 100, L = 50, C = 4, T = 100, N_CE = 16):
//  * c880 size:  60 inputs, 26 outputs, 383 gates, 96-bit key, G = 4;
//  * c2670 size: 233 inputs, 140 outputs, 1193 gates, 119-bit key, G = 2.
// In the c2670-sized synthetic netlist most key gates are masked before
// they reach the outputs, so few key bits matter and a random initial key
// often already matches every training output: that run checks the data
// paths at this width (140 outputs over 16 engines, 9 cycles per pair)
// rather than the search. The 8000- to 20000-gate synthetic circuits are
// not run: their netlists take longer to build than a simulation is given.
// The generation limit is lowered to bound simulation time; every other
// check of galu_harness applies (scores re-computed here, best key, stop
// rule, evaluation time P*T*ceil(N/N_CE), ensemble vote). More outputs than
// engines make each pair take several checking cycles, which the timing
// check covers.
module tb_galu_benchmarks;
  import galu_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int  c0, f0, c1, f1;
  bit  d0, d1;
  int  unused [2][9];

  galu_harness #(.G(4), .M(60), .N(26), .K(96), .GATES(383), .NQ(8)) u_c880 (
    .clk(clk), .checks(c0), .failures(f0), .finished(d0),
    .n_cross(unused[0][0]), .n_copy(unused[0][1]), .n_mut(unused[0][2]), .n_stall(unused[0][3]),
    .n_wait(unused[0][4]), .n_overlap(unused[0][5]), .n_gen(unused[0][6]), .n_success(unused[0][7]), .n_exhaust(unused[0][8])
  );
  galu_harness #(.G(2), .M(233), .N(140), .K(119), .GATES(1193), .NQ(8)) u_c2670 (
    .clk(clk), .checks(c1), .failures(f1), .finished(d1),
    .n_cross(unused[1][0]), .n_copy(unused[1][1]), .n_mut(unused[1][2]), .n_stall(unused[1][3]),
    .n_wait(unused[1][4]), .n_overlap(unused[1][5]), .n_gen(unused[1][6]), .n_success(unused[1][7]), .n_exhaust(unused[1][8])
  );

  initial begin
    wait (d0 && d1);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, f0 + f1);
    $finish;
  end
  initial begin
    repeat (3_000_000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + 1, f0 + f1 + 1);
    $finish;
  end
endmodule
