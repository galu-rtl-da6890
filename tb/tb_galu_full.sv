// tb_galu_full: one complete key search of the GALU accelerator at its
// default size: synthetic locked circuit with 36 inputs, 7 outputs and 16
// key bits, population 100, 50 parents, 4 children per pair, up to 50
// generations, 100 training pairs and 16 checking engines. The host side and
// all checks are those of galu_harness_full: every final score is recomputed,
// the best score, success flag and generation count are checked against the
// termination rule, and the ensemble vote of the three best keys is checked
// on random queries.
module tb_galu_full;
  logic clk = 0;
  always #5 clk = ~clk;

  int checks, failures;
  bit fin;
  int n_cross, n_copy, n_mut, n_stall, n_wait, n_ovl, n_gen, n_succ, n_exh;

  galu_harness_full u_h (
    .clk(clk), .checks(checks), .failures(failures), .finished(fin),
    .n_cross(n_cross), .n_copy(n_copy), .n_mut(n_mut), .n_stall(n_stall),
    .n_wait(n_wait), .n_overlap(n_ovl), .n_gen(n_gen), .n_success(n_succ), .n_exhaust(n_exh)
  );

  initial begin
    wait (fin);
    $display("crossovers %0d, copies %0d, mutations %0d, generations %0d, success %0d",
             n_cross, n_copy, n_mut, n_gen, n_succ);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
endmodule
