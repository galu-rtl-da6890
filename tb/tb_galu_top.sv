// tb_galu_top: end-to-end test of the GALU accelerator.
//
// Three configurations run side by side:
//  * the default search (synthetic locked circuit, 36 inputs, 7 outputs,
//    16 key bits, P = 100, L = 50, C = 4, T = 100, N_CE = 16) with the
//    generation limit lowered to G = 12 to keep the run short;
//  * the c17 case study (5 inputs, 2 outputs, 2 key bits) on a single
//    checking engine, so each pair takes two checking cycles and the
//    ping-pong buffer fills and stalls the emulator;
//  * a small synthetic search (P = 16, 10 key bits) against a noisy oracle,
//    which no key can match fully, so it runs to its generation limit and
//    its population loses enough diversity for mutation to switch on.
// Each configuration is checked by galu_harness. Every mechanism of the
// design must occur at least once: crossover, uncrossed copies, mutation,
// ping-pong stalls, the early start of a new epoch while breeding (and the
// wait for a child not yet written), several generations, termination by
// success and termination by the generation limit.
module tb_galu_top;
  import galu_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  int  ca, fa, cb, fb;
  bit  da, db;
  int  a_cross, a_copy, a_mut, a_stall, a_wait, a_ovl, a_gen, a_succ, a_exh;
  int  b_cross, b_copy, b_mut, b_stall, b_wait, b_ovl, b_gen, b_succ, b_exh;

  galu_harness #(.G(12), .NQ(40)) u_a (
    .clk(clk), .checks(ca), .failures(fa), .finished(da),
    .n_cross(a_cross), .n_copy(a_copy), .n_mut(a_mut), .n_stall(a_stall),
    .n_wait(a_wait), .n_overlap(a_ovl), .n_gen(a_gen), .n_success(a_succ), .n_exhaust(a_exh)
  );

  galu_harness #(
    .P(8), .L(4), .C(4), .G(6), .T(16), .M(5), .N(2), .K(2), .N_CE(1),
    .RAND_DEPTH(256), .CIRCUIT(CIRC_C17), .NQ(16)
  ) u_b (
    .clk(clk), .checks(cb), .failures(fb), .finished(db),
    .n_cross(b_cross), .n_copy(b_copy), .n_mut(b_mut), .n_stall(b_stall),
    .n_wait(b_wait), .n_overlap(b_ovl), .n_gen(b_gen), .n_success(b_succ), .n_exhaust(b_exh)
  );

  int  cc, fc;
  bit  dc;
  int  c_cross, c_copy, c_mut, c_stall, c_wait, c_ovl, c_gen, c_succ, c_exh;

  galu_harness #(
    .P(16), .L(8), .C(4), .G(40), .T(32), .M(12), .N(6), .K(10), .N_CE(4),
    .RAND_DEPTH(1024), .GATES(60), .NQ(16), .NOISE_PCT(10)
  ) u_c (
    .clk(clk), .checks(cc), .failures(fc), .finished(dc),
    .n_cross(c_cross), .n_copy(c_copy), .n_mut(c_mut), .n_stall(c_stall),
    .n_wait(c_wait), .n_overlap(c_ovl), .n_gen(c_gen), .n_success(c_succ), .n_exhaust(c_exh)
  );

  int checks, failures;

  task automatic mech(input string name, input int count);
    checks++;
    $display("mechanism %-28s %0d", name, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism %s never happened", name);
    end
  endtask

  initial begin
    wait (da && db && dc);
    checks   = ca + cb + cc;
    failures = fa + fb + fc;
    mech("crossover",                 a_cross + b_cross + c_cross);
    mech("uncrossed copy",            a_copy + b_copy + c_copy);
    mech("mutation",                  a_mut + b_mut + c_mut);
    mech("ping-pong stall",           a_stall + b_stall + c_stall);
    mech("early-start overlap",       a_ovl + b_ovl + c_ovl);
    mech("wait for unwritten child",  a_wait + b_wait + c_wait);
    mech("generations beyond first",  a_gen - 1 + b_gen - 1 + c_gen - 1);
    mech("termination by success",    a_succ + b_succ + c_succ);
    mech("termination by limit G",    a_exh + b_exh + c_exh);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
endmodule
