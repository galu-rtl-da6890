// tb_c17_locked: exhaustive test of the locked c17 case study. For all 32
// inputs, 4 keys and 4 ground-truth values it compares the outputs with the
// locked equations written out here, checks that key 2'b01 reproduces the
// unlocked c17 function and that the comparators and `equal` flag agree.
module tb_c17_locked;
  logic [4:0] pi;
  logic [1:0] key, g_po, po, comp;
  logic       equal;
  int checks = 0, failures = 0;

  c17_locked dut (.pi(pi), .key(key), .g_po(g_po), .po(po), .comp(comp), .equal(equal));

  initial begin
    logic a, b, c, d, e, o1, o2, u1, u2;
    for (int v = 0; v < 32; v++) for (int k = 0; k < 4; k++) for (int g = 0; g < 4; g++) begin
      pi = 5'(v); key = 2'(k); g_po = 2'(g);
      #1;
      {e, d, c, b, a} = pi;
      u1 = (a & b) | (c & ~(b & d));         // unlocked PO1
      u2 = ~(b & d) & (c | e);               // unlocked PO2
      o1 = (a & b) | (c & ~(b & d) & key[0]);
      o2 = ~(b & d) & (c | e | key[1]);
      checks++; if (po != {o2, o1}) begin failures++; $display("FAIL po %b key %b", pi, key); end
      checks++; if (comp != ~({o2, o1} ^ g_po) || equal != (g_po == {o2, o1})) begin
        failures++; $display("FAIL comparators"); end
      if (k == 1) begin
        checks++; if (po != {u2, u1}) begin failures++; $display("FAIL correct key"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
endmodule
