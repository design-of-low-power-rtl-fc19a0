// tb_bvppg_gate: exhaustive self-check of the BVPPG gate.
// For all 32 inputs: P = A, Q = B, S = D, R is C inverted when A and B are
// both 1, T is E inverted when A and D are both 1. Checks the mapping is
// one-to-one and the quantum cost constant is 10.
module tb_bvppg_gate;
  logic a, b, c, d, e, p, q, r, s, t;
  int checks = 0, failures = 0;
  bit seen [32];

  bvppg_gate dut (.a(a), .b(b), .c(c), .d(d), .e(e),
                  .p(p), .q(q), .r(r), .s(s), .t(t));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {a, b, c, d, e} = 5'(v);
      #1;
      checks++;
      if (p !== a || q !== b || s !== d ||
          r !== ((a && b) ? !c : c) || t !== ((a && d) ? !e : e)) begin
        failures++;
        $display("FAIL abcde=%b%b%b%b%b -> pqrst=%b%b%b%b%b", a, b, c, d, e, p, q, r, s, t);
      end
      checks++;
      if (seen[{p, q, r, s, t}]) failures++;
      seen[{p, q, r, s, t}] = 1'b1;
    end
    checks++;
    if (dut.QUANTUM_COST != 10) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
