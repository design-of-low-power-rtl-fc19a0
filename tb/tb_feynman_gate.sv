// tb_feynman_gate: exhaustive self-check of the Feynman gate.
// Applies all 4 input patterns, checks P = A and that Q is 1 exactly when A
// and B differ, and checks that no two inputs map to the same output pair
// (the gate is reversible). Also checks the quantum cost constant (1).
module tb_feynman_gate;
  logic a, b, p, q;
  int checks = 0, failures = 0;
  bit seen [4];

  feynman_gate dut (.a(a), .b(b), .p(p), .q(q));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if (p !== a || q !== (a != b)) begin
        failures++;
        $display("FAIL a=%b b=%b -> p=%b q=%b", a, b, p, q);
      end
      checks++;
      if (seen[{p, q}]) begin
        failures++;
        $display("FAIL output %b%b repeated", p, q);
      end
      seen[{p, q}] = 1'b1;
    end
    checks++;
    if (dut.QUANTUM_COST != 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
