// tb_peres_gate: exhaustive self-check of the Peres gate.
// For all 8 inputs: P = A, Q = A xor B, and R is C inverted exactly when A
// and B are both 1. With C = 0 the pair {R, Q} must equal the arithmetic sum
// A + B (half adder). Checks that the mapping is one-to-one and that the
// quantum cost constant is 4.
module tb_peres_gate;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;
  bit seen [8];

  peres_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if (p !== a || q !== (a != b) || r !== ((a && b) ? !c : c)) begin
        failures++;
        $display("FAIL abc=%b%b%b -> pqr=%b%b%b", a, b, c, p, q, r);
      end
      if (!c) begin
        checks++;
        if (2'({r, q}) != 2'(a) + 2'(b)) begin
          failures++;
          $display("FAIL half adder a=%b b=%b -> carry=%b sum=%b", a, b, r, q);
        end
      end
      checks++;
      if (seen[{p, q, r}]) failures++;
      seen[{p, q, r}] = 1'b1;
    end
    checks++;
    if (dut.QUANTUM_COST != 4) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
