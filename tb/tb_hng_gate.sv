// tb_hng_gate: exhaustive self-check of the HNG gate.
// For all 16 inputs: P = A, Q = B, R is the parity of A, B, C, and S xor D is
// the carry of A + B + C, i.e. {S ^ D, R} equals the arithmetic sum A + B + C.
// Checks the mapping is one-to-one and the quantum cost constant is 6.
module tb_hng_gate;
  logic a, b, c, d, p, q, r, s;
  int checks = 0, failures = 0;
  bit seen [16];

  hng_gate dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {a, b, c, d} = 4'(v);
      #1;
      checks++;
      if (p !== a || q !== b || 2'({s ^ d, r}) != 2'(a) + 2'(b) + 2'(c)) begin
        failures++;
        $display("FAIL abcd=%b%b%b%b -> pqrs=%b%b%b%b", a, b, c, d, p, q, r, s);
      end
      checks++;
      if (seen[{p, q, r, s}]) failures++;
      seen[{p, q, r, s}] = 1'b1;
    end
    checks++;
    if (dut.QUANTUM_COST != 6) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
