// tb_nft_gate: exhaustive self-check of the NFT gate.
// For all 8 inputs the expected outputs are worked out case by case from the
// gate's definition: when C = 1, Q = not B and R = B; when C = 0, Q = R = A;
// P is 1 when A and B differ. With A = 0 it also checks the use made of it in
// the 2x2 multiplier: P = B, Q = (not B) and C, R = B and C. Checks the
// mapping is one-to-one and the quantum cost constant is 5.
module tb_nft_gate;
  logic a, b, c, p, q, r;
  logic ep, eq, er;
  int checks = 0, failures = 0;
  bit seen [8];

  nft_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

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
      ep = (a != b);
      if (c) begin eq = !b; er = b; end
      else   begin eq = a;  er = a; end
      checks++;
      if ({p, q, r} !== {ep, eq, er}) begin
        failures++;
        $display("FAIL abc=%b%b%b -> pqr=%b%b%b expected %b%b%b", a, b, c, p, q, r, ep, eq, er);
      end
      if (!a) begin
        checks++;
        if (p !== b || q !== (!b && c) || r !== (b && c)) failures++;
      end
      checks++;
      if (seen[{p, q, r}]) failures++;
      seen[{p, q, r}] = 1'b1;
    end
    checks++;
    if (dut.QUANTUM_COST != 5) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
