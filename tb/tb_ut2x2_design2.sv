// tb_ut2x2_design2: exhaustive self-check of the reversible 2x2 UT multiplier.
// Applies all 16 operand pairs and compares q with the integer product a*b.
// Since the circuit is reversible, inputs plus constants map one-to-one onto
// product plus garbage: the testbench also checks that no two operand pairs
// give the same {q, garbage}. The cost constants are checked against the
// published figures: quantum cost 24, 4 garbage outputs, 5 gates,
// 5 constant inputs.
module tb_ut2x2_design2;
  logic [1:0] a, b;
  logic [3:0] q;
  logic [4:0] garbage;
  int checks = 0, failures = 0;
  logic [8:0] outs [16];

  ut2x2_design2 dut (.a(a), .b(b), .q(q), .garbage(garbage));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {a, b} = 4'(v);
      #1;
      checks++;
      if (int'(q) != int'(a) * int'(b)) begin
        failures++;
        $display("FAIL %0d * %0d = %0d, expected %0d", a, b, q, int'(a) * int'(b));
      end
      outs[v] = {q, garbage};
      for (int w = 0; w < v; w++) begin
        if (outs[w] == outs[v]) begin
          failures++;
          $display("FAIL inputs %0d and %0d give the same outputs", w, v);
        end
      end
      checks++;
    end
    checks++;
    if (dut.QUANTUM_COST != 24 || dut.GARBAGE_OUTPUTS != 4 ||
        dut.GATE_COUNT != 5 || dut.CONSTANT_INPUTS != 5) begin
      failures++;
      $display("FAIL cost constants");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
