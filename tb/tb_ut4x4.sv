// tb_ut4x4: end-to-end self-check of the reversible 4x4 UT multiplier, built
// once from each 2x2 design (DESIGN = UT2_DESIGN1 and UT2_DESIGN2).
// All 256 operand pairs are applied to both and q is compared with the
// integer product. It also checks that product bits 1:0 come straight from
// the lowest 2x2 multiplier, that {q, garbage} never repeats (the circuit is
// reversible), and it counts the mechanisms of the datapath: each 2x2 design
// in use, and carries rippling through each of the three adders (into the
// top stage of the final adder included). A mechanism never seen is a failure.
module tb_ut4x4;
  import rev_pkg::*;

  logic [3:0]  a, b;
  logic [7:0]  q1, q2;
  logic [46:0] g1, g2;
  int checks = 0, failures = 0;
  int n_design1 = 0, n_design2 = 0;
  int n_carry_b = 0, n_carry_a = 0, n_carry_f = 0, n_carry_f_top = 0;
  logic [54:0] outs [256];

  ut4x4                        dut1 (.a(a), .b(b), .q(q1), .garbage(g1));
  ut4x4 #(.DESIGN(UT2_DESIGN2)) dut2 (.a(a), .b(b), .q(q2), .garbage(g2));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      {a, b} = 8'(v);
      #1;
      checks++;
      if (int'(q1) != int'(a) * int'(b)) begin
        failures++;
        $display("FAIL design1 %0d * %0d = %0d", a, b, q1);
      end else n_design1++;
      checks++;
      if (int'(q2) != int'(a) * int'(b)) begin
        failures++;
        $display("FAIL design2 %0d * %0d = %0d", a, b, q2);
      end else n_design2++;
      checks++;
      if (q1[1:0] != 2'(int'(a[1:0]) * int'(b[1:0]))) failures++;
      if (|dut1.u_rca_b.carry) n_carry_b++;
      if (|dut1.u_rca_a.carry) n_carry_a++;
      if (|dut1.u_rca_f.carry) n_carry_f++;
      if (dut1.u_rca_f.carry[5]) n_carry_f_top++;
      outs[v] = {q1, g1};
      checks++;
      for (int w = 0; w < v; w++) begin
        if (outs[w] == outs[v]) begin
          failures++;
          $display("FAIL inputs %0d and %0d give the same outputs", w, v);
        end
      end
    end
    $display("design1 ok=%0d design2 ok=%0d carries: adder B=%0d adder A=%0d final=%0d final top stage=%0d",
             n_design1, n_design2, n_carry_b, n_carry_a, n_carry_f, n_carry_f_top);
    checks++;
    if (n_design1 == 0 || n_design2 == 0 || n_carry_b == 0 || n_carry_a == 0 ||
        n_carry_f == 0 || n_carry_f_top == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    checks++;
    if (dut1.QUANTUM_COST != 170 || dut2.QUANTUM_COST != 174) begin
      failures++;
      $display("FAIL quantum cost %0d %0d", dut1.QUANTUM_COST, dut2.QUANTUM_COST);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
