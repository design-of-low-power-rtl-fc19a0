// tb_rev_rca: exhaustive self-check of the reversible ripple-carry adder at
// the widths the multiplier uses: 4 (first stage), 5 (default) and 6 (final
// adder). Every operand pair is applied and sum is compared with the integer
// a + b. The cost constants are checked: quantum cost 4 + 6*(WIDTH-1), i.e.
// 22 for 4 bits, two less than an adder made of HNG gates only, and
// 2*WIDTH-1 garbage outputs (7 for 4 bits, one less than all-HNG).
module tb_rev_rca;
  logic [3:0] a4, b4;
  logic [4:0] s4;
  logic [6:0] g4;
  logic [4:0] a5, b5;
  logic [5:0] s5;
  logic [8:0] g5;
  logic [5:0] a6, b6;
  logic [6:0] s6;
  logic [10:0] g6;
  int checks = 0, failures = 0;
  int carries_out = 0;

  rev_rca #(.WIDTH(4)) dut4 (.a(a4), .b(b4), .sum(s4), .garbage(g4));
  rev_rca              dut5 (.a(a5), .b(b5), .sum(s5), .garbage(g5));
  rev_rca #(.WIDTH(6)) dut6 (.a(a6), .b(b6), .sum(s6), .garbage(g6));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4096; v++) begin
      {a6, b6} = 12'(v);
      {a5, b5} = 10'(v);
      {a4, b4} = 8'(v);
      #1;
      checks++;
      if (int'(s6) != int'(a6) + int'(b6)) begin
        failures++;
        $display("FAIL w6 %0d + %0d = %0d", a6, b6, s6);
      end
      if (v < 1024) begin
        checks++;
        if (int'(s5) != int'(a5) + int'(b5)) begin
          failures++;
          $display("FAIL w5 %0d + %0d = %0d", a5, b5, s5);
        end
      end
      if (v < 256) begin
        checks++;
        if (int'(s4) != int'(a4) + int'(b4)) begin
          failures++;
          $display("FAIL w4 %0d + %0d = %0d", a4, b4, s4);
        end
        if (s4[4]) carries_out++;
      end
    end
    checks++;
    if (carries_out != 120) begin
      failures++;
      $display("FAIL carry out seen %0d times, expected 120", carries_out);
    end
    checks++;
    if (dut4.QUANTUM_COST != 22 || dut5.QUANTUM_COST != 28 || dut6.QUANTUM_COST != 34 ||
        dut4.GARBAGE_OUTPUTS != 7 || dut5.GARBAGE_OUTPUTS != 9 || dut4.GATE_COUNT != 4) begin
      failures++;
      $display("FAIL cost constants");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
