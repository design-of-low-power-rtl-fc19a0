// tb_ut4x4_full: the 4x4 multiplier exactly as configured by default (2x2
// design 1), taken through every one of its 256 multiplications; each
// product is compared with the integer product a*b.
module tb_ut4x4_full;
  logic [3:0]  a, b;
  logic [7:0]  q;
  logic [46:0] garbage;
  int checks = 0, failures = 0;

  ut4x4 dut (.a(a), .b(b), .q(q), .garbage(garbage));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 16; x++) begin
      for (int y = 0; y < 16; y++) begin
        a = 4'(x);
        b = 4'(y);
        #1;
        checks++;
        if (int'(q) != x * y) begin
          failures++;
          $display("FAIL %0d * %0d = %0d", x, y, q);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
