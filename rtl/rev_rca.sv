// rev_rca: reversible ripple-carry adder of two WIDTH-bit numbers.
//
// sum = a + b, WIDTH+1 bits, the carry out in the MSB. The carry into bit 0
// is always zero, so bit 0 is a half adder built from a Peres gate
// (A=a0, B=b0, C=0: Q = sum, R = carry); every higher bit is an HNG gate used
// as a full adder (A=ai, B=bi, C=carry in, D=0: R = sum, S = carry out).
// Starting with a Peres gate instead of an HNG saves quantum cost 2 and one
// garbage output against an all-HNG adder. The default width is that of the
// final adder of the published 4x4 multiplier; its first-stage adders use 4.
// Garbage: the Peres P output and the P, Q outputs of each HNG gate.
// Cost: quantum cost 4 + 6*(WIDTH-1). Purely combinational, no clock.
module rev_rca #(
  parameter int unsigned WIDTH = 5
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH:0]   sum,
  output logic [2*WIDTH-2:0] garbage
);
  import rev_pkg::*;

  localparam int unsigned QUANTUM_COST    = QC_PERES + (WIDTH - 1) * QC_HNG;
  localparam int unsigned GARBAGE_OUTPUTS = rca_garbage_w(WIDTH);
  localparam int unsigned GATE_COUNT      = WIDTH;

  logic [WIDTH:1] carry;   // carry[i] = carry into bit i; carry[WIDTH] = carry out

  peres_gate u_pg (
    .a(a[0]), .b(b[0]), .c(1'b0),
    .p(garbage[0]), .q(sum[0]), .r(carry[1])
  );

  for (genvar i = 1; i < WIDTH; i++) begin : g_fa
    hng_gate u_hng (
      .a(a[i]), .b(b[i]), .c(carry[i]), .d(1'b0),
      .p(garbage[2*i-1]), .q(garbage[2*i]), .r(sum[i]), .s(carry[i+1])
    );
  end

  assign sum[WIDTH] = carry[WIDTH];
endmodule
