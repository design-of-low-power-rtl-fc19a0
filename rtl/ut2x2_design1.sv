// ut2x2_design1: reversible 2x2 Urdhva Tiryakbhayam multiplier, design 1.
//
// Computes q = a * b for 2-bit a and b with five reversible gates, making the
// fan-out copies of the inputs inside the circuit instead of wiring one signal
// to several gate inputs (a reversible circuit must not fan out):
//   BVPPG (a0, b0, 0, b1, 0): q0 = a0&b0, a0&b1, and copies of b0 (I1), b1 (I2)
//   Peres (a1, I1, 0)       : a1&b0, and a copy of a1 (I3)
//   Peres (I3, I2, 0)       : a1&b1
//   Peres (a0&b1, a1&b0, 0) : q1 = a0b1 ^ a1b0, and the column carry a0b1&a1b0
//   Feynman (carry, a1&b1)  : q3 = carry, q2 = carry ^ a1&b1
// q3 equals the column carry because that carry is 1 only when all four input
// bits are 1, which also makes a1&b1 = 1. The gate choice and the wiring follow
// the published design; the garbage lines are collected on one output.
// Cost: quantum cost 23, 5 garbage outputs, 5 gates, 5 constant inputs.
// Purely combinational, no clock.
module ut2x2_design1 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] q,
  output logic [rev_pkg::UT2_GARBAGE_W-1:0] garbage
);
  import rev_pkg::*;

  localparam int unsigned QUANTUM_COST    = QC_BVPPG + 3 * QC_PERES + QC_FEYNMAN;
  localparam int unsigned GARBAGE_OUTPUTS = 5;
  localparam int unsigned GATE_COUNT      = 5;
  localparam int unsigned CONSTANT_INPUTS = 5;

  logic i1, i2, i3;          // fan-out copies: b0, b1, a1
  logic a0b1, a1b0, a1b1;    // partial products
  logic carry;               // carry out of the weight-2 column

  bvppg_gate u_bvppg (
    .a(a[0]), .b(b[0]), .c(1'b0), .d(b[1]), .e(1'b0),
    .p(garbage[0]), .q(i1), .r(q[0]), .s(i2), .t(a0b1)
  );

  peres_gate u_pg_a1b0 (
    .a(a[1]), .b(i1), .c(1'b0),
    .p(i3), .q(garbage[1]), .r(a1b0)
  );

  peres_gate u_pg_a1b1 (
    .a(i3), .b(i2), .c(1'b0),
    .p(garbage[2]), .q(garbage[3]), .r(a1b1)
  );

  peres_gate u_pg_col1 (
    .a(a0b1), .b(a1b0), .c(1'b0),
    .p(garbage[4]), .q(q[1]), .r(carry)
  );

  feynman_gate u_fg (
    .a(carry), .b(a1b1),
    .p(q[3]), .q(q[2])
  );
endmodule
