// ut2x2_design2: reversible 2x2 Urdhva Tiryakbhayam multiplier, design 2.
//
// Computes q = a * b for 2-bit a and b with five reversible gates and
// internal fan-out, like design 1, but forms the two upper product bits with
// one NFT gate instead of a Peres and a Feynman gate:
//   BVPPG (a0, b0, 0, b1, 0): a0&b0, a0&b1, copies of a0 (I1), b0 (I2), b1 (I3)
//   Peres (a1, I2, 0)       : a1&b0, and a copy of a1 (I4)
//   Peres (I4, I3, 0)       : a1&b1
//   Feynman (a0&b1, a1&b0)  : q1 = a0b1 ^ a1b0
//   NFT (0, a0&b0, a1&b1)   : q0 = a0b0, q2 = ~a0b0 & a1b1, q3 = a0b0 & a1b1
// The NFT identities hold because a1b1 = 1 makes the weight-2 carry
// (a0b1 & a1b0) equal to a0b0. The gate choice and the wiring follow the
// published design. Five lines leave as garbage: the four outputs the design
// marks as garbage and the unused copy of a0 (I1).
// Cost: quantum cost 24, 5 gates, 5 constant inputs. Combinational, no clock.
module ut2x2_design2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] q,
  output logic [rev_pkg::UT2_GARBAGE_W-1:0] garbage
);
  import rev_pkg::*;

  localparam int unsigned QUANTUM_COST    = QC_BVPPG + 2 * QC_PERES + QC_NFT + QC_FEYNMAN;
  localparam int unsigned GARBAGE_OUTPUTS = 4;   // marked garbage, I1 not counted
  localparam int unsigned GATE_COUNT      = 5;
  localparam int unsigned CONSTANT_INPUTS = 5;

  logic i2, i3, i4;                // fan-out copies: b0, b1, a1
  logic a0b0, a0b1, a1b0, a1b1;    // partial products

  bvppg_gate u_bvppg (
    .a(a[0]), .b(b[0]), .c(1'b0), .d(b[1]), .e(1'b0),
    .p(garbage[0]), .q(i2), .r(a0b0), .s(i3), .t(a0b1)
  );

  peres_gate u_pg_a1b0 (
    .a(a[1]), .b(i2), .c(1'b0),
    .p(i4), .q(garbage[1]), .r(a1b0)
  );

  peres_gate u_pg_a1b1 (
    .a(i4), .b(i3), .c(1'b0),
    .p(garbage[2]), .q(garbage[3]), .r(a1b1)
  );

  feynman_gate u_fg (
    .a(a0b1), .b(a1b0),
    .p(garbage[4]), .q(q[1])
  );

  nft_gate u_nft (
    .a(1'b0), .b(a0b0), .c(a1b1),
    .p(q[0]), .q(q[2]), .r(q[3])
  );
endmodule
