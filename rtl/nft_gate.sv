// nft_gate: 3x3 reversible New Fault Tolerant (NFT) gate.
//
// P = A ^ B, Q = ~B&C ^ A&~C, R = B&C ^ A&~C. With A = 0 it passes B
// through on P and splits C by B: Q = ~B & C, R = B & C. The second 2x2
// multiplier uses exactly that to form the two upper product bits.
// Quantum cost 5. Purely combinational, no clock.
module nft_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  localparam int unsigned QUANTUM_COST = rev_pkg::QC_NFT;

  assign p = a ^ b;
  assign q = (~b & c) ^ (a & ~c);
  assign r = (b & c) ^ (a & ~c);
endmodule
