// hng_gate: 4x4 reversible HNG gate.
//
// P = A, Q = B, R = A ^ B ^ C, S = ((A ^ B) & C) ^ (A & B) ^ D. With D = 0
// it is a full adder of A, B and carry-in C: R is the sum, S the carry out,
// and P, Q are the garbage outputs. Quantum cost 6. Purely combinational.
module hng_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  localparam int unsigned QUANTUM_COST = rev_pkg::QC_HNG;

  assign p = a;
  assign q = b;
  assign r = a ^ b ^ c;
  assign s = ((a ^ b) & c) ^ (a & b) ^ d;
endmodule
