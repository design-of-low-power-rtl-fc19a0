// peres_gate: 3x3 reversible Peres gate.
//
// P = A, Q = A ^ B, R = (A & B) ^ C. With C = 0 it is a half adder
// (Q = sum, R = carry) and an AND gate at once, which is how the multiplier
// uses it: for partial products and for the first stage of each adder.
// Quantum cost 4. Purely combinational, no clock.
module peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  localparam int unsigned QUANTUM_COST = rev_pkg::QC_PERES;

  assign p = a;
  assign q = a ^ b;
  assign r = (a & b) ^ c;
endmodule
