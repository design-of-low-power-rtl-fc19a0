// bvppg_gate: 5x5 reversible BVPPG gate.
//
// P = A, Q = B, R = (A & B) ^ C, S = D, T = (A & D) ^ E. With C = E = 0 it
// forms two partial products sharing one operand bit (A&B and A&D) and also
// hands copies of B and D on for fan-out. Quantum cost 10. Combinational.
module bvppg_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  input  logic e,
  output logic p,
  output logic q,
  output logic r,
  output logic s,
  output logic t
);
  localparam int unsigned QUANTUM_COST = rev_pkg::QC_BVPPG;

  assign p = a;
  assign q = b;
  assign r = (a & b) ^ c;
  assign s = d;
  assign t = (a & d) ^ e;
endmodule
