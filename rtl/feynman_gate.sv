// feynman_gate: 2x2 reversible Feynman (controlled-NOT) gate.
//
// P = A, Q = A ^ B. With B tied to 0 it copies A (fan-out); with B = 1 it
// inverts A. It is the only 2x2 reversible gate and the cheapest one
// (quantum cost 1). Purely combinational, no clock.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  localparam int unsigned QUANTUM_COST = rev_pkg::QC_FEYNMAN;

  assign p = a;
  assign q = a ^ b;
endmodule
