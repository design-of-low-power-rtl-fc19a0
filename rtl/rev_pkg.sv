// rev_pkg: shared constants and types of the reversible UT multiplier.
//
// Reversible circuits are judged by cost figures rather than by gate delay:
// quantum cost (the number of 1x1/2x2 primitive reversible operations a gate
// is built from), garbage outputs (outputs that carry no wanted result but
// must exist to keep the mapping one-to-one), constant inputs and gate count.
// The per-gate quantum costs below are the published values of each gate;
// every module of the design sums them into a QUANTUM_COST localparam so that
// the figure of merit can be read, and checked, from the RTL.
//
// ut2_design_e selects which of the two fan-out aware 2x2 multipliers the
// 4x4 multiplier is built from.
package rev_pkg;

  // Quantum cost of each reversible gate.
  localparam int unsigned QC_FEYNMAN = 1;
  localparam int unsigned QC_PERES   = 4;
  localparam int unsigned QC_NFT     = 5;
  localparam int unsigned QC_HNG     = 6;
  localparam int unsigned QC_BVPPG   = 10;

  // Choice of 2x2 building block for the 4x4 multiplier.
  typedef enum logic [0:0] {
    UT2_DESIGN1 = 1'b0,  // BVPPG + 3 Peres + Feynman, quantum cost 23
    UT2_DESIGN2 = 1'b1   // BVPPG + 2 Peres + NFT + Feynman, quantum cost 24
  } ut2_design_e;

  // Garbage outputs of one 2x2 multiplier (both designs bring out five lines).
  localparam int unsigned UT2_GARBAGE_W = 5;

  // Garbage outputs of a WIDTH-bit reversible ripple-carry adder:
  // one from the leading Peres gate, two from each HNG gate.
  function automatic int unsigned rca_garbage_w(int unsigned width);
    return 2 * width - 1;
  endfunction

endpackage
