// ut4x4: reversible 4x4 Urdhva Tiryakbhayam (vertically-and-crosswise)
// multiplier, the top of the design.
//
// q = a * b for 4-bit a and b, built only from reversible gates. The operands
// are split into 2-bit halves and four reversible 2x2 UT multipliers form the
// four cross products at once:
//   q0 = a[1:0]*b[1:0] (weight 1)    q1 = a[3:2]*b[1:0] (weight 4)
//   q2 = a[1:0]*b[3:2] (weight 4)    q3 = a[3:2]*b[3:2] (weight 16)
// q0[1:0] is final as product bits 1:0. The rest is summed by three
// reversible ripple-carry adders (Peres half adder, then HNG full adders):
//   4-bit adder B: qb = {00, q0[3:2]} + q1                 (weight 4)
//   4-bit adder A: qa = q3 + {00, q2[3:2]}                 (weight 16)
//   final adder  : q[7:2] = {qa[3:0], q2[1:0]} + {0, qb}   (weight 4)
// The four multipliers, the two 4-bit first-stage adders feeding one final
// adder and the {00, q0[3:2]} + q1 adder follow the published block diagram.
// Two choices are this design's own, both needed for a correct product:
// adder A aligns q3 above q2 by two bit positions (q2 and q3 differ in weight
// by 4), and the final adder is therefore 6 bits wide rather than 5.
// qa[4] and the final carry out are always 0 (12 and 63 are the largest
// values reached) and leave with the garbage.
//
// DESIGN picks the 2x2 building block (rev_pkg::ut2_design_e).
// garbage collects every garbage output of the circuit: 4 x 5 from the 2x2
// multipliers, 7 + 7 from the 4-bit adders, 11 from the final adder, then
// qa[4] and the final carry out (47 lines). Purely combinational, no clock.
module ut4x4 #(
  parameter rev_pkg::ut2_design_e DESIGN = rev_pkg::UT2_DESIGN1
) (
  input  logic [3:0]  a,
  input  logic [3:0]  b,
  output logic [7:0]  q,
  output logic [46:0] garbage
);
  import rev_pkg::*;

  localparam int unsigned UT2_QC       = (DESIGN == UT2_DESIGN1) ? 23 : 24;
  localparam int unsigned QUANTUM_COST = 4 * UT2_QC
                                       + 2 * (QC_PERES + 3 * QC_HNG)
                                       + (QC_PERES + 5 * QC_HNG);

  logic [3:0] pp [4];                         // 2x2 products q0..q3
  logic [4:0] qa, qb;                         // first-stage adder sums
  logic [6:0] fsum;                           // final adder sum
  logic [UT2_GARBAGE_W-1:0] ut_g [4];

  // Operand halves of each 2x2 multiplier, in the order q0..q3.
  logic [1:0] ua [4];
  logic [1:0] ub [4];
  assign ua[0] = a[1:0]; assign ub[0] = b[1:0];
  assign ua[1] = a[3:2]; assign ub[1] = b[1:0];
  assign ua[2] = a[1:0]; assign ub[2] = b[3:2];
  assign ua[3] = a[3:2]; assign ub[3] = b[3:2];

  for (genvar k = 0; k < 4; k++) begin : g_ut2
    if (DESIGN == UT2_DESIGN1) begin : g_d1
      ut2x2_design1 u_ut (.a(ua[k]), .b(ub[k]), .q(pp[k]), .garbage(ut_g[k]));
    end else begin : g_d2
      ut2x2_design2 u_ut (.a(ua[k]), .b(ub[k]), .q(pp[k]), .garbage(ut_g[k]));
    end
  end

  rev_rca #(.WIDTH(4)) u_rca_b (
    .a({2'b00, pp[0][3:2]}), .b(pp[1]),
    .sum(qb), .garbage(garbage[26:20])
  );

  rev_rca #(.WIDTH(4)) u_rca_a (
    .a(pp[3]), .b({2'b00, pp[2][3:2]}),
    .sum(qa), .garbage(garbage[33:27])
  );

  rev_rca #(.WIDTH(6)) u_rca_f (
    .a({qa[3:0], pp[2][1:0]}), .b({1'b0, qb}),
    .sum(fsum), .garbage(garbage[44:34])
  );

  assign garbage[4:0]   = ut_g[0];
  assign garbage[9:5]   = ut_g[1];
  assign garbage[14:10] = ut_g[2];
  assign garbage[19:15] = ut_g[3];
  assign garbage[45]    = qa[4];
  assign garbage[46]    = fsum[6];

  assign q = {fsum[5:0], pp[0][1:0]};
endmodule
