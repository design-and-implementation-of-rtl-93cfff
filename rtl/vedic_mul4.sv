// vedic_mul4: 4 x 4 bit unsigned Vedic (Urdhva Tiryakbhyam) multiplier.
//
// One level of the hierarchical multiplier: the operands are split into
// 2-bit halves, four vedic_mul2 instances form the cross and vertical partial
// products aL*bL, aH*bL, aL*bH and aH*bH, and vedic_combine adds them with
// three 4-bit carry select adders.
// Built from 2 x 2 cells, it is the bottom level of the tree.
// The split into four half-size products added by three carry select
// adders follows the source design's schematics; having one module per
// level is also its arrangement. Unsigned operands are this design's choice.
// Purely combinational: p = a * b, unsigned.
module vedic_mul4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);

  logic [3:0] q0, q1, q2, q3;

  vedic_mul2 u_ll (.a(a[1:0]), .b(b[1:0]), .p(q0));
  vedic_mul2 u_hl (.a(a[3:2]), .b(b[1:0]), .p(q1));
  vedic_mul2 u_lh (.a(a[1:0]), .b(b[3:2]), .p(q2));
  vedic_mul2 u_hh (.a(a[3:2]), .b(b[3:2]), .p(q3));

  vedic_combine #(.N(4)) u_comb (
    .q0(q0),
    .q1(q1),
    .q2(q2),
    .q3(q3),
    .p (p)
  );

endmodule
