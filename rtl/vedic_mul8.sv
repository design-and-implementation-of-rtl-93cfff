// vedic_mul8: 8 x 8 bit unsigned Vedic (Urdhva Tiryakbhyam) multiplier.
//
// One level of the hierarchical multiplier: the operands are split into
// 4-bit halves, four vedic_mul4 instances form the cross and vertical partial
// products aL*bL, aH*bL, aL*bH and aH*bH, and vedic_combine adds them with
// three 8-bit carry select adders.
// Two levels above the 2 x 2 cell.
// The split into four half-size products added by three carry select
// adders follows the source design's schematics; having one module per
// level is also its arrangement. Unsigned operands are this design's choice.
// Purely combinational: p = a * b, unsigned.
module vedic_mul8 (
  input  logic [7:0] a,
  input  logic [7:0] b,
  output logic [15:0] p
);

  logic [7:0] q0, q1, q2, q3;

  vedic_mul4 u_ll (.a(a[3:0]), .b(b[3:0]), .p(q0));
  vedic_mul4 u_hl (.a(a[7:4]), .b(b[3:0]), .p(q1));
  vedic_mul4 u_lh (.a(a[3:0]), .b(b[7:4]), .p(q2));
  vedic_mul4 u_hh (.a(a[7:4]), .b(b[7:4]), .p(q3));

  vedic_combine #(.N(8)) u_comb (
    .q0(q0),
    .q1(q1),
    .q2(q2),
    .q3(q3),
    .p (p)
  );

endmodule
