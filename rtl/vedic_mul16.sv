// vedic_mul16: 16 x 16 bit unsigned Vedic (Urdhva Tiryakbhyam) multiplier.
//
// One level of the hierarchical multiplier: the operands are split into
// 8-bit halves, four vedic_mul8 instances form the cross and vertical partial
// products aL*bL, aH*bL, aL*bH and aH*bH, and vedic_combine adds them with
// three 16-bit carry select adders.
// Three levels above the 2 x 2 cell.
// The split into four half-size products added by three carry select
// adders follows the source design's schematics; having one module per
// level is also its arrangement. Unsigned operands are this design's choice.
// Purely combinational: p = a * b, unsigned.
module vedic_mul16 (
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [31:0] p
);

  logic [15:0] q0, q1, q2, q3;

  vedic_mul8 u_ll (.a(a[7:0]), .b(b[7:0]), .p(q0));
  vedic_mul8 u_hl (.a(a[15:8]), .b(b[7:0]), .p(q1));
  vedic_mul8 u_lh (.a(a[7:0]), .b(b[15:8]), .p(q2));
  vedic_mul8 u_hh (.a(a[15:8]), .b(b[15:8]), .p(q3));

  vedic_combine #(.N(16)) u_comb (
    .q0(q0),
    .q1(q1),
    .q2(q2),
    .q3(q3),
    .p (p)
  );

endmodule
