// vedic_mul32: 32 x 32 bit unsigned Vedic (Urdhva Tiryakbhyam) multiplier.
//
// One level of the hierarchical multiplier: the operands are split into
// 16-bit halves, four vedic_mul16 instances form the cross and vertical partial
// products aL*bL, aH*bL, aL*bH and aH*bH, and vedic_combine adds them with
// three 32-bit carry select adders.
// This is the ALU's multiplier: 256 2 x 2 cells in four levels below it.
// The split into four half-size products added by three carry select
// adders follows the source design's schematics; having one module per
// level is also its arrangement. Unsigned operands are this design's choice.
// Purely combinational: p = a * b, unsigned.
module vedic_mul32 (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [63:0] p
);

  logic [31:0] q0, q1, q2, q3;

  vedic_mul16 u_ll (.a(a[15:0]), .b(b[15:0]), .p(q0));
  vedic_mul16 u_hl (.a(a[31:16]), .b(b[15:0]), .p(q1));
  vedic_mul16 u_lh (.a(a[15:0]), .b(b[31:16]), .p(q2));
  vedic_mul16 u_hh (.a(a[31:16]), .b(b[31:16]), .p(q3));

  vedic_combine #(.N(32)) u_comb (
    .q0(q0),
    .q1(q1),
    .q2(q2),
    .q3(q3),
    .p (p)
  );

endmodule
