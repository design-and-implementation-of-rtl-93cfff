// vedic_mul2: 2 x 2 bit Urdhva Tiryakbhyam ("vertically and crosswise")
// multiplier, the leaf cell of the Vedic multiplier tree.
//
// For a = a1a0 and b = b1b0:
//   vertical    C0 S0 = a0 b0                (C0 is always 0)
//   crosswise   C1 S1 = C0 + a0 b1 + a1 b0
//   vertical    C2 S2 = C1 + a1 b1
// and the product is C2 S2 S1 S0. Each line is a half adder on one-bit
// partial products, so the cell is four AND gates and two half adders.
// The three steps are those of the source design.
// Purely combinational.
module vedic_mul2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);

  logic pp00, pp01, pp10, pp11;
  logic c1, c2, s1, s2;

  always_comb begin
    pp00 = a[0] & b[0];
    pp01 = a[0] & b[1];
    pp10 = a[1] & b[0];
    pp11 = a[1] & b[1];
    // crosswise step: half adder on the two cross products
    s1 = pp01 ^ pp10;
    c1 = pp01 & pp10;
    // last vertical step: half adder on a1 b1 and the crosswise carry
    s2 = pp11 ^ c1;
    c2 = pp11 & c1;
    p  = {c2, s2, s1, pp00};
  end

endmodule
