// sub_unit: N-bit subtraction unit of the ALU.
//
// Subtraction reuses the addition unit: the subtrahend is turned into its
// two's complement (bitwise inverse, plus one through the adder's carry-in)
// and added to the minuend on a csa_adder, so diff = (a - b) mod 2^N.
// The adder's carry out is 1 exactly when no borrow occurs (a >= b,
// unsigned); the borrow output is its inverse, an addition of this design.
// Purely combinational.
module sub_unit #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] diff,
  output logic         borrow
);

  logic [N-1:0] b_inv;
  logic         carry;

  always_comb b_inv = ~b;

  csa_adder #(.N(N)) u_add (
    .a   (a),
    .b   (b_inv),
    .cin (1'b1),
    .sum (diff),
    .cout(carry)
  );

  always_comb borrow = ~carry;

endmodule
