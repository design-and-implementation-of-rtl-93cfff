// csa_adder: N-bit carry select adder, the addition unit of the ALU.
//
// Structure: an H unit (one half adder per bit) feeds two carry and sum
// generation units, CG0 computing a + b with carry-in 0 and CG1 computing
// a + b with carry-in 1, both from the same half-adder outputs; the Mx unit
// then picks one of the two results with the actual carry-in. Sharing the
// half adders between CG0 and CG1 is what saves area against two complete
// ripple carry adders; selecting instead of rippling the carry-in removes
// it from the long path.
// Interface: sum = (a + b + cin) mod 2^N, cout = carry out of bit N-1.
// Purely combinational. The whole width is one select stage, as in the
// block diagram the design follows; N is 32 in the ALU, and the adder is
// also used at other widths inside the multiplier and the divider.
module csa_adder #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);

  logic [N-1:0] ci, si;
  logic [N-1:0] s0, s1;
  logic         c0, c1;

  csa_h_unit #(.N(N)) u_h (
    .a (a),
    .b (b),
    .ci(ci),
    .si(si)
  );

  csa_cg_unit #(.N(N), .CIN(1'b0)) u_cg0 (
    .ci  (ci),
    .si  (si),
    .s   (s0),
    .cout(c0)
  );

  csa_cg_unit #(.N(N), .CIN(1'b1)) u_cg1 (
    .ci  (ci),
    .si  (si),
    .s   (s1),
    .cout(c1)
  );

  csa_mx_unit #(.N(N)) u_mx (
    .s0  (s0),
    .c0  (c0),
    .s1  (s1),
    .c1  (c1),
    .cin (cin),
    .sum (sum),
    .cout(cout)
  );

endmodule
