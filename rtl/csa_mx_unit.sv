// csa_mx_unit: the output multiplexer (Mx unit) of the carry select adder.
//
// The real carry-in is the select line: with cin = 0 the sum and carry out
// computed for carry-in 0 (s0, c0) pass, with cin = 1 those computed for
// carry-in 1 (s1, c1). Written as an AND-OR selector per bit, one gate
// level after the inverted select, so the carry-in reaches the output
// through a constant two levels of logic whatever the width.
// Selecting with the carry-in follows the source design; selecting the
// carry out in the same way is this design's completion of it.
// Purely combinational.
module csa_mx_unit #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] s0,
  input  logic         c0,
  input  logic [N-1:0] s1,
  input  logic         c1,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);

  always_comb begin
    sum  = (s1 & {N{cin}}) | (s0 & {N{~cin}});
    cout = (c1 & cin) | (c0 & ~cin);
  end

endmodule
