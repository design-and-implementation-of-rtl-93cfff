// csa_h_unit: the half-adder stage (H unit) of the carry select adder.
//
// One half adder per bit position: ci(i) = a(i) & b(i) is the carry the bit
// produces by itself, si(i) = a(i) ^ b(i) its sum without a carry-in (and
// the condition under which an incoming carry travels on). Both carry
// generation units of the adder share these signals, which is how the
// adder avoids building two complete ripple carry adders.
// This stage and its place in the adder follow the source design.
// Purely combinational; N is the operand width (32 in the ALU).
module csa_h_unit #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] ci,
  output logic [N-1:0] si
);

  always_comb begin
    ci = a & b;
    si = a ^ b;
  end

endmodule
