// logic_unit: the bitwise logic block of the ALU.
//
// Computes the seven logic functions of the ALU side by side on the two
// operands: AND, OR, NOT, NAND, NOR, XNOR and XOR. The source lists an
// "XAND" gate; it is implemented as XNOR, the complement of XOR. NOT acts on
// operand a (which operand it takes is this design's choice). All outputs
// are valid at once and the ALU's output multiplexer picks one.
// Purely combinational.
module logic_unit #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] y_and,
  output logic [N-1:0] y_or,
  output logic [N-1:0] y_not,
  output logic [N-1:0] y_nand,
  output logic [N-1:0] y_nor,
  output logic [N-1:0] y_xnor,
  output logic [N-1:0] y_xor
);

  always_comb begin
    y_and  = a & b;
    y_or   = a | b;
    y_not  = ~a;
    y_nand = ~(a & b);
    y_nor  = ~(a | b);
    y_xnor = ~(a ^ b);
    y_xor  = a ^ b;
  end

endmodule
