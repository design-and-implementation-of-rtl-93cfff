// alu_pkg: operand width and opcodes of the 32-bit Vedic ALU.
//
// The ALU computes every result in parallel and a 4-bit opcode selects one
// of them onto the output. Only the remainder code (4'b0101) is fixed by the
// reference waveform of the design; the other code points are this design's
// own assignment, in the order the operations are usually listed
// (arithmetic first, then the seven bitwise functions). Codes not listed
// here (4'b0011 and 4'b1101..4'b1111) select zero.
package alu_pkg;

  // Operand width. Fixed at 32: the multiplier is the 32 x 32 level of the
  // Vedic tree, and the output is twice this wide.
  localparam int unsigned ALU_W = 32;

  typedef enum logic [3:0] {
    OP_ADD  = 4'b0000,
    OP_SUB  = 4'b0001,
    OP_MUL  = 4'b0010,
    OP_DIV  = 4'b0100,
    OP_MOD  = 4'b0101,
    OP_AND  = 4'b0110,
    OP_OR   = 4'b0111,
    OP_NOT  = 4'b1000,
    OP_NAND = 4'b1001,
    OP_NOR  = 4'b1010,
    OP_XNOR = 4'b1011,
    OP_XOR  = 4'b1100
  } alu_op_e;

endpackage
