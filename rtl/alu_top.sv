// alu_top: 32-bit ALU whose multiplier is a Vedic (Urdhva Tiryakbhyam)
// multiplier built from carry select adders.
//
// All function units work in parallel on the operands a and b:
//   - addition: csa_adder (carry select adder), carry-in 0, carry out cout
//   - subtraction: sub_unit, two's complement added on a carry select adder
//   - multiplication: vedic_mul32, 32 x 32 -> 64 bits
//   - division and remainder: divider_fsm, clocked shift-subtract FSM
//   - logic: logic_unit, AND OR NOT NAND NOR XNOR XOR
// A 16-input multiplexer driven by the 4-bit opcode sel (codes in alu_pkg)
// puts one result on the 64-bit output o; 32-bit results are zero-extended
// and unused codes give 0. Every unit's result is also brought out on its
// own port (add, sub, multi, div, mod, cout).
// Timing: everything except division is combinational from a, b, sel to o.
// div and mod come from the FSM divider: they follow a change of a or b
// N + 1 rising clock edges later, and div_valid says when they match the
// present operands (div_busy while the divider works). rst_n is an
// asynchronous active-low reset of the divider.
// The opcode map apart from the remainder code, the zero extension and the
// busy/valid outputs are this design's own choices.
module alu_top
  import alu_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [ALU_W-1:0]     a,
  input  logic [ALU_W-1:0]     b,
  input  logic [3:0]           sel,
  output logic [2*ALU_W-1:0]   o,
  output logic [ALU_W-1:0]     add,
  output logic [ALU_W-1:0]     sub,
  output logic [2*ALU_W-1:0]   multi,
  output logic [ALU_W-1:0]     div,
  output logic [ALU_W-1:0]     mod,
  output logic                 cout,
  output logic                 div_busy,
  output logic                 div_valid
);

  localparam int unsigned N = ALU_W;

  logic         sub_borrow;
  logic [N-1:0] y_and, y_or, y_not, y_nand, y_nor, y_xnor, y_xor;

  csa_adder #(.N(N)) u_add (
    .a   (a),
    .b   (b),
    .cin (1'b0),
    .sum (add),
    .cout(cout)
  );

  sub_unit #(.N(N)) u_sub (
    .a     (a),
    .b     (b),
    .diff  (sub),
    .borrow(sub_borrow)
  );

  vedic_mul32 u_mul (
    .a(a),
    .b(b),
    .p(multi)
  );

  divider_fsm #(.N(N)) u_div (
    .clk      (clk),
    .rst_n    (rst_n),
    .dividend (a),
    .divisor  (b),
    .quotient (div),
    .remainder(mod),
    .busy     (div_busy),
    .valid    (div_valid)
  );

  logic_unit #(.N(N)) u_logic (
    .a     (a),
    .b     (b),
    .y_and (y_and),
    .y_or  (y_or),
    .y_not (y_not),
    .y_nand(y_nand),
    .y_nor (y_nor),
    .y_xnor(y_xnor),
    .y_xor (y_xor)
  );

  // Output multiplexer. The subtractor's borrow has no output of its own:
  // the opcode map gives it no code point.
  always_comb begin
    o = '0;
    case (alu_op_e'(sel))
      OP_ADD:  o = (2*N)'(add);
      OP_SUB:  o = (2*N)'(sub);
      OP_MUL:  o = multi;
      OP_DIV:  o = (2*N)'(div);
      OP_MOD:  o = (2*N)'(mod);
      OP_AND:  o = (2*N)'(y_and);
      OP_OR:   o = (2*N)'(y_or);
      OP_NOT:  o = (2*N)'(y_not);
      OP_NAND: o = (2*N)'(y_nand);
      OP_NOR:  o = (2*N)'(y_nor);
      OP_XNOR: o = (2*N)'(y_xnor);
      OP_XOR:  o = (2*N)'(y_xor);
      default: o = '0;
    endcase
  end

endmodule
