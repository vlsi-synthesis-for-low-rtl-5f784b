// alu_pkg: operation codes and widths shared by the clock-gated 8-bit ALU.
//
// The 3-bit select code follows the ALU function table of the design:
// codes 000 and 001 are the arithmetic unit's (add, subtract), codes 010 to
// 111 are the logic unit's (NOT, NAND, NOR, AND, OR, XOR). The encoding is the
// table's; the helper function that splits the codes between the two units is
// this design's own.
package alu_pkg;

  // Default datapath width: the ALU is an 8-bit unit.
  parameter int unsigned ALU_WIDTH = 8;

  typedef enum logic [2:0] {
    OP_ADD  = 3'b000,  // A + B + cin
    OP_SUB  = 3'b001,  // A - B - cin
    OP_NOT  = 3'b010,  // ~A
    OP_NAND = 3'b011,  // ~(A & B)
    OP_NOR  = 3'b100,  // ~(A | B)
    OP_AND  = 3'b101,  // A & B
    OP_OR   = 3'b110,  // A | B
    OP_XOR  = 3'b111   // A ^ B
  } alu_op_e;

  // True for the codes served by the arithmetic unit.
  function automatic logic is_arith(input alu_op_e op);
    return (op == OP_ADD) || (op == OP_SUB);
  endfunction

endpackage
