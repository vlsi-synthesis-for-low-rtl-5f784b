// logic_unit: the ALU's logic unit, WIDTH-bit bitwise operations.
//
// It serves the six logic codes of the ALU function table: NOT A, A NAND B,
// A NOR B, A AND B, A OR B and A XOR B, selected by the 3-bit operation code
// from alu_pkg. The two arithmetic codes never reach this unit in the ALU
// (its registers are not clocked for them); for those codes it outputs zero.
//
// Interface: a, b (operands), op (operation code), y (result).
// Timing: purely combinational; the operands come from gated input registers.
//
// The operation set and codes follow the document's ALU function table; the
// zero output for arithmetic codes is this design's choice.
module logic_unit #(
  parameter int unsigned WIDTH = alu_pkg::ALU_WIDTH
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  alu_pkg::alu_op_e op,
  output logic [WIDTH-1:0] y
);

  import alu_pkg::*;

  always_comb begin
    unique case (op)
      OP_NOT:  y = ~a;
      OP_NAND: y = ~(a & b);
      OP_NOR:  y = ~(a | b);
      OP_AND:  y = a & b;
      OP_OR:   y = a | b;
      OP_XOR:  y = a ^ b;
      default: y = '0;
    endcase
  end

endmodule
