// arith_unit: the ALU's arithmetic unit, a WIDTH-bit adder/subtractor with a
// carry input.
//
// It serves the two arithmetic codes of the ALU function table: addition
// (A + B + cin) and subtraction (A - B - cin, with cin acting as a borrow
// input). Increment and decrement, the other two arithmetic operations of the
// unit, are the same two codes with B = 0 and cin = 1. Both operations share a
// single adder: subtraction adds the one's complement of B and of cin, which
// equals A - B - cin, and the adder's carry out is inverted to give the
// borrow out.
//
// Interface: a, b (operands), cin (carry in / borrow in), sub (0 add,
// 1 subtract), y (result), cout (carry out for add, borrow out for subtract).
// Timing: purely combinational; the operands come from gated input registers.
//
// The operation set follows the document; the single shared adder, the use of
// cin as a borrow for subtraction and how increment and decrement are reached
// are this design's choices.
module arith_unit #(
  parameter int unsigned WIDTH = alu_pkg::ALU_WIDTH
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  input  logic             sub,
  output logic [WIDTH-1:0] y,
  output logic             cout
);

  logic [WIDTH-1:0] b_eff;
  logic             c_eff;
  logic             carry;

  always_comb begin
    b_eff = sub ? ~b : b;
    c_eff = sub ? ~cin : cin;
    {carry, y} = {1'b0, a} + {1'b0, b_eff} + {{WIDTH{1'b0}}, c_eff};
    cout = sub ? ~carry : carry;
  end

endmodule
