// tb_logic_unit: self-checking test of the bitwise logic unit.
//
// Applies random operands with every operation code and compares the result
// with the operation worked out in the testbench; the two arithmetic codes
// must give zero. Includes the operands a = 10101000, b = 00110111, for which
// NOT a = 01010111.
`timescale 1ns/1ps
module tb_logic_unit;

  import alu_pkg::*;

  localparam int unsigned W = 8;

  logic [W-1:0] a, b, y;
  alu_op_e      op;

  int checks   = 0;
  int failures = 0;

  logic_unit #(.WIDTH(W)) dut (.a(a), .b(b), .op(op), .y(y));

  function automatic logic [W-1:0] ref_y(input logic [2:0] code,
                                         input logic [W-1:0] x, input logic [W-1:0] z);
    logic [W-1:0] r;
    case (code)
      3'b010: r = ~x;
      3'b011: r = ~(x & z);
      3'b100: r = ~(x | z);
      3'b101: r = x & z;
      3'b110: r = x | z;
      3'b111: r = x ^ z;
      default: r = '0;
    endcase
    return r;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      a  = W'($urandom);
      b  = W'($urandom);
      op = alu_op_e'(i % 8);
      #1;
      checks++;
      if (y !== ref_y(3'(i % 8), a, b)) begin
        failures++;
        $display("FAIL op=%03b a=%b b=%b y=%b expected %b", 3'(i % 8), a, b, y,
                 ref_y(3'(i % 8), a, b));
      end
    end
    a = 8'b1010_1000; b = 8'b0011_0111; op = OP_NOT; #1;
    checks++;
    if (y !== 8'b0101_0111) begin failures++; $display("FAIL NOT example %b", y); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
