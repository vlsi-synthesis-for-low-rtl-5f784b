// tb_alu8_activity: runs the clock-gated ALU on a fixed-operand sweep
// and measures how many clock pulses the gating removes.
//
// The operands are held at a = 10101000 and b = 00110111 while the select
// code steps through all eight operations every cycle and the request en is
// switched on and off in blocks of 24 cycles (this stepping and the block
// length are the testbench's choice). Every accepted operation's result is
// checked at the output register two edges later against a reference worked
// out here, and held outputs are checked during the off blocks. At the end
// the pulses of the four gated clocks are compared with what an ungated
// design would see (every flip-flop clocked on every edge), and the
// arithmetic and logic gates must have pulsed exactly once per operation of
// their unit.
`timescale 1ns/1ps
module tb_alu8_activity;

  import alu_pkg::*;

  localparam int unsigned W = ALU_WIDTH;
  localparam int N_CYCLES = 4800;
  localparam int BLOCK    = 24;

  logic         clk = 1'b0;
  logic         rst_n = 1'b1;
  logic         en = 1'b0;
  logic [W-1:0] a = 8'b1010_1000;
  logic [W-1:0] b = 8'b0011_0111;
  logic         cin = 1'b0;
  alu_op_e      sel = OP_ADD;
  logic [W-1:0] ya, yl, y;
  logic         cout, y_valid;

  alu8_cg_top dut (
    .clk(clk), .rst_n(rst_n), .en(en), .a(a), .b(b), .cin(cin), .sel(sel),
    .ya(ya), .yl(yl), .y(y), .cout(cout), .y_valid(y_valid)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int p_arith = 0, p_logic = 0, p_ctl = 0, p_out = 0, p_clk = 0;
  int n_arith = 0, n_logic = 0;

  always @(negedge dut.gclk_arith) if (rst_n) p_arith++;
  always @(negedge dut.gclk_logic) if (rst_n) p_logic++;
  always @(negedge dut.gclk_ctl)   if (rst_n) p_ctl++;
  always @(negedge dut.gclk_out)   if (rst_n) p_out++;
  always @(posedge clk)            if (rst_n) p_clk++;

  // results of the eight codes on the fixed operands, cin = 0
  function automatic logic [W-1:0] expect_y(input int code);
    case (code)
      0: return 8'b1101_1111;  // 168 + 55 = 223
      1: return 8'b0111_0001;  // 168 - 55 = 113
      2: return 8'b0101_0111;  // NOT a
      3: return 8'b1101_1111;  // NAND
      4: return 8'b0100_0000;  // NOR
      5: return 8'b0010_0000;  // AND
      6: return 8'b1011_1111;  // OR
      default: return 8'b1001_1111;  // XOR
    endcase
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic en_prev, en_prev2;
    int   code_prev, code_prev2;
    logic [W-1:0] y_hold;
    #1 rst_n = 1'b0;
    repeat (2) @(negedge clk);
    #1 rst_n = 1'b1;
    en_prev = 1'b0; en_prev2 = 1'b0; code_prev = 0; code_prev2 = 0;
    y_hold = '0;
    for (int i = 0; i < N_CYCLES; i++) begin
      en  = ((i / BLOCK) % 2) == 0;
      sel = alu_op_e'(i % 8);
      @(posedge clk);
      en_prev2 = en_prev; code_prev2 = code_prev;
      en_prev  = en;      code_prev  = i % 8;
      if (en) begin
        if (code_prev < 2) n_arith++;
        else               n_logic++;
      end
      @(negedge clk);
      if (en_prev2) begin
        y_hold = expect_y(code_prev2);
        check(y == y_hold && y_valid, "output register result");
        // no code carries or borrows on these operands with cin = 0
        check(cout == 1'b0, "carry flag");
      end else begin
        check(y == y_hold && !y_valid, "output held while idle");
      end
      #1;
    end
    check(p_arith == n_arith, "arithmetic gate pulses equal arithmetic ops");
    check(p_logic == n_logic, "logic gate pulses equal logic ops");
    check(p_arith + p_logic + p_ctl + p_out < 4 * p_clk, "gating removed clock pulses");
    $display("free clock edges %0d; pulses: arithmetic %0d, logic %0d, control %0d, output %0d",
             p_clk, p_arith, p_logic, p_ctl, p_out);
    // flip-flop clock events: 18 arithmetic input bits, 19 logic input bits,
    // 3 control bits, 9 output bits; an ungated design clocks all 49 each edge
    $display("flip-flop clock events: gated %0d of %0d ungated (%0d%%)",
             18 * p_arith + 19 * p_logic + 3 * p_ctl + 9 * p_out, 49 * p_clk,
             (100 * (18 * p_arith + 19 * p_logic + 3 * p_ctl + 9 * p_out)) / (49 * p_clk));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
