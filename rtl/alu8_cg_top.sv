// alu8_cg_top: 8-bit ALU whose registers are clocked through gated clocks, so
// that only the unit that has work to do sees clock edges.
//
// Structure. The arithmetic unit and the logic unit each have their own input
// registers (operands A and B, plus carry-in and the add/subtract bit, or the
// logic operation code). Each set of input registers is clocked by its own
// tri-state/NAND clock gate (cg_tristate). An operation code of the
// arithmetic unit (000 add, 001 subtract) enables only the arithmetic gate;
// any other code enables only the logic gate; with en low neither unit is
// clocked. The result of the unit that was loaded goes through the output
// multiplexer into the output register (alu_out_stage), which has a gate of
// its own that opens for one cycle after each accepted operation. A small
// control register, on a fourth gate, remembers which unit was loaded and
// whether an operation is in flight. When the ALU is idle all four gated
// clocks sit at constant 1.
//
// Interface.
//   clk, rst_n   free-running clock; asynchronous active-low reset
//   en           request: perform the operation on a, b, cin, sel this cycle
//   a, b         WIDTH-bit operands
//   cin          carry in (add) / borrow in (subtract)
//   sel          3-bit operation code (alu_pkg::alu_op_e)
//   ya, yl       arithmetic and logic unit results, from their registered
//                operands
//   y, cout      output register: result and carry/borrow of the last
//                operation (cout is 0 for logic operations)
//   y_valid      high for one cycle after y was loaded
//
// Timing. Inputs are sampled at a rising edge of clk (edge n) when en is
// high. ya or yl settle after edge n; y, cout and y_valid change after edge
// n + 1. One operation can be accepted every cycle. Inputs are best changed
// while clk is low, after its falling edge, since the gates sample en at the
// rising edge; the testbenches do so.
//
// Following the document: an 8-bit ALU made of an arithmetic unit, a logic
// unit, output multiplexers, input registers and an output register, with
// the registers on gated clocks from the tri-state/NAND gate so that only the
// target unit is clocked, and the operation codes of its function table. This
// design's own choices: one gate per register group, the control register,
// the reset, y_valid and the two-edge latency.
module alu8_cg_top #(
  parameter int unsigned WIDTH = alu_pkg::ALU_WIDTH
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  input  alu_pkg::alu_op_e sel,
  output logic [WIDTH-1:0] ya,
  output logic [WIDTH-1:0] yl,
  output logic [WIDTH-1:0] y,
  output logic             cout,
  output logic             y_valid
);

  import alu_pkg::*;

  // ---------------------------------------------------------------- gates
  logic en_arith, en_logic, en_ctl;
  logic gclk_arith, gclk_logic, gclk_ctl, gclk_out;
  logic pending_q;   // an operation was accepted at the last edge
  logic use_logic_q; // that operation was a logic one

  always_comb begin
    en_arith = en && is_arith(sel);
    en_logic = en && !is_arith(sel);
    en_ctl   = en || pending_q || y_valid;
  end

  cg_tristate u_cg_arith (.clk(clk), .en(en_arith),  .gclk(gclk_arith));
  cg_tristate u_cg_logic (.clk(clk), .en(en_logic),  .gclk(gclk_logic));
  cg_tristate u_cg_ctl   (.clk(clk), .en(en_ctl),    .gclk(gclk_ctl));
  cg_tristate u_cg_out   (.clk(clk), .en(pending_q), .gclk(gclk_out));

  // ------------------------------------------- arithmetic unit input registers
  logic [WIDTH-1:0] a_ar, b_ar;
  logic             cin_ar, sub_ar;

  always_ff @(negedge gclk_arith or negedge rst_n) begin
    if (!rst_n) begin
      a_ar   <= '0;
      b_ar   <= '0;
      cin_ar <= 1'b0;
      sub_ar <= 1'b0;
    end else begin
      a_ar   <= a;
      b_ar   <= b;
      cin_ar <= cin;
      sub_ar <= (sel == OP_SUB);
    end
  end

  // ------------------------------------------------ logic unit input registers
  logic [WIDTH-1:0] a_lg, b_lg;
  alu_op_e          op_lg;

  always_ff @(negedge gclk_logic or negedge rst_n) begin
    if (!rst_n) begin
      a_lg  <= '0;
      b_lg  <= '0;
      op_lg <= OP_AND;
    end else begin
      a_lg  <= a;
      b_lg  <= b;
      op_lg <= sel;
    end
  end

  // ------------------------------------------------------- control register
  always_ff @(negedge gclk_ctl or negedge rst_n) begin
    if (!rst_n) begin
      pending_q   <= 1'b0;
      use_logic_q <= 1'b0;
    end else begin
      pending_q <= en;
      if (en) use_logic_q <= !is_arith(sel);
    end
  end

  // -------------------------------------------------------------- the units
  logic cout_a;

  arith_unit #(.WIDTH(WIDTH)) u_arith (
    .a(a_ar), .b(b_ar), .cin(cin_ar), .sub(sub_ar), .y(ya), .cout(cout_a)
  );

  logic_unit #(.WIDTH(WIDTH)) u_logic (
    .a(a_lg), .b(b_lg), .op(op_lg), .y(yl)
  );

  // ----------------------------------------- output multiplexer and register
  alu_out_stage #(.WIDTH(WIDTH)) u_out (
    .gclk(gclk_out), .rst_n(rst_n), .use_logic(use_logic_q),
    .ya(ya), .cout_a(cout_a), .yl(yl), .y(y), .cout(cout)
  );

  // y_valid: the output register was loaded at the last rising edge of clk.
  always_ff @(negedge gclk_ctl or negedge rst_n) begin
    if (!rst_n) y_valid <= 1'b0;
    else        y_valid <= pending_q;
  end

endmodule
