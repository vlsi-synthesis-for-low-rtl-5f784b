// tb_alu8_cg_top: end-to-end self-checking test of the clock-gated ALU at its
// default size (8 bits, no parameter override).
//
// Every cycle the testbench, while clk is low, drives a new request (en, a, b,
// cin, sel); at the rising edge it records what the ALU must do. Half a cycle
// after each rising edge it checks, against results it works out itself:
//   * the loaded unit's output (ya or yl) holds the new result and the other
//     unit's output has not moved (its registers were not clocked);
//   * y, cout and y_valid show the operation accepted one edge earlier, and
//     hold their value when nothing was accepted (latency two edges, one
//     operation per cycle).
// It also counts the falling edges of the four gated clocks and checks that
// the arithmetic and logic gates pulse exactly once per operation of their
// unit. The run starts with the operands a = 10101000, b = 00110111 under all
// eight codes, then increment / decrement, then random traffic with idle
// stretches. Each mechanism (arithmetic-only clocking, logic-only clocking,
// all gates idle, output hold, back-to-back operations that switch unit,
// carry out, borrow out, increment, decrement) must occur at least once.
`timescale 1ns/1ps
module tb_alu8_cg_top;

  import alu_pkg::*;

  localparam int unsigned W = ALU_WIDTH;
  localparam int N_RANDOM = 20000;

  logic         clk = 1'b0;
  logic         rst_n = 1'b1;
  logic         en = 1'b0;
  logic [W-1:0] a = '0, b = '0;
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

  // mechanism counters
  int n_arith = 0, n_logic = 0, n_idle_all = 0, n_hold = 0, n_switch = 0;
  int n_carry = 0, n_borrow = 0, n_inc = 0, n_dec = 0;
  // gated clock pulse counters
  int p_arith = 0, p_logic = 0, p_ctl = 0, p_out = 0, p_clk = 0;
  int p_arith_at_check = 0, p_logic_at_check = 0, p_ctl_at_check = 0, p_out_at_check = 0;

  always @(negedge dut.gclk_arith) if (rst_n) p_arith++;
  always @(negedge dut.gclk_logic) if (rst_n) p_logic++;
  always @(negedge dut.gclk_ctl)   if (rst_n) p_ctl++;
  always @(negedge dut.gclk_out)   if (rst_n) p_out++;
  always @(posedge clk)            if (rst_n) p_clk++;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // independent reference of one operation
  function automatic logic [W:0] ref_op(input logic [2:0] code, input logic [W-1:0] x,
                                        input logic [W-1:0] z, input logic c);
    int r;
    case (code)
      3'b000: begin r = int'(x) + int'(z) + int'(c); return {r > 255, W'(r)}; end
      3'b001: begin r = int'(x) - int'(z) - int'(c); return {r < 0, W'(r)}; end
      3'b010: return {1'b0, ~x};
      3'b011: return {1'b0, ~(x & z)};
      3'b100: return {1'b0, ~(x | z)};
      3'b101: return {1'b0, x & z};
      3'b110: return {1'b0, x | z};
      default: return {1'b0, x ^ z};
    endcase
  endfunction

  // request for one cycle
  typedef struct packed {
    logic         en;
    logic [2:0]   code;
    logic [W-1:0] a, b;
    logic         cin;
  } req_t;

  req_t script[$];

  initial begin
    #5000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req_t  cur, acc_now, acc_prev;
    logic [W:0] res_now, res_prev;
    logic [W-1:0] ya_before, yl_before, y_exp;
    logic cout_exp;
    logic quiet_run;

    // operands of the published waveforms under every code
    for (int c = 0; c < 8; c++) script.push_back('{1'b1, 3'(c), 8'b1010_1000, 8'b0011_0111, 1'b0});
    script.push_back('{1'b0, 3'b000, 8'h00, 8'h00, 1'b0});
    script.push_back('{1'b0, 3'b000, 8'h00, 8'h00, 1'b0});
    // increment, decrement, carry and borrow out
    script.push_back('{1'b1, 3'b000, 8'd41,  8'd0, 1'b1});
    script.push_back('{1'b1, 3'b001, 8'd41,  8'd0, 1'b1});
    script.push_back('{1'b1, 3'b000, 8'hFF,  8'd0, 1'b1});
    script.push_back('{1'b1, 3'b001, 8'h00,  8'd0, 1'b1});
    for (int i = 0; i < N_RANDOM; i++) begin
      req_t r;
      r.en   = ($urandom_range(0, 9) < ((i / 500) % 2 == 0 ? 8 : 2));
      r.code = 3'($urandom);
      r.a    = W'($urandom);
      r.b    = ($urandom_range(0, 15) == 0) ? '0 : W'($urandom);
      r.cin  = 1'($urandom_range(0, 1));
      script.push_back(r);
    end

    // reset for a few cycles
    #1 rst_n = 1'b0;
    repeat (3) @(negedge clk);
    #1 rst_n = 1'b1;
    check(y == '0 && y_valid == 1'b0 && ya == '0 && yl == '0, "reset values");

    acc_now  = '0;
    acc_prev = '0;
    res_now  = '0;
    res_prev = '0;
    y_exp    = '0;
    cout_exp = 1'b0;
    ya_before = ya;
    yl_before = yl;

    foreach (script[i]) begin
      // drive the request during the low phase
      cur = script[i];
      en  = cur.en; sel = alu_op_e'(cur.code); a = cur.a; b = cur.b; cin = cur.cin;
      ya_before = ya; yl_before = yl;
      p_arith_at_check = p_arith; p_logic_at_check = p_logic;
      p_ctl_at_check = p_ctl; p_out_at_check = p_out;
      @(posedge clk);
      acc_prev = acc_now;  res_prev = res_now;
      acc_now  = cur;
      res_now  = ref_op(cur.code, cur.a, cur.b, cur.cin);
      @(negedge clk);
      // units
      if (acc_now.en) begin
        if (acc_now.code[2:1] == 2'b00) begin
          check(ya == res_now[W-1:0], "arithmetic unit result");
          check(dut.cout_a == res_now[W], "arithmetic unit carry/borrow");
          check(yl == yl_before, "logic unit kept during arithmetic op");
          check(p_arith == p_arith_at_check + 1 && p_logic == p_logic_at_check,
                "only the arithmetic gate pulsed");
          n_arith++;
          if (acc_now.code == 3'b000 && res_now[W]) n_carry++;
          if (acc_now.code == 3'b001 && res_now[W]) n_borrow++;
          if (acc_now.b == '0 && acc_now.cin && acc_now.code == 3'b000) n_inc++;
          if (acc_now.b == '0 && acc_now.cin && acc_now.code == 3'b001) n_dec++;
        end else begin
          check(yl == res_now[W-1:0], "logic unit result");
          check(ya == ya_before, "arithmetic unit kept during logic op");
          check(p_logic == p_logic_at_check + 1 && p_arith == p_arith_at_check,
                "only the logic gate pulsed");
          n_logic++;
        end
        if (acc_prev.en && (acc_prev.code[2:1] == 2'b00) != (acc_now.code[2:1] == 2'b00))
          n_switch++;
      end else begin
        check(ya == ya_before && yl == yl_before, "units kept while idle");
        check(p_logic == p_logic_at_check && p_arith == p_arith_at_check,
              "no unit gate pulsed while idle");
      end
      // output register: shows the operation accepted one edge earlier
      if (acc_prev.en) begin
        y_exp = res_prev[W-1:0];
        cout_exp = res_prev[W];
        check(y == y_exp && cout == cout_exp && y_valid == 1'b1, "output register");
      end else begin
        check(y == y_exp && cout == cout_exp && y_valid == 1'b0, "output register hold");
        n_hold++;
      end
      quiet_run = (p_arith == p_arith_at_check) && (p_logic == p_logic_at_check) &&
                  (p_ctl == p_ctl_at_check) && (p_out == p_out_at_check);
      if (quiet_run) n_idle_all++;
      #1;
    end

    check(p_arith == n_arith, "arithmetic gate pulses equal arithmetic ops");
    check(p_logic == n_logic, "logic gate pulses equal logic ops");
    check(n_arith > 0,    "mechanism: arithmetic-only clocking");
    check(n_logic > 0,    "mechanism: logic-only clocking");
    check(n_idle_all > 0, "mechanism: all gates idle");
    check(n_hold > 0,     "mechanism: output hold");
    check(n_switch > 0,   "mechanism: back-to-back unit switch");
    check(n_carry > 0,    "mechanism: carry out");
    check(n_borrow > 0,   "mechanism: borrow out");
    check(n_inc > 0,      "mechanism: increment");
    check(n_dec > 0,      "mechanism: decrement");
    $display("ops: arithmetic %0d logic %0d; cycles all gates idle %0d, output hold %0d, unit switches %0d",
             n_arith, n_logic, n_idle_all, n_hold, n_switch);
    $display("carry %0d borrow %0d increment %0d decrement %0d", n_carry, n_borrow, n_inc, n_dec);
    $display("clock pulses: free clk %0d, arithmetic gate %0d, logic gate %0d, control gate %0d, output gate %0d",
             p_clk, p_arith, p_logic, p_ctl, p_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
