// tb_alu_out_stage: self-checking test of the output multiplexer and register.
//
// Drives the stage's gated clock by hand: some cycles produce a falling edge,
// others hold the clock high. After each edge the registered output must
// equal the selected unit's result (and the carry for arithmetic, zero for
// logic); when no edge comes it must hold. Reset must clear it.
`timescale 1ns/1ps
module tb_alu_out_stage;

  localparam int unsigned W = 8;

  logic         gclk = 1'b1;
  logic         rst_n = 1'b1;
  logic         use_logic, cout_a, cout;
  logic [W-1:0] ya, yl, y;
  logic [W-1:0] exp_y;
  logic         exp_c;

  int checks   = 0;
  int failures = 0;
  int holds    = 0;
  int loads    = 0;

  alu_out_stage #(.WIDTH(W)) dut (
    .gclk(gclk), .rst_n(rst_n), .use_logic(use_logic), .ya(ya), .cout_a(cout_a),
    .yl(yl), .y(y), .cout(cout)
  );

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    use_logic = 1'b0; ya = 8'h5A; yl = 8'hA5; cout_a = 1'b1;
    #1 rst_n = 1'b0;
    #2;
    checks++;
    if (y !== '0 || cout !== 1'b0) begin failures++; $display("FAIL reset"); end
    rst_n = 1'b1;
    exp_y = '0; exp_c = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      logic pulse;
      use_logic = 1'($urandom_range(0, 1));
      ya = W'($urandom); yl = W'($urandom); cout_a = 1'($urandom_range(0, 1));
      pulse = 1'($urandom_range(0, 1));
      #2;
      if (pulse) begin
        exp_y = use_logic ? yl : ya;
        exp_c = use_logic ? 1'b0 : cout_a;
        gclk = 1'b0;
        loads++;
      end else begin
        holds++;
      end
      #3 gclk = 1'b1;
      // inputs change after the edge; the register must not follow them
      ya = W'($urandom); yl = W'($urandom);
      #1;
      checks++;
      if (y !== exp_y || cout !== exp_c) begin
        failures++;
        $display("FAIL cycle %0d: y=%h cout=%b expected %h %b", i, y, cout, exp_y, exp_c);
      end
    end
    checks++;
    if (holds == 0 || loads == 0) begin failures++; $display("FAIL no hold or no load"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
