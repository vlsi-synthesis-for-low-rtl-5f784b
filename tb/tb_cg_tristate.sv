// tb_cg_tristate: self-checking test of the tri-state/NAND clock gate.
//
// A 10-unit clock drives the gate while the enable request changes at random
// times, including in the middle of the clock's high phase. A reference model
// samples the request at each rising clock edge and predicts gclk at several
// points of every cycle: low for the whole high phase when the request was 1,
// high otherwise, and always high while clk is low. The test also counts the
// falling edges of gclk and compares them with the number of enabled cycles,
// which catches a chopped or extra pulse. A watchdog ends a run that hangs.
`timescale 1ns/1ps
module tb_cg_tristate;

  logic clk = 1'b0;
  logic en  = 1'b0;
  logic gclk;

  int checks   = 0;
  int failures = 0;
  int gclk_falls = 0;
  int expected_falls = 0;
  int mid_high_changes = 0;

  cg_tristate dut (.clk(clk), .en(en), .gclk(gclk));

  always @(negedge gclk) gclk_falls++;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %0b expected %0b", what, $time, got, exp);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic sampled;
    // warm-up: one low phase so the held node is defined
    #5;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      // low phase: request may change anywhere in it
      #1 en = 1'($urandom_range(0, 1));
      #1 check(gclk, 1'b1, "gclk high while clk low");
      #3;
      sampled = en;
      clk = 1'b1;            // rising edge: request is sampled here
      if (sampled) expected_falls++;
      #1 check(gclk, ~sampled, "gclk early high phase");
      // change the request in the middle of the high phase
      if ($urandom_range(0, 1) == 1) begin
        en = ~en;
        mid_high_changes++;
      end
      #2 check(gclk, ~sampled, "gclk mid high phase");
      #2 check(gclk, ~sampled, "gclk late high phase");
      clk = 1'b0;
      #0 check(gclk, 1'b1, "gclk returns high at falling edge");
    end
    checks++;
    if (gclk_falls != expected_falls) begin
      failures++;
      $display("FAIL gclk falling edges %0d expected %0d", gclk_falls, expected_falls);
    end
    checks++;
    if (mid_high_changes == 0) begin
      failures++;
      $display("FAIL request never changed during a high phase");
    end
    $display("gclk pulses %0d of 2000 cycles, %0d mid-high request changes",
             gclk_falls, mid_high_changes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
