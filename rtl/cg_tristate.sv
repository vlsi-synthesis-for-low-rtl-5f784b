// cg_tristate: gated-clock generator built from a clock-controlled tri-state
// buffer and a NAND gate.
//
// How it works: the tri-state buffer has an active-low enable driven by the
// clock. While clk is low the buffer conducts and copies the enable request
// onto the internal En node; while clk is high the buffer is in its high-
// impedance state and the En node keeps the charge it was left with. The NAND
// of the En node and clk is the gated clock:
//
//   gclk = ~(en_node & clk)
//
// So gclk is the inverted clock when the request was high at the rising clock
// edge, and stays constantly high when it was low. Because the En node cannot
// change while clk is high, a request that changes during the high phase
// cannot chop or add a gclk pulse. The held En node is written as a latch that
// is transparent while clk is low: that is how a floating, charge-holding node
// behaves in a two-state description, and it is the only storage here, so the
// latch that synthesis infers is intended.
//
// Interface: clk (free-running clock), en (request), gclk (gated clock).
// Timing: en is sampled at each rising edge of clk. When it was 1, gclk falls
// with that rising edge and rises again with the next falling edge; registers
// driven by gclk capture on its falling edge, i.e. on the rising edge of clk.
//
// The buffer, the NAND and the clock-on-enable connection follow the
// published circuit. That the buffer passes the enable request (rather than a
// constant) and that the downstream registers use the falling edge of gclk are
// this design's choices.
module cg_tristate (
  input  logic clk,
  input  logic en,
  output logic gclk
);

  logic en_node;  // En node between the tri-state buffer and the NAND

  // Tri-state buffer: conducts while clk is low, holds (high impedance) while
  // clk is high.
  always_latch begin
    if (!clk) en_node = en;
  end

  // NAND gate producing the gated clock.
  assign gclk = ~(en_node & clk);

endmodule
