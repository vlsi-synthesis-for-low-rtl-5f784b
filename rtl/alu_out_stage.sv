// alu_out_stage: the ALU's output multiplexer and output register.
//
// The multiplexer picks the result of the unit that performed the last
// operation (arithmetic or logic unit), and the output register stores it
// together with the carry/borrow flag. The register runs on a gated clock, so
// it only toggles in the cycle after an operation was accepted; otherwise its
// clock is held high and the output is kept.
//
// Interface: gclk (gated clock; the register captures on its falling edge,
// which is the rising edge of the free-running clock), rst_n (asynchronous,
// active low, clears the register), use_logic (1 selects the logic unit),
// ya / cout_a (arithmetic unit result and carry), yl (logic unit result),
// y / cout (registered output).
// Timing: y and cout are valid after the falling edge of gclk.
//
// The existence of an output multiplexer and an output register follows the
// document; their form (a two-way select, a clear-to-zero reset, the flag
// being zero for logic operations) is this design's choice.
module alu_out_stage #(
  parameter int unsigned WIDTH = alu_pkg::ALU_WIDTH
) (
  input  logic             gclk,
  input  logic             rst_n,
  input  logic             use_logic,
  input  logic [WIDTH-1:0] ya,
  input  logic             cout_a,
  input  logic [WIDTH-1:0] yl,
  output logic [WIDTH-1:0] y,
  output logic             cout
);

  logic [WIDTH-1:0] y_mux;
  logic             cout_mux;

  always_comb begin
    y_mux    = use_logic ? yl : ya;
    cout_mux = use_logic ? 1'b0 : cout_a;
  end

  always_ff @(negedge gclk or negedge rst_n) begin
    if (!rst_n) begin
      y    <= '0;
      cout <= 1'b0;
    end else begin
      y    <= y_mux;
      cout <= cout_mux;
    end
  end

endmodule
