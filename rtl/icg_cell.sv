// Integrated clock gate: latch-based, glitch-free.
//
// The enable is captured by a latch that is transparent while clk is low and is
// ANDed with clk, so gclk_o can only start or stop at a rising edge of clk and never
// produces a shortened pulse. test_en_i forces the clock on (scan/test). This is the
// standard clock-gating cell; the design description asks for idle modules to have
// their clock switched off but does not describe the cell, so its form is this
// design's choice. The latch is intended: it is what makes the gate glitch-free.
//
// Timing: en_i must be stable around the rising edge of clk (it normally comes from
// flops clocked by clk); the gated clock follows on the next rising edge.
module icg_cell (
  input  logic clk,
  input  logic en_i,
  input  logic test_en_i,
  output logic gclk_o
);

  logic en_latched;

  always_latch begin
    if (!clk) en_latched = en_i | test_en_i;
  end

  assign gclk_o = clk & en_latched;

endmodule
