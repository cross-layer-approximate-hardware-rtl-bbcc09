// clock_gate: integrated clock-gating cell.
// The enable is sampled by a latch that is transparent while clk is low and
// the gated clock is clk AND the latched enable, so gclk carries a full,
// glitch-free pulse in every cycle whose enable was high before the rising
// edge, and stays low otherwise. Registers on gclk therefore hold their value
// in disabled cycles without a feedback multiplexer, which is how the
// accuracy configuration saves toggling energy.
// The latch is intended: it is the standard structure of such a cell, and a
// library ICG cell would replace this module in an ASIC flow. Placing gating
// cells between the clock and the input/output registers follows the
// architecture; the latch-and-AND structure is this design's choice.
module clock_gate (
  input  logic clk,
  input  logic en,
  output logic gclk
);
  logic en_lat;

  always_latch begin
    if (!clk) en_lat = en;
  end

  assign gclk = clk & en_lat;
endmodule
