// Glitch blocker: a row of level-sensitive latches on the outputs of a recoder.
//
// The latches are transparent while clk is low and hold while it is high.  Registers in
// the multiplier capture on the rising edge, so a recoder output settles during the high
// phase while the latch still shows last cycle's value, and passes on only after the
// falling edge.  Glitches of the combinational recoder therefore never reach the wide
// partial-product and modulus-multiple generators behind it, and PP and MM arrive at the
// accumulator together.  The latches are intended: they are the block's purpose.
// The latch placement and clock phase follow the reference design; the WIDTH parameter
// and grouping of the latched signals are this design's own.
module glitch_blocker #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  always_latch begin
    if (!clk) q = d;
  end
endmodule
