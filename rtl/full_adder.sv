// Full adder used at the two lowest positions of the accumulator.
//
//   a + b + ci = s + 2*co
//
// One exclusive-or of a and b selects the carry-out: ci when they differ, a when they
// agree; a second exclusive-or gives the sum.  Purely combinational.
// The multiplexer-based structure follows the reference design's full-adder cell.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic co,
  output logic s
);
  logic t;

  always_comb begin
    t  = a ^ b;
    co = t ? ci : a;
    s  = t ^ ci;
  end
endmodule
