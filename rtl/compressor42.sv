// 4-2 compressor: adds four bits of one weight and a carry-in from the position below.
//
//   x1 + x2 + x3 + x4 + ci = s + 2*(c + co)
//
// Built from three exclusive-ors and two 2:1 multiplexers as in the low-power structure
// the accumulator is specified with: co is picked from x1 or x3 by x1^x2 and so never
// depends on ci, which is what stops a carry from rippling along the row; c is picked
// from x4 or ci by the parity of the four inputs.  Purely combinational.
// The cell structure follows the reference design's low-power compressor; the port names
// are this design's own.
module compressor42 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic ci,
  output logic co,
  output logic c,
  output logic s
);
  logic t12, t34, t;

  always_comb begin
    t12 = x1 ^ x2;
    t34 = x3 ^ x4;
    t   = t12 ^ t34;
    co  = t12 ? x3 : x1;
    c   = t   ? ci : x4;
    s   = t ^ ci;
  end
endmodule
