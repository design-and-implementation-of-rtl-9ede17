// Modulus-multiple generator.
//
// Forms MM, one of {SI, -M, 0, +M, +2M}, from the c'-bit chunk of the modulus M and the
// c'-bit chunk of the previous row's result SI with its sign bit (SIGN_SI).  SI shares
// this generator because MM has one value fewer than PP; it is added once per column to
// seed the accumulator.  -M is the bit inverse of M with the +1 entering the accumulator
// as NEG_MM.  The result is c'+2 bits, two's complement.  Combinational.
// The value set and the SI sharing follow the reference design; the SEL_MM code values
// (see mm_pkg) are this design's choice.
module mm_generator
  import mm_pkg::*;
#(
  parameter int unsigned CP = 528
) (
  input  logic [CP-1:0] m,
  input  logic [CP-1:0] si,
  input  logic          sign_si,
  input  sel_mm_e       sel_mm,
  input  logic          en_mm,
  output logic [CP+1:0] mm
);
  always_comb begin
    unique case (sel_mm)
      SELMM_SI:  mm = {sign_si, sign_si, si};
      SELMM_P1M: mm = {2'b00, m};
      SELMM_P2M: mm = {1'b0, m, 1'b0};
      default:   mm = ~{2'b00, m};
    endcase
    if (!en_mm) mm = '0;
  end
endmodule
