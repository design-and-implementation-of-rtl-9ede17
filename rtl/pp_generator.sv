// Partial-product generator.
//
// Forms PP = b*A for a Booth digit b in {-2, -1, 0, +1, +2} from the c'-bit chunk of A
// held in the operand register and its sign bit (SIGN_A: the sign of A for the top chunk,
// 0 for the others).  Only wiring and inversion are used: |PP| is A or A shifted left by
// one, a negative PP is the bit inverse, and the missing +1 enters the accumulator
// separately as NEG_PP.  The result is c'+2 bits, two's complement.  Combinational.
// The value set and the separate +1 follow the reference design; the SEL_PP code values
// follow its inversion rule, with the exact codes chosen here (see mm_pkg).
module pp_generator
  import mm_pkg::*;
#(
  parameter int unsigned CP = 528   // c' = c + w/2
) (
  input  logic [CP-1:0] a,
  input  logic          sign_a,
  input  sel_pp_e       sel_pp,
  input  logic          en_pp,
  output logic [CP+1:0] pp
);
  logic [CP+1:0] mag;
  logic          neg;

  always_comb begin
    mag = sel_pp[1] ? {sign_a, sign_a, a} : {sign_a, a, 1'b0};
    neg = sel_pp[1] ^ sel_pp[0];
    pp  = en_pp ? (neg ? ~mag : mag) : '0;
  end
endmodule
