// SP generator: the least significant radix-4 digit of S + PP.
//
// The Montgomery recoder needs, in the first column, the low digit of the sum of the
// partial product and the accumulator feedback.  The accumulator holds
//   4*(ACC_C + ACC_S + ACC_L[2]) + ACC_L[1:0]
// so with shifted feedback (feedback = ACC_C + ACC_S + ACC_L[2]) the digit is
//   PP[1:0] + ACC_C[1:0] + ACC_S[1:0] + ACC_L[2]
// and with unshifted feedback it is PP[1:0] + ACC_L[1:0].  NEG_PP, the +1 of a negative
// PP, is included: PP here means the value of the partial product.  Both formulas are
// the reference design's; NEG_PP as an explicit term is this design's reading of
// "PP".  Combinational, 2-bit result (mod 4).
module sp_generator (
  input  logic       sft_fb,
  input  logic [1:0] pp,
  input  logic       neg_pp,
  input  logic [1:0] acc_c,
  input  logic [1:0] acc_s,
  input  logic [2:0] acc_l,
  output logic [1:0] sp
);
  always_comb begin
    if (sft_fb) sp = pp + acc_c + acc_s + {1'b0, acc_l[2]} + {1'b0, neg_pp};
    else        sp = pp + acc_l[1:0] + {1'b0, neg_pp};
  end
endmodule
