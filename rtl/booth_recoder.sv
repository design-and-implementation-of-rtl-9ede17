// Radix-4 modified Booth recoder for the multiplier B.
//
// From the two bits of the current digit of B (b1 = b_{i,1}, b0 = b_{i,0}) and the
// high bit of the previous digit (bm1 = b_{i-1,1}) it forms the Booth digit
// -2*b1 + b0 + bm1 in {-2..+2} and encodes it for the partial-product generator:
//   EN_PP  = digit is not zero,
//   NEG_PP = digit is negative (the generator inverts, NEG_PP is the +1 of the negation),
//   SEL_PP = one of +2A, +A, -A, -2A in the mm_pkg coding.
// While en is low (the cycle that loads SI into the accumulator) the digit is forced to 0.
// When EN_PP is 0 the generator ignores SEL_PP, so SEL_PP is then held at its last value
// by a 2-bit flip-flop on a feedback loop, which removes needless toggles on this
// high-fan-out net.  The recoding table and the hold loop follow the reference design;
// the 2-bit code values are this design's choice (see mm_pkg).  Outputs are
// combinational from the inputs and the hold flop; the flop updates on the rising edge.
module booth_recoder
  import mm_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,
  input  logic    b1,
  input  logic    b0,
  input  logic    bm1,
  output sel_pp_e sel_pp,
  output logic    en_pp,
  output logic    neg_pp
);
  sel_pp_e sel_raw, sel_hold;

  always_comb begin
    unique case ({b1, b0, bm1})
      3'b000:  begin en_pp = 1'b0; sel_raw = SELPP_P1A; end
      3'b001:  begin en_pp = 1'b1; sel_raw = SELPP_P1A; end
      3'b010:  begin en_pp = 1'b1; sel_raw = SELPP_P1A; end
      3'b011:  begin en_pp = 1'b1; sel_raw = SELPP_P2A; end
      3'b100:  begin en_pp = 1'b1; sel_raw = SELPP_N2A; end
      3'b101:  begin en_pp = 1'b1; sel_raw = SELPP_N1A; end
      3'b110:  begin en_pp = 1'b1; sel_raw = SELPP_N1A; end
      default: begin en_pp = 1'b0; sel_raw = SELPP_N1A; end
    endcase
    if (!en) en_pp = 1'b0;
    sel_pp = en_pp ? sel_raw : sel_hold;
    neg_pp = en_pp & (sel_pp[1] ^ sel_pp[0]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sel_hold <= SELPP_P1A;
    else        sel_hold <= sel_pp;
  end
endmodule
