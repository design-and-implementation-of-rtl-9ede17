// Montgomery recoder: chooses the modulus multiple MM added in each cycle.
//
// In the first column of a row (calc = 1) it computes the quotient digit qm from the low
// digit SP of S + PP and bit 1 of the modulus (M is odd, so bit 0 is always 1):
//   SP = 0 -> 0;  SP = 2 -> +2;  SP = 1 -> -1 if m1 = 0 else +1;  SP = 3 -> +1 if m1 = 0 else -1
// so that SP + qm*M is a multiple of 4.  The digit is given out on qo as qm mod 4
// for storing.  In later columns (calc = 0) the stored digit qi is decoded instead.
// In the cycle that adds SI to the accumulator (si_cycle = 1) MM is SI, enabled by si_en.
// Outputs for the MM generator: EN_MM (MM is not zero), NEG_MM (MM is -M, also the +1 of
// the negation) and SEL_MM (SI, -M, +M or +2M in the mm_pkg coding).  Like SEL_PP, SEL_MM
// is held in a 2-bit flop while EN_MM is 0.  Table and hold loop follow the reference
// design; the code values and the qm mod 4 storage format are this design's choice.
// Outputs are combinational; the hold flop updates on the rising edge.
module montg_recoder
  import mm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,        // a digit cycle
  input  logic       si_cycle,  // the SI-load cycle
  input  logic       si_en,     // SI is present (every row except the first)
  input  logic       calc,      // compute qm from SP (first column)
  input  logic [1:0] sp,
  input  logic       m1,
  input  logic [1:0] qi,
  output logic [1:0] qo,
  output sel_mm_e    sel_mm,
  output logic       en_mm,
  output logic       neg_mm
);
  sel_mm_e sel_raw, sel_hold;
  logic [1:0] q;

  always_comb begin
    unique case ({sp, m1})
      3'b000, 3'b001: q = 2'd0;
      3'b010:         q = 2'd3;
      3'b011:         q = 2'd1;
      3'b100, 3'b101: q = 2'd2;
      3'b110:         q = 2'd1;
      default:        q = 2'd3;
    endcase
    qo = q;
    if (!calc) q = qi;

    if (si_cycle) begin
      en_mm   = si_en;
      sel_raw = SELMM_SI;
    end else begin
      en_mm = en && (q != 2'd0);
      unique case (q)
        2'd1:    sel_raw = SELMM_P1M;
        2'd2:    sel_raw = SELMM_P2M;
        default: sel_raw = SELMM_N1M;
      endcase
    end
    sel_mm = en_mm ? sel_raw : sel_hold;
    neg_mm = en_mm && (sel_mm == SELMM_N1M);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sel_hold <= SELMM_SI;
    else        sel_hold <= sel_mm;
  end
endmodule
