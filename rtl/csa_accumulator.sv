// Carry-save accumulator for the PPnMM accumulation.
//
// State: ACC_C (c'+4 bits) and ACC_S (c'+3 bits), both signed, and ACC_L (3 bits,
// unsigned).  The value held is
//   V = 4*(ACC_C + ACC_S + ACC_L[2]) + ACC_L[1:0]
// ACC_L[1:0] is the radix-4 digit produced in the last cycle, already in conventional
// form, and ACC_L[2] the carry out of it.  Each enabled cycle adds PP and MM (c'+2 bits,
// two's complement, with their negation carries NEG_PP and NEG_MM) to a feedback value:
//   sft_fb = 1 (shifted):   V' = (V >> 2) + PP + MM   -- the usual digit step
//   sft_fb = 0 (unshifted): V' =  V       + PP + MM   -- used once per column
// One 4-2 compressor per bit position, c'+5 positions, adds the four vectors.  The
// multiplexers in front of the compressors pick the shifted or unshifted feedback; the
// sign bits of ACC_C, ACC_S, PP and MM are extended over the top positions, and the
// carry out of the top compressor is dropped.  Two full adders resolve the two lowest
// positions into ACC_L, taking in NEG_MM and NEG_PP.  ACC_L[2] enters as the carry-in
// of position 0 in both modes; in unshifted mode it also takes the second input of
// positions 0 and 1, which together give it its weight of 4.  That placement of ACC_L[2]
// is this design's choice.  The structure and the register lengths c'+4 and c'+3 (found
// by simulation in the reference design to be free of overflow) follow the reference.
// clr empties the accumulator; en low holds it.  Registers update on the rising edge.
module csa_accumulator #(
  parameter int unsigned CP = 528
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          en,
  input  logic          sft_fb,
  input  logic [CP+1:0] pp,
  input  logic [CP+1:0] mm,
  input  logic          neg_pp,
  input  logic          neg_mm,
  output logic [CP+3:0] acc_c,
  output logic [CP+2:0] acc_s,
  output logic [2:0]    acc_l
);
  localparam int unsigned NPOS = CP + 5;

  logic [NPOS-1:0] x1, x2, x3, x4, cin, co, cc, ss;
  logic            fa0_co, l0, l1, l2;

  always_comb begin
    for (int k = 0; k < NPOS; k++) begin
      if (sft_fb) begin
        x1[k] = (k <= CP + 3) ? acc_c[k] : acc_c[CP+3];
        x2[k] = (k <= CP + 2) ? acc_s[k] : acc_s[CP+2];
      end else begin
        x1[k] = (k >= 2) ? acc_c[k-2] : acc_l[k];
        x2[k] = (k >= 2) ? acc_s[k-2] : acc_l[2];
      end
      x3[k] = (k <= CP + 1) ? pp[k] : pp[CP+1];
      x4[k] = (k <= CP + 1) ? mm[k] : mm[CP+1];
    end
    cin = {co[NPOS-2:0], acc_l[2]};
  end

  for (genvar k = 0; k < NPOS; k++) begin : g_pos
    compressor42 u_cmp (
      .x1(x1[k]), .x2(x2[k]), .x3(x3[k]), .x4(x4[k]), .ci(cin[k]),
      .co(co[k]), .c(cc[k]), .s(ss[k])
    );
  end

  full_adder u_fa0 (.a(ss[0]), .b(neg_mm), .ci(neg_pp), .co(fa0_co), .s(l0));
  full_adder u_fa1 (.a(ss[1]), .b(cc[0]),  .ci(fa0_co), .co(l2),     .s(l1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_c <= '0;
      acc_s <= '0;
      acc_l <= '0;
    end else if (clr) begin
      acc_c <= '0;
      acc_s <= '0;
      acc_l <= '0;
    end else if (en) begin
      acc_c <= cc[NPOS-1:1];
      acc_s <= ss[NPOS-1:2];
      acc_l <= {l2, l1, l0};
    end
  end
endmodule
