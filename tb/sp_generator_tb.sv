// Exhaustive-by-random test of the SP generator: SP must be the low radix-4 digit of
// PP + NEG_PP plus the accumulator value 4*(C + S + L[2]) + L[1:0], taken after the
// shift (feedback C + S + L[2]) or without it.
module sp_generator_tb;
  logic       sft_fb, neg_pp;
  logic [1:0] pp, acc_c, acc_s, sp;
  logic [2:0] acc_l;
  int checks = 0, failures = 0;

  sp_generator dut (.sft_fb, .pp, .neg_pp, .acc_c, .acc_s, .acc_l, .sp);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int fb, expv;
    for (int i = 0; i < 1024; i++) begin
      {sft_fb, neg_pp, pp, acc_c, acc_s, acc_l} = 11'(i * 4 + $urandom_range(3));
      #1;
      if (sft_fb) fb = int'(acc_c) + int'(acc_s) + int'(acc_l[2]);
      else        fb = 4 * (int'(acc_c) + int'(acc_s) + int'(acc_l[2])) + int'(acc_l[1:0]);
      expv = (fb + int'(pp) + int'(neg_pp)) % 4;
      checks++;
      if (int'(sp) != expv) begin
        failures++;
        $display("FAIL inputs %03h: sp=%0d expected %0d", i, sp, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
