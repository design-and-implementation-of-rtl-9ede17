// Test of the Booth recoder against the radix-4 Booth table.
//
// For random digit streams it checks that the encoded partial product
// (EN_PP, NEG_PP, SEL_PP) stands for the digit -2*b1 + b0 + bm1, that en = 0 forces a
// zero digit, that SEL_PP keeps its previous value whenever EN_PP is 0, and that the
// codes of +A and +2A (and of -A and -2A) are bit inverses of each other.
module booth_recoder_tb;
  import mm_pkg::*;

  logic    clk = 1'b0, rst_n = 1'b0;
  logic    en, b1, b0, bm1;
  sel_pp_e sel_pp, last_sel;
  logic    en_pp, neg_pp;
  int checks = 0, failures = 0;

  booth_recoder dut (.clk, .rst_n, .en, .b1, .b0, .bm1, .sel_pp, .en_pp, .neg_pp);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int code_value(sel_pp_e s, logic e);
    if (!e) return 0;
    case (s)
      SELPP_P2A: return 2;
      SELPP_P1A: return 1;
      SELPP_N1A: return -1;
      default:   return -2;
    endcase
  endfunction

  initial begin
    int expv;
    checks++;
    if (SELPP_P1A != sel_pp_e'(~SELPP_P2A) || SELPP_N1A != sel_pp_e'(~SELPP_N2A)) begin
      failures++;
      $display("FAIL select codes are not complementary");
    end
    en = 1'b0; b1 = 1'b0; b0 = 1'b0; bm1 = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    last_sel = SELPP_P1A;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      en = ($urandom_range(7) != 0);
      {b1, b0, bm1} = 3'($urandom);
      #1;
      expv = en ? (-2 * int'(b1) + int'(b0) + int'(bm1)) : 0;
      checks++;
      if (code_value(sel_pp, en_pp) != expv) begin
        failures++;
        $display("FAIL en=%0b bits=%0b%0b%0b: got %0d expected %0d", en, b1, b0, bm1,
                 code_value(sel_pp, en_pp), expv);
      end
      checks++;
      if (neg_pp != (expv < 0)) begin failures++; $display("FAIL NEG_PP"); end
      if (!en_pp) begin
        checks++;
        if (sel_pp != last_sel) begin failures++; $display("FAIL SEL_PP not held"); end
      end
      last_sel = sel_pp;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
