// Test of the Montgomery recoder.
//
// In calculating mode, for every SP and odd low digit of M (1 or 3) the chosen multiple
// qm*M must make SP + qm*M a multiple of 4 with qm in {-1, 0, +1, +2}, and qo must be
// qm mod 4.  In reuse mode the stored digit qi must be decoded; in the SI cycle SEL_MM
// must select SI and EN_MM follow si_en.  SEL_MM must hold while EN_MM is 0.
module montg_recoder_tb;
  import mm_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       en, si_cycle, si_en, calc, m1;
  logic [1:0] sp, qi, qo;
  sel_mm_e    sel_mm, last_sel;
  logic       en_mm, neg_mm;
  int checks = 0, failures = 0;

  montg_recoder dut (.clk, .rst_n, .en, .si_cycle, .si_en, .calc, .sp, .m1, .qi, .qo,
                     .sel_mm, .en_mm, .neg_mm);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int mult(sel_mm_e s, logic e);
    if (!e) return 0;
    case (s)
      SELMM_P1M: return 1;
      SELMM_P2M: return 2;
      SELMM_N1M: return -1;
      default:   return 99;   // SI
    endcase
  endfunction

  initial begin
    int q, m;
    en = 1'b0; si_cycle = 1'b0; si_en = 1'b0; calc = 1'b0; sp = '0; m1 = 1'b0; qi = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    last_sel = SELMM_SI;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      si_cycle = ($urandom_range(5) == 0);
      si_en = 1'($urandom_range(1));
      en = !si_cycle;
      calc = 1'($urandom_range(1));
      sp = 2'($urandom); m1 = 1'($urandom_range(1)); qi = 2'($urandom);
      #1;
      m = m1 ? 3 : 1;
      q = mult(sel_mm, en_mm);
      if (si_cycle) begin
        checks++;
        if (en_mm != si_en || (si_en && sel_mm != SELMM_SI)) begin
          failures++; $display("FAIL SI cycle");
        end
      end else if (calc) begin
        checks++;
        if (((int'(sp) + q * m) % 4) != 0 || q == 99) begin
          failures++; $display("FAIL sp=%0d m=%0d qm=%0d", sp, m, q);
        end
        checks++;
        if (qo != 2'(q)) begin failures++; $display("FAIL qo=%0d for qm=%0d", qo, q); end
      end else begin
        checks++;
        if (2'(q) != qi || q == 99) begin failures++; $display("FAIL qi=%0d decoded %0d", qi, q); end
      end
      checks++;
      if (neg_mm != (q == -1)) begin failures++; $display("FAIL NEG_MM"); end
      if (!en_mm) begin
        checks++;
        if (sel_mm != last_sel) begin failures++; $display("FAIL SEL_MM not held"); end
      end
      last_sel = sel_mm;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
