// Test of the modulus-multiple generator at a reduced chunk length (c' = 40): for random
// chunks of M and SI, MM + NEG_MM read as a (c'+2)-bit two's complement number must be
// SI (signed with its sign bit), -M, +M, +2M, or 0 when EN_MM is low.
module mm_generator_tb;
  import mm_pkg::*;
  localparam int unsigned CP = 40;

  logic [CP-1:0] m, si;
  logic          sign_si, en_mm;
  sel_mm_e       sel_mm;
  logic [CP+1:0] mm;
  int checks = 0, failures = 0;

  mm_generator #(.CP(CP)) dut (.m, .si, .sign_si, .sel_mm, .en_mm, .mm);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint mv, siv, expv, got;
    for (int i = 0; i < 400; i++) begin
      m = CP'({$urandom, $urandom});
      si = CP'({$urandom, $urandom});
      sign_si = 1'($urandom_range(1));
      en_mm = ($urandom_range(4) != 0);
      sel_mm = sel_mm_e'($urandom_range(3));
      #1;
      mv  = longint'({{(64-CP){1'b0}}, m});
      siv = longint'({{(64-CP-1){sign_si}}, sign_si, si});
      case (sel_mm)
        SELMM_SI:  expv = siv;
        SELMM_P1M: expv = mv;
        SELMM_P2M: expv = 2 * mv;
        default:   expv = -mv;
      endcase
      if (!en_mm) expv = 0;
      got = longint'({{(64-CP-2){mm[CP+1]}}, mm}) + ((en_mm && sel_mm == SELMM_N1M) ? 1 : 0);
      checks++;
      if (got != expv) begin
        failures++;
        $display("FAIL sel %0d: got %0d expected %0d", sel_mm, got, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
