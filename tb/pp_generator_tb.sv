// Test of the partial-product generator at a reduced chunk length (c' = 40): for random
// chunks, sign bits and Booth digits, PP + NEG_PP read as a (c'+2)-bit two's complement
// number must equal digit * chunk, the chunk read as c'+1-bit signed with its sign bit.
module pp_generator_tb;
  import mm_pkg::*;
  localparam int unsigned CP = 40;

  logic [CP-1:0] a;
  logic          sign_a, en_pp;
  sel_pp_e       sel_pp;
  logic [CP+1:0] pp;
  int checks = 0, failures = 0;

  pp_generator #(.CP(CP)) dut (.a, .sign_a, .sel_pp, .en_pp, .pp);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint av, d, got;
    for (int i = 0; i < 400; i++) begin
      a = CP'({$urandom, $urandom});
      sign_a = 1'($urandom_range(1));
      en_pp = ($urandom_range(4) != 0);
      sel_pp = sel_pp_e'($urandom_range(3));
      #1;
      av = longint'({{(64-CP-1){sign_a}}, sign_a, a});
      case (sel_pp)
        SELPP_P2A: d = 2;
        SELPP_P1A: d = 1;
        SELPP_N1A: d = -1;
        default:   d = -2;
      endcase
      if (!en_pp) d = 0;
      got = longint'({{(64-CP-2){pp[CP+1]}}, pp}) + ((d < 0) ? 1 : 0);
      checks++;
      if (got != d * av) begin
        failures++;
        $display("FAIL digit %0d: got %0d expected %0d", d, got, d * av);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
