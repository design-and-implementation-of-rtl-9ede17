// Test of the carry-save accumulator at a reduced chunk length (c' = 24).
//
// A model keeps the exact value V.  Each cycle random PP and MM of the sizes the
// multiplier produces (|PP|, |MM| < 2^(c'+1), given as bit patterns plus negation
// carries) are added, with shifted feedback (V' = floor(V/4) + PP + MM) or, at most
// once in a row as in the multiplier, unshifted feedback (V' = V + PP + MM).  After
// every cycle the registers must hold 4*(ACC_C + ACC_S + ACC_L[2]) + ACC_L[1:0] = V.
// Clear and hold are checked too.
module csa_accumulator_tb;
  localparam int unsigned CP = 24;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          clr, en, sft_fb, neg_pp, neg_mm;
  logic [CP+1:0] pp, mm;
  logic [CP+3:0] acc_c;
  logic [CP+2:0] acc_s;
  logic [2:0]    acc_l;
  int checks = 0, failures = 0;

  csa_accumulator #(.CP(CP)) dut (.clk, .rst_n, .clr, .en, .sft_fb, .pp, .mm, .neg_pp,
                                  .neg_mm, .acc_c, .acc_s, .acc_l);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint held();
    longint c, s;
    c = longint'({{(64-CP-4){acc_c[CP+3]}}, acc_c});
    s = longint'({{(64-CP-3){acc_s[CP+2]}}, acc_s});
    return 4 * (c + s + longint'(acc_l[2])) + longint'(acc_l[1:0]);
  endfunction

  // random value with |v| < 2^(CP+1), as bit pattern and negation carry
  task automatic rnd(output logic [CP+1:0] pat, output logic neg, output longint v);
    longint mag;
    mag = longint'($urandom) % (longint'(1) << (CP + 1));
    if ($urandom_range(3) == 0) mag = (longint'(1) << (CP + 1)) - 1 - longint'($urandom_range(3));
    if ($urandom_range(1) != 0) begin
      v = -mag; pat = ~(CP+2)'(mag); neg = 1'b1;
    end else begin
      v = mag; pat = (CP+2)'(mag); neg = 1'b0;
    end
  endtask

  initial begin
    automatic longint v = 0;
    longint pv, mv;
    automatic logic prev_unshift = 1'b1;
    clr = 1'b0; en = 1'b0; sft_fb = 1'b1; pp = '0; mm = '0; neg_pp = 1'b0; neg_mm = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      rnd(pp, neg_pp, pv);
      rnd(mm, neg_mm, mv);
      en  = ($urandom_range(9) != 0);
      clr = ($urandom_range(199) == 0);
      sft_fb = prev_unshift ? 1'b1 : ($urandom_range(5) != 0);
      @(posedge clk);
      if (clr)     v = 0;
      else if (en) begin
        v = (sft_fb ? (v >>> 2) : v) + pv + mv;
        prev_unshift = !sft_fb;
      end
      #1;
      checks++;
      if (held() != v) begin
        failures++;
        $display("FAIL cycle %0d: holds %0d expected %0d", i, held(), v);
        v = held();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
