// Exhaustive test of the 4-2 compressor: for all 32 input combinations the weighted
// outputs s + 2*(c + co) must equal the number of ones among the inputs, and co must
// not depend on ci.
module compressor42_tb;
  logic x1, x2, x3, x4, ci, co, c, s;
  int checks = 0, failures = 0;

  compressor42 dut (.x1, .x2, .x3, .x4, .ci, .co, .c, .s);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic co0;
    for (int v = 0; v < 32; v++) begin
      {x1, x2, x3, x4, ci} = 5'(v);
      #1;
      checks++;
      if (int'(s) + 2 * (int'(c) + int'(co)) != int'(x1) + int'(x2) + int'(x3) + int'(x4) + int'(ci)) begin
        failures++;
        $display("FAIL inputs %05b: co=%0b c=%0b s=%0b", v[4:0], co, c, s);
      end
      if (ci) begin
        checks++;
        if (co != co0) begin
          failures++;
          $display("FAIL co depends on ci for %05b", v[4:0]);
        end
      end
      co0 = co;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
