// Exhaustive test of the full adder: s + 2*co equals a + b + ci for all 8 inputs.
module full_adder_tb;
  logic a, b, ci, co, s;
  int checks = 0, failures = 0;

  full_adder dut (.a, .b, .ci, .co, .s);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, ci} = 3'(v);
      #1;
      checks++;
      if (int'(s) + 2 * int'(co) != int'(a) + int'(b) + int'(ci)) begin
        failures++;
        $display("FAIL inputs %03b: co=%0b s=%0b", v[2:0], co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
