// Test of the glitch-blocking latch row: while clk is high the output must hold the
// value it had when clk rose, whatever the input does; while clk is low it must follow
// the input.
module glitch_blocker_tb;
  logic       clk = 1'b0;
  logic [3:0] d = '0, q, held;
  int checks = 0, failures = 0;

  glitch_blocker #(.WIDTH(4)) dut (.clk, .d, .q);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 50; i++) begin
      // low phase: transparent
      clk = 1'b0;
      d = 4'($urandom);
      #1;
      checks++;
      if (q != d) begin failures++; $display("FAIL not transparent while clk low"); end
      d = 4'($urandom);
      #1;
      checks++;
      if (q != d) begin failures++; $display("FAIL not following while clk low"); end
      held = d;
      // high phase: opaque, input glitches
      clk = 1'b1;
      #1;
      for (int g = 0; g < 4; g++) begin
        d = 4'($urandom);
        #1;
        checks++;
        if (q != held) begin failures++; $display("FAIL glitch passed while clk high"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
