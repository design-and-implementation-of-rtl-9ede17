// Test of the pipelined carry-propagate adder: random 4-word operands are added word by
// word; the words leaving ZO_REG one cycle after each step must form a + b + cin0.
module rr2cr_cpa_tb;
  localparam int unsigned W = 32;
  localparam int unsigned NW = 4;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         step, first, cin0, zo_valid;
  logic [W-1:0] a, b, zo;
  int checks = 0, failures = 0;

  rr2cr_cpa #(.W(W)) dut (.clk, .rst_n, .step, .first, .cin0, .a, .b, .zo, .zo_valid);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NW*W-1:0] av, bv, sum, got;
    step = 1'b0; first = 1'b0; cin0 = 1'b0; a = '0; b = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 100; t++) begin
      for (int k = 0; k < NW; k++) begin
        av[W*k +: W] = $urandom;
        bv[W*k +: W] = $urandom;
      end
      if (t % 4 == 0) bv = ~av;
      cin0 = 1'($urandom_range(1));
      sum = av + bv + {{(NW*W-1){1'b0}}, cin0};
      for (int k = 0; k < NW; k++) begin
        @(negedge clk);
        step = 1'b1; first = (k == 0); a = av[W*k +: W]; b = bv[W*k +: W];
        @(posedge clk);
        #1;
        checks++;
        if (!zo_valid) begin failures++; $display("FAIL no valid word"); end
        got[W*k +: W] = zo;
        if (k == 0) begin
          @(negedge clk);
          step = 1'b0;           // a pause between words must not lose the carry
          @(posedge clk);
        end
      end
      @(negedge clk);
      step = 1'b0;
      checks++;
      if (got != sum) begin
        failures++;
        $display("FAIL sum %h expected %h", got, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
