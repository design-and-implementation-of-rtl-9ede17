// Test of the PISO shift register: after a load, successive shifts must present the
// loaded unit's digits from the least significant up; load takes priority over shift.
module piso_reg_tb;
  localparam int unsigned WIDTH = 16;

  logic             clk = 1'b0, rst_n = 1'b0, load, shift;
  logic [WIDTH-1:0] din;
  logic [1:0]       dout;
  int checks = 0, failures = 0;

  piso_reg #(.WIDTH(WIDTH)) dut (.clk, .rst_n, .load, .shift, .din, .dout);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WIDTH-1:0] v;
    load = 1'b0; shift = 1'b0; din = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 50; t++) begin
      v = WIDTH'($urandom);
      @(negedge clk);
      load = 1'b1; shift = 1'b1; din = v;
      @(negedge clk);
      load = 1'b0;
      for (int k = 0; k < WIDTH / 2; k++) begin
        checks++;
        if (dout != v[2*k +: 2]) begin
          failures++;
          $display("FAIL digit %0d: %0d expected %0d", k, dout, v[2*k +: 2]);
        end
        shift = ($urandom_range(3) != 0);
        @(negedge clk);
        if (!shift) begin
          checks++;
          if (dout != v[2*k +: 2]) begin failures++; $display("FAIL moved without shift"); end
          shift = 1'b1;
          @(negedge clk);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
