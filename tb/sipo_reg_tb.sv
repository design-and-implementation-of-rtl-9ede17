// Test of the SIPO shift register: WIDTH/2 digits shifted in (with random pauses) must
// appear as one unit with the first digit in the lowest bits.
module sipo_reg_tb;
  localparam int unsigned WIDTH = 16;

  logic             clk = 1'b0, rst_n = 1'b0, shift;
  logic [1:0]       din;
  logic [WIDTH-1:0] q;
  int checks = 0, failures = 0;

  sipo_reg #(.WIDTH(WIDTH)) dut (.clk, .rst_n, .shift, .din, .q);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WIDTH-1:0] v;
    shift = 1'b0; din = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 50; t++) begin
      v = WIDTH'($urandom);
      for (int k = 0; k < WIDTH / 2; k++) begin
        @(negedge clk);
        shift = 1'b1; din = v[2*k +: 2];
        if ($urandom_range(2) == 0) begin
          @(negedge clk);
          shift = 1'b0; din = ~din;
        end
      end
      @(negedge clk);
      shift = 1'b0;
      checks++;
      if (q != v) begin
        failures++;
        $display("FAIL unit %h expected %h", q, v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
