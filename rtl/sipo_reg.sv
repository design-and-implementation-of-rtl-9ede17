// Serial-in parallel-out shift register for the radix-4 digit streams S and Q.
//
// Each shift enters one 2-bit digit at the top and moves the rest down, so after
// WIDTH/2 shifts the first digit is in bits [1:0] and q holds a whole memory unit,
// least significant digit first.  Rising-edge register.
// The reference design uses w-bit (32-bit) SIPO registers; this design collects 16-bit
// units so that chunks starting in the middle of a word need no special case.
module sipo_reg #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             shift,
  input  logic [1:0]       din,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= '0;
    else if (shift) q <= {din, q[WIDTH-1:2]};
  end
endmodule
