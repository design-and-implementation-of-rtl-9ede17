// Parallel-in serial-out shift register for the radix-4 digit streams B and Q.
//
// load writes a WIDTH-bit memory unit; each shift moves it down by one 2-bit digit.
// dout is always the current low digit.  load wins over shift.  Rising-edge register.
// The reference design uses w-bit (32-bit) PISO registers; this design streams 16-bit
// units so that chunks starting in the middle of a word need no special case.
module piso_reg #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic             shift,
  input  logic [WIDTH-1:0] din,
  output logic [1:0]       dout
);
  logic [WIDTH-1:0] r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     r <= '0;
    else if (load)  r <= din;
    else if (shift) r <= {2'b00, r[WIDTH-1:2]};
  end

  assign dout = r[1:0];
endmodule
