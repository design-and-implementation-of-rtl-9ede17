// w-bit pipelined carry-propagate adder for the RR2CR conversion.
//
// At the end of a row the part of the result still held in carry-save form in the
// accumulator is turned into an ordinary binary number one w-bit word per cycle.  Each
// step adds a w-bit slice of ACC_C and of ACC_S and the carry kept from the previous
// slice; first marks the lowest slice, whose carry-in is cin0 (ACC_L[2]).  The sum goes
// to the output register ZO_REG and the carry to a flop, so one word leaves per cycle
// with one cycle of latency.  The register-per-word organisation is the reference
// design's; the first/cin0 interface is this design's own.
module rr2cr_cpa #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         step,
  input  logic         first,
  input  logic         cin0,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] zo,
  output logic         zo_valid
);
  logic         carry_q;
  logic [W:0]   sum;

  always_comb sum = {1'b0, a} + {1'b0, b} + {{W{1'b0}}, (first ? cin0 : carry_q)};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      carry_q  <= 1'b0;
      zo       <= '0;
      zo_valid <= 1'b0;
    end else begin
      zo_valid <= step;
      if (step) begin
        zo      <= sum[W-1:0];
        carry_q <= sum[W];
      end
    end
  end
endmodule
