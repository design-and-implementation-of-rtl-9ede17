// Shared data memory between the host and the multiplier.
//
// 2 KB by default, organised as two banks of 16-bit halfwords (even and odd halfword
// addresses) so that a 32-bit access may start at any halfword address: extended chunks
// are c + w/2 bits long and half of them start in the middle of a word.  The port takes
// a halfword address; a read returns {halfword addr+1, halfword addr} one cycle later; a
// write stores wdata[15:0] at addr if be[0] and wdata[31:16] at addr+1 if be[1].  The
// reference design names the memory, its 32-bit bus and its 8/16/32-bit transfer units;
// the two-bank organisation and this port are this design's choice.
module data_memory #(
  parameter int unsigned BYTES = 2048,
  parameter int unsigned AW    = $clog2(BYTES / 2)   // halfword address width
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [1:0]    be,
  input  logic [AW-1:0] addr,
  input  logic [31:0]   wdata,
  output logic [31:0]   rdata
);
  localparam int unsigned DEPTH = BYTES / 4;   // entries per bank

  logic [15:0] bank0 [DEPTH];
  logic [15:0] bank1 [DEPTH];

  logic [AW-2:0] row_lo, row_hi;
  logic          odd, odd_q;
  logic [15:0]   rd0, rd1;

  always_comb begin
    odd    = addr[0];
    row_lo = addr[AW-1:1];
    row_hi = addr[AW-1:1] + (AW-1)'(odd);   // row of the second halfword in bank 0
  end

  // bank 0 holds the even halfwords: the first one if addr is even, the second if odd
  always_ff @(posedge clk) begin
    if (en) begin
      if (we && (odd ? be[1] : be[0])) bank0[odd ? row_hi : row_lo] <= odd ? wdata[31:16] : wdata[15:0];
      rd0 <= bank0[odd ? row_hi : row_lo];
    end
  end

  always_ff @(posedge clk) begin
    if (en) begin
      if (we && (odd ? be[0] : be[1])) bank1[row_lo] <= odd ? wdata[15:0] : wdata[31:16];
      rd1 <= bank1[row_lo];
      odd_q <= odd;
    end
  end

  assign rdata = odd_q ? {rd0, rd1} : {rd1, rd0};
endmodule
