// Montgomery multiplier coprocessor: core plus its shared data memory.
//
// The host writes A, B and M into the data memory as p*c'-bit two's complement numbers
// (c' = c + w/2, chunk j at halfword base + j*(2*c/w + 1)), pulses start with the
// precision p, the chunk length c/w and the base addresses, waits for done and reads
// S = A*B*2^-(p*c') mod M back from s_base, in the same format.  While busy the core
// owns the memory and host accesses are ignored; otherwise the host port drives it.
// The host port is 32 bits wide at word addresses (halfword address = 2*word address),
// with a one-cycle read latency.  The memory is 2 KB, enough for four 2112-bit
// operands, the reference's largest (quadruple precision, c = 512) configuration.  The
// host-side port and the arbitration by busy are this design's choice.
module montmul_top
  import mm_pkg::*;
#(
  parameter int unsigned W     = W_DEF,
  parameter int unsigned CMAX  = CMAX_DEF,
  parameter int unsigned PMAX  = PMAX_DEF,
  parameter int unsigned BYTES = MEM_BYTES_DEF,
  localparam int unsigned AW   = $clog2(BYTES / 2),
  localparam int unsigned CWB  = $clog2(CMAX / W + 1),
  localparam int unsigned PB   = $clog2(PMAX + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  // host access to the shared memory (when not busy)
  input  logic           host_en,
  input  logic           host_we,
  input  logic [AW-2:0]  host_addr,
  input  logic [W-1:0]   host_wdata,
  output logic [W-1:0]   host_rdata,
  // command
  input  logic           start,
  input  logic [PB-1:0]  cfg_p,
  input  logic [CWB-1:0] cfg_cw,
  input  logic [AW-1:0]  a_base,
  input  logic [AW-1:0]  b_base,
  input  logic [AW-1:0]  m_base,
  input  logic [AW-1:0]  s_base,
  input  logic [AW-1:0]  q_base,
  output logic           busy,
  output logic           done,
  output logic           sign_s,
  output logic           ms1b_s
);
  logic          c_en, c_we;
  logic [1:0]    c_be;
  logic [AW-1:0] c_addr;
  logic [W-1:0]  c_wdata, rdata;

  logic          m_en, m_we;
  logic [1:0]    m_be;
  logic [AW-1:0] m_addr;
  logic [W-1:0]  m_wdata;

  montmul_core #(.W(W), .CMAX(CMAX), .PMAX(PMAX), .AW(AW)) u_core (
    .clk, .rst_n, .start, .cfg_p, .cfg_cw,
    .a_base, .b_base, .m_base, .s_base, .q_base,
    .busy, .done, .sign_s, .ms1b_s,
    .mem_en(c_en), .mem_we(c_we), .mem_be(c_be), .mem_addr(c_addr),
    .mem_wdata(c_wdata), .mem_rdata(rdata)
  );

  always_comb begin
    if (busy) begin
      m_en = c_en; m_we = c_we; m_be = c_be; m_addr = c_addr; m_wdata = c_wdata;
    end else begin
      m_en = host_en; m_we = host_we; m_be = 2'b11; m_addr = {host_addr, 1'b0};
      m_wdata = host_wdata;
    end
  end

  data_memory #(.BYTES(BYTES), .AW(AW)) u_mem (
    .clk, .en(m_en), .we(m_we), .be(m_be), .addr(m_addr), .wdata(m_wdata), .rdata
  );

  assign host_rdata = rdata;
endmodule
