// Test of the multiplier core with a behavioural memory, at reduced sizes
// (w = 32, c up to 64, p up to 4).
//
// The memory model answers the core's port with a one-cycle read latency, as the data
// memory does, and flags any write outside the result and quotient areas.  For random
// operands at every precision and chunk length it checks the result against a bit-exact
// model of the radix-4 algorithm, the stored quotient digits of the last row against
// the model's digits (qm mod 4), the busy/done handshake, and that nothing else in
// memory was written.
module montmul_core_tb;
  localparam int unsigned W    = 32;
  localparam int unsigned CMAX = 64;
  localparam int unsigned PMAX = 4;
  localparam int unsigned AW   = 10;
  localparam int unsigned CP   = CMAX + W / 2;
  localparam int unsigned NB   = PMAX * CP + 16;
  localparam int unsigned NHW  = 1 << AW;

  typedef logic signed [NB-1:0] num_t;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          start = 1'b0;
  logic [2:0]    cfg_p = '0;
  logic [1:0]    cfg_cw = '0;
  logic [AW-1:0] a_base = 10'd0, b_base = 10'd100, m_base = 10'd200,
                 s_base = 10'd301, q_base = 10'd401;
  logic          busy, done, sign_s, ms1b_s;
  logic          mem_en, mem_we;
  logic [1:0]    mem_be;
  logic [AW-1:0] mem_addr;
  logic [W-1:0]  mem_wdata, mem_rdata;

  montmul_core #(.W(W), .CMAX(CMAX), .PMAX(PMAX), .AW(AW)) dut (
    .clk, .rst_n, .start, .cfg_p, .cfg_cw, .a_base, .b_base, .m_base, .s_base, .q_base,
    .busy, .done, .sign_s, .ms1b_s,
    .mem_en, .mem_we, .mem_be, .mem_addr, .mem_wdata, .mem_rdata
  );

  int checks = 0, failures = 0;

  // ---------------------------------------------------------------- memory model
  logic [15:0] mem [NHW];
  int lo_ok, hi_ok;     // halfword range the core may write
  int stray = 0;

  task automatic wr_hw(int a, logic [15:0] d);
    if (!((a >= int'(s_base) && a < int'(s_base) + hi_ok) ||
          (a >= int'(q_base) && a < int'(q_base) + lo_ok))) stray++;
    mem[a] = d;
  endtask

  always @(posedge clk) begin
    if (mem_en) begin
      mem_rdata <= {mem[(int'(mem_addr) + 1) % NHW], mem[int'(mem_addr)]};
      if (mem_we) begin
        if (mem_be[0]) wr_hw(int'(mem_addr), mem_wdata[15:0]);
        if (mem_be[1]) wr_hw(int'(mem_addr) + 1, mem_wdata[31:16]);
      end
    end
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- reference model
  int qdig [NB/2];

  function automatic num_t golden(num_t a, num_t b, num_t m, int nd);
    num_t s = '0, t;
    logic prev = 1'b0;
    int d, q;
    for (int i = 0; i < nd; i++) begin
      d = -2 * int'(b[2*i+1]) + int'(b[2*i]) + int'(prev);
      prev = b[2*i+1];
      t = s + num_t'(d) * a;
      case ({t[1:0], m[1]})
        3'b000, 3'b001: q = 0;
        3'b010:         q = -1;
        3'b011:         q = 1;
        3'b100, 3'b101: q = 2;
        3'b110:         q = 1;
        default:        q = -1;
      endcase
      qdig[i] = q;
      t = t + num_t'(q) * m;
      s = t >>> 2;
    end
    return s;
  endfunction

  function automatic num_t rand_bits(int nbits);
    num_t v = '0;
    for (int i = 0; i < NB; i += 32) v[i +: 32] = $urandom;
    for (int i = 0; i < NB; i++) if (i >= nbits) v[i] = 1'b0;
    return v;
  endfunction

  task automatic put(int base, num_t v, int nbits);
    for (int h = 0; 16 * h < nbits; h++) mem[base + h] = v[16*h +: 16];
  endtask

  task automatic run(int p, int cw);
    int cpb = 32 * cw + 16, nbits = p * cpb, n = 32 * cw * p;
    num_t m, a, b, s, es;
    m = rand_bits(n); m[0] = 1'b1; m[n-1] = 1'b1;
    a = rand_bits(n) % m; b = rand_bits(n) % m;
    if ($urandom_range(1) != 0) a = -a;
    if ($urandom_range(1) != 0) b = -b;
    for (int h = 0; h < NHW; h++) mem[h] = 16'($urandom);
    put(int'(a_base), a, nbits); put(int'(b_base), b, nbits); put(int'(m_base), m, nbits);
    hi_ok = nbits / 16; lo_ok = cpb / 16;
    stray = 0;
    @(negedge clk);
    cfg_p = 3'(p); cfg_cw = 2'(cw); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    checks++;
    if (!busy) begin failures++; $display("FAIL busy not raised"); end
    while (!done) @(negedge clk);
    @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL busy after done"); end
    es = golden(a, b, m, nbits / 2);
    s = '0;
    for (int h = 0; h < nbits / 16; h++) s[16*h +: 16] = mem[int'(s_base) + h];
    for (int i = 0; i < NB; i++) if (i >= nbits) s[i] = s[nbits-1];
    checks++;
    if (s != es) begin failures++; $display("FAIL p=%0d cw=%0d result", p, cw); end
    for (int i = 0; i < cpb / 2; i++) begin
      checks++;
      if (int'(mem[int'(q_base) + i / 8][2*(i%8) +: 2]) != (qdig[(p-1)*cpb/2 + i] & 3)) begin
        failures++;
        $display("FAIL p=%0d cw=%0d quotient digit %0d", p, cw, i);
      end
    end
    checks++;
    if (stray != 0) begin failures++; $display("FAIL %0d stray writes", stray); end
    checks++;
    if (sign_s != es[NB-1]) begin failures++; $display("FAIL sign flag"); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int p = 1; p <= 4; p++)
      for (int cw = 1; cw <= 2; cw++)
        repeat (3) run(p, cw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
