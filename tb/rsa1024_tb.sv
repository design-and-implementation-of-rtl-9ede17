// Workload test: a 1024-bit RSA-style modular exponentiation x^e mod M on the
// coprocessor at its default sizes, as a chain of Montgomery multiplications at double
// precision (p = 2, c = 512, so c' = 528 and R = 2^1056).
//
// The host writes M, x and R^2 mod M once; after that every multiplication only points
// the A, B and S base addresses at the right memory areas (results alternate between two
// buffers), as a host driving the coprocessor would.  Left-to-right square-and-multiply
// in the Montgomery domain: x' = x*R, a = R, then a = a*a (and a = a*x') per exponent
// bit, finally a*1.  Only that last result can be negative and needs one addition of M:
// intermediate results stay in (-M, M) and are used unreduced.  The result is checked
// against a shift-and-add model of x^e mod M, and the cycles per multiplication are
// reported (the exponent has 1024 bits with random ones).
module rsa1024_tb;
  import mm_pkg::*;

  localparam int unsigned CP   = CMAX_DEF + W_DEF / 2;
  localparam int unsigned NB   = 2 * CP + 16;
  localparam int unsigned AW   = $clog2(MEM_BYTES_DEF / 2);
  localparam int unsigned NBIT = 2 * CP;            // n' = 1056
  localparam int unsigned EBITS = 1024;

  typedef logic signed [NB-1:0] num_t;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          host_en = 1'b0, host_we = 1'b0;
  logic [AW-2:0] host_addr = '0;
  logic [31:0]   host_wdata = '0, host_rdata;
  logic          start = 1'b0;
  logic [2:0]    cfg_p = 3'd2;
  logic [4:0]    cfg_cw = 5'd16;
  logic [AW-1:0] a_base = '0, b_base = '0, m_base = 10'd0, s_base = '0, q_base = 10'd480;
  logic          busy, done, sign_s, ms1b_s;

  montmul_top dut (
    .clk, .rst_n, .host_en, .host_we, .host_addr, .host_wdata, .host_rdata,
    .start, .cfg_p, .cfg_cw, .a_base, .b_base, .m_base, .s_base, .q_base,
    .busy, .done, .sign_s, .ms1b_s
  );

  // memory areas, halfword addresses, 68 halfwords (34 words) each
  localparam logic [AW-1:0] X_AREA = 10'd68, R2_AREA = 10'd136, ONE_AREA = 10'd204,
                            XM_AREA = 10'd272, BUF0 = 10'd340, BUF1 = 10'd408;

  int checks = 0, failures = 0;
  longint cycles = 0, mult_cycles = 0, mults = 0;
  always @(posedge clk) cycles++;

  initial begin
    repeat (6000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic num_t mod_mul(num_t x, num_t y, num_t m);
    num_t r = '0;
    for (int i = NB - 1; i >= 0; i--) begin
      r = r <<< 1;
      if (r >= m) r = r - m;
      if (y[i]) begin
        r = r + x;
        if (r >= m) r = r - m;
      end
    end
    return r;
  endfunction

  function automatic num_t rand_bits(int nbits);
    num_t v = '0;
    for (int i = 0; i < NB; i += 32) v[i +: 32] = $urandom;
    for (int i = 0; i < NB; i++) if (i >= nbits) v[i] = 1'b0;
    return v;
  endfunction

  task automatic host_write(int word_addr, logic [31:0] data);
    @(negedge clk);
    host_en = 1'b1; host_we = 1'b1; host_addr = (AW-1)'(word_addr); host_wdata = data;
    @(negedge clk);
    host_en = 1'b0; host_we = 1'b0;
  endtask

  task automatic host_read(int word_addr, output logic [31:0] data);
    @(negedge clk);
    host_en = 1'b1; host_we = 1'b0; host_addr = (AW-1)'(word_addr);
    @(negedge clk);
    host_en = 1'b0;
    data = host_rdata;
  endtask

  task automatic put_num(logic [AW-1:0] hw_base, num_t v);
    for (int k = 0; 32 * k < NBIT; k++) host_write(int'(hw_base) / 2 + k, v[32*k +: 32]);
  endtask

  task automatic get_num(logic [AW-1:0] hw_base, output num_t v);
    logic [31:0] d;
    v = '0;
    for (int k = 0; 32 * k < NBIT; k++) begin
      host_read(int'(hw_base) / 2 + k, d);
      v[32*k +: 32] = d;
    end
    for (int i = NBIT; i < NB; i++) v[i] = v[NBIT-1];
  endtask

  task automatic mont(logic [AW-1:0] a, logic [AW-1:0] b, logic [AW-1:0] s);
    longint t0;
    @(negedge clk);
    a_base = a; b_base = b; s_base = s; start = 1'b1;
    t0 = cycles;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    mult_cycles += cycles - t0;
    mults++;
  endtask

  initial begin
    num_t m, x, e, r_mod, r2, one, res, expv;
    logic [AW-1:0] cur, nxt;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    m = rand_bits(1024); m[0] = 1'b1; m[1023] = 1'b1;
    x = rand_bits(1024) % m;
    e = rand_bits(EBITS); e[EBITS-1] = 1'b1;
    r_mod = '0; r_mod[0] = 1'b1;
    for (int i = 0; i < NBIT; i++) begin r_mod = r_mod <<< 1; if (r_mod >= m) r_mod = r_mod - m; end
    r2 = mod_mul(r_mod, r_mod, m);
    one = '0; one[0] = 1'b1;

    put_num(m_base, m);
    put_num(X_AREA, x);
    put_num(R2_AREA, r2);
    put_num(ONE_AREA, one);
    put_num(BUF0, r_mod);                 // a = R (Montgomery form of 1)

    mont(X_AREA, R2_AREA, XM_AREA);       // x' = x*R
    cur = BUF0; nxt = BUF1;
    for (int i = EBITS - 1; i >= 0; i--) begin
      mont(cur, cur, nxt);
      {cur, nxt} = {nxt, cur};
      if (e[i]) begin
        mont(cur, XM_AREA, nxt);
        {cur, nxt} = {nxt, cur};
      end
    end
    mont(cur, ONE_AREA, nxt);
    get_num(nxt, res);
    if (res < 0) res = res + m;           // the only post-reduction

    expv = one;
    for (int i = EBITS - 1; i >= 0; i--) begin
      expv = mod_mul(expv, expv, m);
      if (e[i]) expv = mod_mul(expv, x, m);
    end
    checks++;
    if (res != expv) begin
      failures++;
      $display("FAIL x^e mod M differs from the model");
    end
    $display("%0d Montgomery multiplications, %0d cycles each", mults, mult_cycles / mults);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
