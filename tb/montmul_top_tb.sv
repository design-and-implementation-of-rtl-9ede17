// End-to-end test of the Montgomery multiplier coprocessor at its default sizes
// (w = 32, c up to 512, p up to 4, 2-KB memory).
//
// For a list of precisions p and chunk lengths c = 32*cw it loads random operands
// through the host port, runs the multiplier and checks, for every run:
//   - the result in memory equals a bit-exact model of the radix-4 algorithm (Booth
//     digits of B, quotient digits from the recoding table, exact division by 4),
//   - S * 2^(p*c') - A*B is a multiple of M (the Montgomery property, independent of
//     how the digits were chosen), and -M < S < M,
//   - the sign flag output matches the sign of S,
//   - the number of digit-step cycles is p*p*c'/2.
// B is drawn from (-M, M) or, in some runs, from its full range (-2^n, 2^n).
// Some runs chain the result back in as an operand, as a modular exponentiation does.
// It also counts how often the design's mechanisms occur (negative and doubled partial
// products, -M and +2M, held select lines, unshifted feedback, SI seeding, prefetch
// overlapping a column, a column waiting for its operands, half-word aligned chunks,
// negative results) and fails if one never happened.
module montmul_top_tb;
  import mm_pkg::*;

  localparam int unsigned W    = W_DEF;
  localparam int unsigned CMAX = CMAX_DEF;
  localparam int unsigned PMAX = PMAX_DEF;
  localparam int unsigned CP   = CMAX + W / 2;
  localparam int unsigned NB   = PMAX * CP + 16;
  localparam int unsigned AW   = $clog2(MEM_BYTES_DEF / 2);

  typedef logic signed [NB-1:0]  num_t;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          host_en = 1'b0, host_we = 1'b0;
  logic [AW-2:0] host_addr = '0;
  logic [W-1:0]  host_wdata = '0, host_rdata;
  logic          start = 1'b0;
  logic [2:0]    cfg_p = '0;
  logic [4:0]    cfg_cw = '0;
  logic [AW-1:0] a_base = 10'd0, b_base = 10'd140, m_base = 10'd280,
                 s_base = 10'd420, q_base = 10'd560;
  logic          busy, done, sign_s, ms1b_s;

  montmul_top dut (
    .clk, .rst_n, .host_en, .host_we, .host_addr, .host_wdata, .host_rdata,
    .start, .cfg_p, .cfg_cw, .a_base, .b_base, .m_base, .s_base, .q_base,
    .busy, .done, .sign_s, .ms1b_s
  );

  int checks = 0, failures = 0;
  longint cycles = 0;
  always @(posedge clk) cycles++;

  // ---------------------------------------------------------------- watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- mechanism counters
  int n_negpp, n_2a, n_negm, n_2m, n_hold_pp, n_hold_mm, n_unshift, n_si, n_pf_overlap,
      n_stall, n_odd_chunk, n_neg_result, n_digits;
  initial begin
    n_negpp = 0; n_2a = 0; n_negm = 0; n_2m = 0; n_hold_pp = 0; n_hold_mm = 0;
    n_unshift = 0; n_si = 0; n_pf_overlap = 0; n_stall = 0; n_odd_chunk = 0;
    n_neg_result = 0; n_digits = 0;
  end
  always @(posedge clk) if (rst_n) begin
    if (dut.u_core.state == S_DIGIT) begin
      n_digits++;
      if (dut.u_core.neg_pp_l) n_negpp++;
      if (dut.u_core.en_pp_l && !dut.u_core.sel_pp_l[1]) n_2a++;
      if (dut.u_core.neg_mm_l) n_negm++;
      if (dut.u_core.en_mm_l && dut.u_core.sel_mm_l == SELMM_P2M) n_2m++;
      if (!dut.u_core.en_pp_r) n_hold_pp++;
      if (!dut.u_core.en_mm_r) n_hold_mm++;
      if (!dut.u_core.sft_fb) n_unshift++;
      if (dut.u_core.pf_rd) n_pf_overlap++;
    end
    if (dut.u_core.state == S_SILOAD && dut.u_core.en_mm_l) n_si++;
    if (dut.u_core.state == S_PFWAIT && !dut.u_core.pf_ready) n_stall++;
    if (dut.u_core.pf_rd && dut.u_core.pf_col[0]) n_odd_chunk++;
  end

  // ---------------------------------------------------------------- reference model
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
      t = t + num_t'(q) * m;
      if (t[1:0] != 2'b00) begin
        failures++;
        $display("model error: digit not cleared");
      end
      s = t >>> 2;
    end
    return s;
  endfunction

  // x mod m in [0, m) for |x| < m
  function automatic num_t to_res(num_t x, num_t m);
    return (x < 0) ? x + m : x;
  endfunction

  // (x * y) mod m by shift and add, for |x|, |y| < 2^(NB-2)
  function automatic num_t mod_mul(num_t x, num_t y, num_t m);
    num_t r = '0, xr, yy;
    xr = (x < 0) ? -((-x) % m) : x % m;
    xr = to_res(xr, m);
    yy = (y < 0) ? -y : y;
    for (int i = NB - 1; i >= 0; i--) begin
      r = r <<< 1;
      if (r >= m) r = r - m;
      if (yy[i]) begin
        r = r + xr;
        if (r >= m) r = r - m;
      end
    end
    if (y < 0 && r != 0) r = m - r;
    return r;
  endfunction

  // (s * 2^k) mod m for |s| < m
  function automatic num_t mod_red(num_t s, num_t m, int k);
    num_t r = to_res(s, m);
    for (int i = 0; i < k; i++) begin
      r = r <<< 1;
      if (r >= m) r = r - m;
    end
    return r;
  endfunction

  function automatic num_t rand_bits(int nbits);
    num_t v = '0;
    for (int i = 0; i < NB; i += 32) v[i +: 32] = $urandom;
    for (int i = 0; i < NB; i++) if (i >= nbits) v[i] = 1'b0;
    return v;
  endfunction

  // ---------------------------------------------------------------- host access
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

  task automatic put_num(int hw_base, num_t v, int nbits);
    for (int k = 0; 32 * k < nbits; k++) host_write(hw_base / 2 + k, v[32*k +: 32]);
  endtask

  task automatic get_num(int hw_base, int nbits, output num_t v);
    logic [31:0] d;
    v = '0;
    for (int k = 0; 32 * k < nbits; k++) begin
      host_read(hw_base / 2 + k, d);
      v[32*k +: 32] = d;
    end
    for (int i = 0; i < NB; i++) if (i >= nbits) v[i] = v[nbits-1];
  endtask

  // ---------------------------------------------------------------- one multiplication
  task automatic run_mult(int p, int cw, num_t a, num_t b, num_t m, output num_t s);
    int cpb = 32 * cw + 16;
    int nbits = p * cpb;
    num_t exp_s;
    longint t0;
    int dig0;
    put_num(int'(a_base), a, nbits);
    put_num(int'(b_base), b, nbits);
    put_num(int'(m_base), m, nbits);
    @(negedge clk);
    cfg_p = 3'(p); cfg_cw = 5'(cw); start = 1'b1;
    t0 = cycles; dig0 = n_digits;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    get_num(int'(s_base), nbits, s);
    exp_s = golden(a, b, m, nbits / 2);
    checks++;
    if (s != exp_s) begin
      failures++;
      $display("FAIL p=%0d cw=%0d: result differs from model", p, cw);
    end
    checks++;
    if (mod_red(s, m, nbits) != mod_mul(a, b, m)) begin
      failures++;
      $display("FAIL p=%0d cw=%0d: S*R - A*B not a multiple of M", p, cw);
    end
    checks++;
    if (!(s < m && s > -m)) begin
      failures++;
      $display("FAIL p=%0d cw=%0d: result out of range", p, cw);
    end
    checks++;
    if (sign_s != s[NB-1]) begin
      failures++;
      $display("FAIL p=%0d cw=%0d: sign flag %0b", p, cw, sign_s);
    end
    checks++;
    if (n_digits - dig0 != p * p * cpb / 2) begin
      failures++;
      $display("FAIL p=%0d cw=%0d: %0d digit cycles, expected %0d", p, cw,
               n_digits - dig0, p * p * cpb / 2);
    end
    if (s < 0) n_neg_result++;
    $display("p=%0d c=%0d: %0d cycles", p, 32 * cw, cycles - t0);
  endtask

  task automatic random_case(int p, int cw, int chain);
    int n = p * 32 * cw;
    num_t m, a, b, s;
    m = rand_bits(n);
    m[0] = 1'b1;
    m[n-1] = 1'b1;
    a = rand_bits(n) % m;
    b = rand_bits(n) % m;
    if ($urandom_range(2) == 32'd0) b = rand_bits(n);   // B may use its whole range |B| < 2^n
    if ($urandom_range(1) != 0) a = -a;
    if ($urandom_range(1) != 0) b = -b;
    run_mult(p, cw, a, b, m, s);
    for (int k = 0; k < chain; k++) begin
      a = s;
      if (k % 2 == 0) b = s;
      run_mult(p, cw, a, b, m, s);
    end
  endtask

  int cfg_list [][2] = '{'{1, 1}, '{2, 1}, '{3, 2}, '{4, 1}, '{2, 4}, '{1, 16},
                         '{2, 16}, '{3, 5}, '{4, 16}};

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    foreach (cfg_list[i]) random_case(cfg_list[i][0], cfg_list[i][1], 2);
    checks++;
    if (n_negpp == 0 || n_2a == 0 || n_negm == 0 || n_2m == 0 || n_hold_pp == 0 ||
        n_hold_mm == 0 || n_unshift == 0 || n_si == 0 || n_pf_overlap == 0 ||
        n_stall == 0 || n_odd_chunk == 0 || n_neg_result == 0) begin
      failures++;
      $display("FAIL: a mechanism never occurred");
    end
    $display("mechanisms: negPP=%0d 2A=%0d -M=%0d 2M=%0d holdPP=%0d holdMM=%0d unshifted=%0d",
             n_negpp, n_2a, n_negm, n_2m, n_hold_pp, n_hold_mm, n_unshift);
    $display("            SI=%0d prefetch-in-column=%0d stall=%0d odd-chunk=%0d negS=%0d",
             n_si, n_pf_overlap, n_stall, n_odd_chunk, n_neg_result);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
