// Scalable radix-4 Montgomery multiplier core: controller and data path.
//
// Computes S = (A*B + Q*M) / 2^(p*c') for an odd n-bit modulus M (n = p*c), a
// multiplicand A with -M < A < M and a multiplier B, all held in the shared data memory
// as p*c'-bit two's complement numbers cut into p extended chunks of c' = c + w/2 bits.
// B is Booth recoded (digits -2..+2) and the quotient Q is Montgomery recoded (digits
// -1..+2), so every partial product PP and modulus multiple MM is a shift and/or an
// inversion of a chunk.  The result satisfies S = A*B*2^-(p*c') mod M and -M < S < M,
// so it can be fed straight back in as an operand of the next multiplication.
//
// Processing matrix.  The work is a loop nest over p rows (one extended chunk of B each)
// and p+1 columns.  Column 0 of a row runs the c'/2 digit steps on chunk 0 of A and M,
// computes the row's quotient digits and stores them; columns 1..p-1 reuse the stored
// digits on chunks j of A and M and store chunk j-1 of the row's result; the last column
// converts what is left in the carry-save accumulator to binary with a w-bit CPA and
// stores it as the top chunk.  Every row after the first adds the previous row's result
// SI, chunk by chunk, in the first cycle of each non-last column, with PP = 0 and MM = SI.
// The accumulator is cleared only at the start of a row, so the carry of one column
// flows into the next.  In that first cycle the feedback is shifted (the column's
// previous digit leaves); in the second cycle it is not shifted, so the first digit step
// adds to SI at the same weight; every later cycle uses shifted feedback.
//
// Double buffering.  A and M each have two c'-bit registers.  While one pair serves the
// current column, a prefetcher loads the next column's chunks of A, M (and SI, once this
// column's SI cycle is over) into the other pair, using memory cycles the digit streams
// leave free.  Only the first column of a row waits for its operands, because its SI
// chunk is written by the row before.
//
// Digit streams.  B and Q are read in 16-bit (w/2) units into PISO registers, S and Q are
// collected in SIPO registers and written in 16-bit units: w/2 is the unit in which
// extended chunks are aligned in memory.  Each stream needs one access per 8 cycles; the
// reads of B and Q go in fixed slots and have priority, then pending writes, then the
// prefetcher.
//
// Low-power parts: glitch-blocking latches (transparent while clk is low) on the outputs
// of both recoders, hold flops on SEL_PP and SEL_MM, and the complementary SEL_PP code.
//
// What follows the reference: the algorithm, the recoding tables, the loop nest and its
// column/row order, the SI cycle, the shifted/unshifted feedback, the register lengths,
// the double-buffered A/M registers and single SI register, the PISO/SIPO streams, the
// pipelined CPA, the latches and hold flops.  This design's own choices: the memory
// layout (base addresses given at start, Q kept in one chunk-sized area, S computed in
// place over SI, the whole top chunk written by the CPA), 16-bit stream units, the
// access arbitration, the start/busy/done handshake, and the configuration ports.
//
// Interface: pulse start with cfg_p (1..PMAX) and cfg_cw (c/w, 1..CMAX/W) and the base
// halfword addresses; busy stays high until done pulses.  The memory port is owned by
// the core while busy.  sign_s and ms1b_s are the two highest bits of the last row's
// result (sign and the bit below it).
module montmul_core
  import mm_pkg::*;
#(
  parameter int unsigned W    = W_DEF,
  parameter int unsigned CMAX = CMAX_DEF,
  parameter int unsigned PMAX = PMAX_DEF,
  parameter int unsigned AW   = $clog2(MEM_BYTES_DEF / 2),
  localparam int unsigned CP    = CMAX + W / 2,
  localparam int unsigned CWMAX = CMAX / W,
  localparam int unsigned CWB   = $clog2(CWMAX + 1),
  localparam int unsigned PB    = $clog2(PMAX + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [PB-1:0] cfg_p,
  input  logic [CWB-1:0] cfg_cw,
  input  logic [AW-1:0] a_base,
  input  logic [AW-1:0] b_base,
  input  logic [AW-1:0] m_base,
  input  logic [AW-1:0] s_base,
  input  logic [AW-1:0] q_base,
  output logic          busy,
  output logic          done,
  output logic          sign_s,
  output logic          ms1b_s,
  output logic          mem_en,
  output logic          mem_we,
  output logic [1:0]    mem_be,
  output logic [AW-1:0] mem_addr,
  output logic [W-1:0]  mem_wdata,
  input  logic [W-1:0]  mem_rdata
);
  localparam int unsigned HW  = W / 2;
  localparam int unsigned SBW = (CWMAX + 1) * W;   // staging buffer for one chunk

  typedef enum logic [1:0] { T_NONE, T_B, T_Q, T_PF } rtag_e;
  typedef enum logic [1:0] { OP_A, OP_M, OP_SI } pfop_e;

  mm_state_e state;

  // configuration
  logic [PB-1:0]  p_q;
  logic [CWB-1:0] cw_q;
  logic [AW-1:0]  ab_q, bb_q, mb_q, sb_q, qb_q;
  logic [AW-1:0]  hchunk;      // halfwords per extended chunk: 2*cw + 1
  int unsigned    cp_bits;     // c' = w*cw + w/2

  always_comb begin
    hchunk  = AW'(2 * cw_q + 1);
    cp_bits = W * cw_q + HW;
  end

  // loop indices
  logic [PB-1:0] row, col;
  logic [AW-1:0] hw;           // halfword (8 digits) within the chunk
  logic [2:0]    dg;           // digit within the halfword
  logic [1:0]    setup_cnt;
  logic [CWB-1:0] cpa_k;

  // operand registers: double-buffered A and M, single SI
  logic [CP-1:0] a_reg [2];
  logic [CP-1:0] m_reg [2];
  logic          a_sgn [2];
  logic [CP-1:0] si_reg;
  logic          si_sgn;
  logic          act;

  // ---------------------------------------------------------------- data path
  logic          acc_clr, acc_en, sft_fb;
  logic [CP+3:0] acc_c;
  logic [CP+2:0] acc_s;
  logic [2:0]    acc_l;
  logic [1:0]    b_dig, q_dig;
  logic          b_prev, row_lb, row_lb_nxt;
  logic          booth_en, mr_en, mr_si, mr_calc;

  sel_pp_e sel_pp_r, sel_pp_l;
  logic    en_pp_r, neg_pp_r, en_pp_l, neg_pp_l;
  sel_mm_e sel_mm_r, sel_mm_l;
  logic    en_mm_r, neg_mm_r, en_mm_l, neg_mm_l;
  logic [1:0] sp, qo;
  logic [CP+1:0] pp, mm;

  booth_recoder u_booth (
    .clk, .rst_n, .en(booth_en), .b1(b_dig[1]), .b0(b_dig[0]), .bm1(b_prev),
    .sel_pp(sel_pp_r), .en_pp(en_pp_r), .neg_pp(neg_pp_r)
  );

  logic [3:0] gb_pp_q, gb_mm_q;

  glitch_blocker #(.WIDTH(4)) u_gb_pp (
    .clk, .d({sel_pp_r, en_pp_r, neg_pp_r}), .q(gb_pp_q)
  );

  always_comb begin
    sel_pp_l = sel_pp_e'(gb_pp_q[3:2]);
    en_pp_l  = gb_pp_q[1];
    neg_pp_l = gb_pp_q[0];
  end

  pp_generator #(.CP(CP)) u_ppg (
    .a(a_reg[act]), .sign_a(a_sgn[act]), .sel_pp(sel_pp_l), .en_pp(en_pp_l), .pp(pp)
  );

  sp_generator u_spg (
    .sft_fb, .pp(pp[1:0]), .neg_pp(neg_pp_l), .acc_c(acc_c[1:0]), .acc_s(acc_s[1:0]),
    .acc_l, .sp
  );

  montg_recoder u_montg (
    .clk, .rst_n, .en(mr_en), .si_cycle(mr_si), .si_en(row != '0), .calc(mr_calc),
    .sp, .m1(m_reg[act][1]), .qi(q_dig), .qo,
    .sel_mm(sel_mm_r), .en_mm(en_mm_r), .neg_mm(neg_mm_r)
  );

  glitch_blocker #(.WIDTH(4)) u_gb_mm (
    .clk, .d({sel_mm_r, en_mm_r, neg_mm_r}), .q(gb_mm_q)
  );

  always_comb begin
    sel_mm_l = sel_mm_e'(gb_mm_q[3:2]);
    en_mm_l  = gb_mm_q[1];
    neg_mm_l = gb_mm_q[0];
  end

  mm_generator #(.CP(CP)) u_mmg (
    .m(m_reg[act]), .si(si_reg), .sign_si(si_sgn), .sel_mm(sel_mm_l), .en_mm(en_mm_l), .mm(mm)
  );

  csa_accumulator #(.CP(CP)) u_acc (
    .clk, .rst_n, .clr(acc_clr), .en(acc_en), .sft_fb, .pp, .mm,
    .neg_pp(neg_pp_l), .neg_mm(neg_mm_l), .acc_c, .acc_s, .acc_l
  );

  // digit streams
  logic          b_load, q_load, dig_shift;
  logic [HW-1:0] b_next, q_next;

  piso_reg #(.WIDTH(HW)) u_bi (
    .clk, .rst_n, .load(b_load), .shift(dig_shift), .din(b_next), .dout(b_dig)
  );
  piso_reg #(.WIDTH(HW)) u_qi (
    .clk, .rst_n, .load(q_load), .shift(dig_shift), .din(q_next), .dout(q_dig)
  );

  logic          dig_q, col0_q;
  logic [1:0]    qo_q;
  logic [HW-1:0] so_word, qo_word;

  sipo_reg #(.WIDTH(HW)) u_so (
    .clk, .rst_n, .shift(dig_q && !col0_q), .din(acc_l[1:0]), .q(so_word)
  );
  sipo_reg #(.WIDTH(HW)) u_qo (
    .clk, .rst_n, .shift(dig_q && col0_q), .din(qo_q), .q(qo_word)
  );

  // RR2CR conversion
  logic [SBW-1:0] c_ext, s_ext;
  logic           cpa_step;
  logic [W-1:0]   zo;
  logic           zo_valid;
  logic [CWB-1:0] zk_q;

  always_comb begin
    c_ext = {{(SBW - CP - 4){acc_c[CP+3]}}, acc_c};
    s_ext = {{(SBW - CP - 3){acc_s[CP+2]}}, acc_s};
  end

  rr2cr_cpa #(.W(W)) u_cpa (
    .clk, .rst_n, .step(cpa_step), .first(cpa_k == '0), .cin0(acc_l[2]),
    .a(c_ext[W*cpa_k +: W]), .b(s_ext[W*cpa_k +: W]), .zo, .zo_valid
  );

  // ---------------------------------------------------------------- memory access
  logic          eng_rd;
  rtag_e         eng_tag, rtag_q;
  logic [AW-1:0] eng_addr;

  logic          wr_pend, wr_serve;
  logic [AW-1:0] wr_addr;
  logic [W-1:0]  wr_data;
  logic [1:0]    wr_be;
  logic          post1, post2;
  logic [AW-1:0] post_addr1, post_addr2;
  logic          post_col0_1, post_col0_2;

  logic          pf_busy, pf_ready, pf_fin, pf_rd, si_used;
  pfop_e         pf_op;
  logic [PB-1:0] pf_row, pf_col;
  logic [CWB-1:0] pf_iss, pf_ret;
  logic [SBW-1:0] stage;
  logic [AW-1:0] pf_base;

  logic last_hw;
  always_comb last_hw = (hw == hchunk - 1'b1);

  // engine reads: first B/Q units in setup, then one unit ahead in fixed digit slots
  always_comb begin
    eng_rd   = 1'b0;
    eng_tag  = T_NONE;
    eng_addr = '0;
    if (state == S_SETUP && setup_cnt == 2'd0) begin
      eng_rd = 1'b1; eng_tag = T_B;
      eng_addr = bb_q + AW'(row * hchunk);
    end else if (state == S_SETUP && setup_cnt == 2'd1 && col != '0) begin
      eng_rd = 1'b1; eng_tag = T_Q;
      eng_addr = qb_q;
    end else if (state == S_DIGIT && dg == 3'd0 && !last_hw) begin
      eng_rd = 1'b1; eng_tag = T_B;
      eng_addr = bb_q + AW'(row * hchunk) + hw + 1'b1;
    end else if (state == S_DIGIT && dg == 3'd1 && !last_hw && col != '0) begin
      eng_rd = 1'b1; eng_tag = T_Q;
      eng_addr = qb_q + hw + 1'b1;
    end
  end

  always_comb begin
    unique case (pf_op)
      OP_A:    pf_base = ab_q;
      OP_M:    pf_base = mb_q;
      default: pf_base = sb_q;
    endcase
    wr_serve = wr_pend && !eng_rd;
    pf_rd    = pf_busy && !pf_fin && !eng_rd && !wr_pend && (pf_iss <= cw_q) &&
               (pf_op != OP_SI || si_used);
    mem_en    = eng_rd || wr_serve || pf_rd;
    mem_we    = wr_serve;
    mem_be    = wr_be;
    mem_wdata = wr_data;
    if (eng_rd)        mem_addr = eng_addr;
    else if (wr_serve) mem_addr = wr_addr;
    else               mem_addr = pf_base + AW'(pf_col * hchunk) + AW'(2 * pf_iss);
  end

  // chunk of the staging buffer, cut to c' bits and extended to the register length
  function automatic logic [CP:0] chunk_ext(input logic [SBW-1:0] buf_v,
                                            input int unsigned len, input logic top);
    logic [CP:0] v;
    logic        fill;
    fill = top ? buf_v[len-1] : 1'b0;
    for (int i = 0; i <= CP; i++) v[i] = (i < len) ? buf_v[i] : fill;
    return v;
  endfunction

  logic [CP:0] pf_val;
  always_comb pf_val = chunk_ext(stage, cp_bits, pf_col == p_q - 1'b1);

  // ---------------------------------------------------------------- control signals
  always_comb begin
    acc_clr   = (state == S_PFWAIT) && pf_ready && (col == '0);
    acc_en    = (state == S_SILOAD) || (state == S_DIGIT);
    sft_fb    = !((state == S_DIGIT) && (hw == '0) && (dg == 3'd0));
    booth_en  = (state == S_DIGIT);
    mr_en     = (state == S_DIGIT);
    mr_si     = (state == S_SILOAD);
    mr_calc   = (col == '0);
    dig_shift = (state == S_DIGIT) && !(dg == 3'd7);
    b_load    = ((state == S_SETUP) && (setup_cnt == 2'd3)) ||
                ((state == S_DIGIT) && (dg == 3'd7) && !last_hw);
    q_load    = b_load;
    cpa_step  = (state == S_CPA);
    busy      = (state != S_IDLE);
  end

  // ---------------------------------------------------------------- sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      p_q <= '0; cw_q <= '0;
      ab_q <= '0; bb_q <= '0; mb_q <= '0; sb_q <= '0; qb_q <= '0;
      row <= '0; col <= '0; hw <= '0; dg <= '0; setup_cnt <= '0; cpa_k <= '0;
      act <= 1'b0;
      a_reg[0] <= '0; a_reg[1] <= '0; m_reg[0] <= '0; m_reg[1] <= '0;
      a_sgn[0] <= 1'b0; a_sgn[1] <= 1'b0;
      si_reg <= '0; si_sgn <= 1'b0;
      b_prev <= 1'b0; row_lb <= 1'b0; row_lb_nxt <= 1'b0;
      b_next <= '0; q_next <= '0;
      rtag_q <= T_NONE;
      dig_q <= 1'b0; col0_q <= 1'b0; qo_q <= '0;
      post1 <= 1'b0; post2 <= 1'b0; post_addr1 <= '0; post_addr2 <= '0;
      post_col0_1 <= 1'b0; post_col0_2 <= 1'b0;
      wr_pend <= 1'b0; wr_addr <= '0; wr_data <= '0; wr_be <= '0;
      pf_busy <= 1'b0; pf_ready <= 1'b0; pf_fin <= 1'b0; si_used <= 1'b0;
      pf_op <= OP_A; pf_row <= '0; pf_col <= '0; pf_iss <= '0; pf_ret <= '0;
      stage <= '0;
      zk_q <= '0;
      sign_s <= 1'b0; ms1b_s <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;

      // ---- read returns
      rtag_q <= pf_rd ? T_PF : (eng_rd ? eng_tag : T_NONE);
      unique case (rtag_q)
        T_B:  b_next <= mem_rdata[HW-1:0];
        T_Q:  q_next <= mem_rdata[HW-1:0];
        T_PF: stage[W*pf_ret +: W] <= mem_rdata;
        default: ;
      endcase

      // ---- prefetcher
      if (pf_rd) pf_iss <= pf_iss + 1'b1;
      if (rtag_q == T_PF) begin
        pf_ret <= pf_ret + 1'b1;
        if (pf_ret == cw_q) pf_fin <= 1'b1;
      end
      if (pf_fin) begin
        pf_fin <= 1'b0;
        pf_iss <= '0;
        pf_ret <= '0;
        unique case (pf_op)
          OP_A: begin
            a_reg[~act] <= pf_val[CP-1:0];
            a_sgn[~act] <= pf_val[CP];
            pf_op <= OP_M;
          end
          OP_M: begin
            m_reg[~act] <= pf_val[CP-1:0];
            if (pf_row != '0) pf_op <= OP_SI;
            else begin pf_busy <= 1'b0; pf_ready <= 1'b1; end
          end
          default: begin
            si_reg  <= pf_val[CP-1:0];
            si_sgn  <= pf_val[CP];
            pf_busy <= 1'b0;
            pf_ready <= 1'b1;
          end
        endcase
      end

      // ---- output digit streams (one cycle behind the digit steps)
      dig_q  <= (state == S_DIGIT);
      col0_q <= (col == '0);
      qo_q   <= qo;
      post1  <= (state == S_DIGIT) && (dg == 3'd7);
      post_addr1  <= ((col == '0) ? qb_q : (sb_q + AW'((AW'(col) - 1'b1) * hchunk))) + hw;
      post_col0_1 <= (col == '0);
      post2 <= post1;
      post_addr2  <= post_addr1;
      post_col0_2 <= post_col0_1;

      // ---- pending write: digit stream units and CPA words
      if (post2) begin
        wr_pend <= 1'b1;
        wr_addr <= post_addr2;
        wr_data <= {{(W-HW){1'b0}}, (post_col0_2 ? qo_word : so_word)};
        wr_be   <= 2'b01;
      end else if (zo_valid) begin
        wr_pend <= 1'b1;
        wr_addr <= sb_q + AW'((AW'(p_q) - 1'b1) * hchunk) + AW'(2 * zk_q);
        wr_data <= zo;
        wr_be   <= (zk_q == cw_q) ? 2'b01 : 2'b11;
      end else if (wr_serve) begin
        wr_pend <= 1'b0;
      end

      // sign of the row result (top bit of the top chunk) and the bit below it, bit
      // p*c - (p-1)*c' of the top chunk (inside the top chunk whenever c >= (p-1)*w/2)
      if (zo_valid) begin
        if (zk_q == cw_q) sign_s <= zo[HW-1];
        for (int i = 0; i < W; i++)
          if (W * zk_q + i == cp_bits - HW * p_q) ms1b_s <= zo[i];
      end
      zk_q <= cpa_k;

      // ---- main loop
      unique case (state)
        S_IDLE: if (start) begin
          p_q <= cfg_p; cw_q <= cfg_cw;
          ab_q <= a_base; bb_q <= b_base; mb_q <= m_base; sb_q <= s_base; qb_q <= q_base;
          row <= '0; col <= '0; row_lb <= 1'b0;
          pf_busy <= 1'b1; pf_ready <= 1'b0; pf_op <= OP_A;
          pf_row <= '0; pf_col <= '0; pf_iss <= '0; pf_ret <= '0; pf_fin <= 1'b0;
          si_used <= 1'b1;
          state <= S_PFWAIT;
        end

        S_PFWAIT: if (pf_ready) begin
          act <= ~act;
          pf_ready <= 1'b0;
          si_used <= 1'b0;
          if (col + 1'b1 < p_q) begin
            pf_busy <= 1'b1; pf_op <= OP_A; pf_row <= row; pf_col <= col + 1'b1;
          end
          setup_cnt <= '0;
          state <= S_SETUP;
        end

        S_SETUP: begin
          setup_cnt <= setup_cnt + 1'b1;
          if (setup_cnt == 2'd3) state <= S_SILOAD;
        end

        S_SILOAD: begin
          si_used <= 1'b1;
          b_prev <= row_lb;
          hw <= '0; dg <= '0;
          state <= S_DIGIT;
        end

        S_DIGIT: begin
          b_prev <= b_dig[1];
          dg <= dg + 1'b1;
          if (dg == 3'd7) begin
            hw <= hw + 1'b1;
            if (last_hw) begin
              if (col == '0) row_lb_nxt <= b_dig[1];
              state <= S_COLEND;
            end
          end
        end

        S_COLEND: if (!dig_q && !post1 && !post2 && !wr_pend) begin
          if (col + 1'b1 < p_q) begin
            col <= col + 1'b1;
            state <= S_PFWAIT;
          end else begin
            cpa_k <= '0;
            if (row + 1'b1 < p_q) begin
              pf_busy <= 1'b1; pf_op <= OP_A; pf_row <= row + 1'b1; pf_col <= '0;
            end
            state <= S_CPA;
          end
        end

        S_CPA: begin
          cpa_k <= cpa_k + 1'b1;
          if (cpa_k == cw_q) state <= S_CPAEND;
        end

        S_CPAEND: if (!zo_valid && !wr_pend) begin
          if (row + 1'b1 < p_q) begin
            row <= row + 1'b1;
            col <= '0;
            row_lb <= row_lb_nxt;
            state <= S_PFWAIT;
          end else begin
            state <= S_DONE;
          end
        end

        S_DONE: begin
          done <= 1'b1;
          state <= S_IDLE;
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  // the digits leaving the accumulator in the first column are zero by choice of Q
  a_q_zero: assert property (@(posedge clk) disable iff (!rst_n)
                             (dig_q && col0_q) |-> (acc_l[1:0] == 2'b00));
  // a new write is never posted while one is still waiting
  a_wr_ovf: assert property (@(posedge clk) disable iff (!rst_n)
                             (post2 || zo_valid) |-> (!wr_pend || wr_serve));

endmodule
