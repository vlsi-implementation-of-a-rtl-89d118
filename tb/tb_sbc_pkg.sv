// tb_sbc_pkg - test programs and reference model shared by the testbenches.
//
// cp_filter_prog builds a CP microprogram computing a 6-tap (two
// cross-section) analysis lattice filter on a stream of 16-bit samples:
// cross-section 0 on VF, cross-section 1 on HF, the final add/subtract on the
// adder-subtractor and the output scaling on the 10x16 multiplier. It uses a
// split bus and the HF-to-adder direct link. tp_stream_prog builds a TP
// program that feeds the CP from the video input by interrupt, stores the
// CP results two per memory word, counts lines by interrupt and finally
// plays the stored results back on the video output. ref_filter computes
// the expected results with plain integer arithmetic.
package tb_sbc_pkg;
  import sbc_pkg::*;

  typedef instr_t prog_t[$];

  // filter coefficients used by the tests (Q2.6 rho, Q2.8 scaling)
  localparam int RHO0 = 45;     // 0.703
  localparam int RHO1 = -83;    // -1.297
  localparam int CL   = 181;    // 0.707
  localparam int CH   = 362;    // 1.414
  localparam int SHIFT = 6;

  function automatic cp_exec_t nop_f();
    cp_exec_t f = '0;
    return f;
  endfunction

  // One pair of input samples -> one (low, high) output pair, 15 EXEC cycles.
  function automatic prog_t cp_pair_body();
    prog_t p;
    cp_exec_t f [15];
    for (int i = 0; i < 15; i++) f[i] = '0;
    f[0].vf.x_ld = 1;  f[0].fin_pop = 1;             // X = x(2n)   (low)
    f[1].vf.x_ld = 1;  f[1].fin_pop = 1;             // X = x(2n+1) (up)
    f[2].vf.add_delay = 0;                           // S = up + rho0*low
    f[3].vf.add_delay = 1; f[3].vf.rf_we = 1;        // S = low + rho0*up, store u1
    f[4].vf.rf_we = 1;                               // store l1
    f[5].hf.x_ld = 1;  f[5].vf.rd_nxt = 1;           // HF X = l1(n-1)
    f[6].hf.x_ld = 1;  f[6].vf.rd_nxt = 1;           // HF X = u1(n)
    f[7].hf.add_delay = 0;
    f[8].hf.add_delay = 1; f[8].hf.rf_we = 1;        // store u2
    f[9].hf.rf_we = 1;                               // store l2
    f[10].add_lda = 1; f[10].hf.rd_nxt = 1;          // A = l2(n-1)
    f[11].add_op = AS_ADD;                           // low  = u2 + l2(n-1)
    f[12].add_op = AS_RSUB; f[12].hf.rd_nxt = 1;     // high = u2 - l2(n-1)
    f[12].mul_ld = 1; f[12].mul_coef = 2'd0;         // scale low
    f[13].mul_ld = 1; f[13].mul_coef = 2'd1;         // scale high
    f[13].fout_push = 1;                             // push scaled low
    f[14].fout_push = 1;                             // push scaled high
    foreach (f[i]) p.push_back(cp_exec(f[i]));
    return p;
  endfunction

  function automatic prog_t cp_setup();
    prog_t p;
    bus_cfg_t b0, b1, b2;
    b0 = '{split: 1'b1, drv0: SRC_FIN, drv1: SRC_ADD};   // FIN->VF | ADD->MUL
    b1 = '{split: 1'b0, drv0: SRC_VF,  drv1: SRC_NONE};  // VF->HF
    b2 = '{split: 1'b0, drv0: SRC_MUL, drv1: SRC_NONE};  // MUL->FIFO out
    p.push_back(cp_conf(CG_BUS, 4'd0, 13'(b0)));
    p.push_back(cp_conf(CG_BUS, 4'd1, 13'(b1)));
    p.push_back(cp_conf(CG_BUS, 4'd2, 13'(b2)));
    p.push_back(cp_conf(CG_DST, 4'(DST_FOUT), 13'd2));
    p.push_back(cp_conf(CG_DST, 4'(DST_VF),   13'd0));
    p.push_back(cp_conf(CG_DST, 4'(DST_MUL),  13'd0));
    p.push_back(cp_conf(CG_DST, 4'(DST_ADDA), 13'(LINK_DIRECT)));
    p.push_back(cp_conf(CG_DST, 4'(DST_ADDB), 13'(LINK_DIRECT)));
    p.push_back(cp_conf(CG_DST, 4'(DST_HF),   13'd1));
    p.push_back(cp_conf(CG_VF_RHO,   4'd0, 13'(RHO0 & 8'hFF)));
    p.push_back(cp_conf(CG_VF_SHIFT, 4'd0, 13'(SHIFT)));
    p.push_back(cp_conf(CG_HF_RHO,   4'd0, 13'(RHO1 & 8'hFF)));
    p.push_back(cp_conf(CG_HF_SHIFT, 4'd0, 13'(SHIFT)));
    p.push_back(cp_conf(CG_SCALE,    4'd0, 13'(CL)));
    p.push_back(cp_conf(CG_SCALE,    4'd1, 13'(CH)));
    p.push_back(cp_conf(CG_VF_CFG,   4'd0, 13'd0));
    p.push_back(cp_conf(CG_HF_CFG,   4'd0, 13'd0));
    p.push_back(cp_conf(CG_VF_PTR,   4'd0, 13'd15));   // wp 0, rp 15
    p.push_back(cp_conf(CG_HF_PTR,   4'd0, 13'd15));
    return p;
  endfunction

  // nlines x npairs pairs, as two nested hardware loops
  function automatic prog_t cp_filter_prog(int nlines, int npairs);
    prog_t p, body;
    int outer_at, inner_last;
    p = cp_setup();
    body = cp_pair_body();
    outer_at   = p.size();
    inner_last = outer_at + 2 + body.size() - 1;
    p.push_back(seq_loop(8'(nlines), 8'(inner_last + 1)));
    p.push_back(seq_loop(8'(npairs), 8'(inner_last)));
    foreach (body[i]) p.push_back(body[i]);
    p.push_back(cp_exec(nop_f()));                     // outer loop tail
    p.push_back(seq_halt());
    return p;
  endfunction

  // The same filter, software-pipelined: a new pair starts every 3 EXEC
  // cycles (the adder-subtractor, with its load, add and subtract per pair,
  // is the busiest resource). Pair n occupies offsets t = 0..10 from its
  // start; pipe_ops adds to f the operations of offset t. The program has a
  // prologue and an epilogue of three periods each, in which only the pairs
  // that exist contribute, and a 3-word steady-state body run by hardware
  // loops. When the body count exceeds one loop counter it is split over two
  // nested loops; the outer loop's last word is a CONF that rewrites an
  // unchanged coefficient, so it does not advance the pipelines.
  function automatic void pipe_ops(int t, ref cp_exec_t f);
    case (t)
      0: begin f.vf.x_ld = 1; f.fin_pop = 1; end
      1: begin f.vf.x_ld = 1; f.fin_pop = 1; end
      3: begin f.vf.add_delay = 1; f.vf.rf_we = 1; f.hf.x_ld = 1; f.vf.rd_nxt = 1; end
      4: begin f.vf.rf_we = 1; f.hf.x_ld = 1; f.vf.rd_nxt = 1; end
      6: begin f.hf.add_delay = 1; f.hf.rf_we = 1; f.add_lda = 1; f.hf.rd_nxt = 1; end
      7: begin f.hf.rf_we = 1; f.add_op = AS_ADD; end
      8: begin f.add_op = AS_RSUB; f.hf.rd_nxt = 1; f.mul_ld = 1; f.mul_coef = 2'd0; end
      9: begin f.mul_ld = 1; f.mul_coef = 2'd1; f.fout_push = 1; end
      10: f.fout_push = 1;
      default: ;
    endcase
  endfunction

  localparam int PIPE_II = 3;      // cycles per pair in steady state
  localparam int PIPE_DEPTH = 4;   // periods spanned by one pair

  // word of period k, phase ph, for a stream of npairs pairs
  function automatic instr_t pipe_word(int k, int ph, int npairs);
    cp_exec_t f = '0;
    for (int j = 0; j < PIPE_DEPTH; j++)
      if (k - j >= 0 && k - j < npairs) pipe_ops(PIPE_II * j + ph, f);
    return cp_exec(f);
  endfunction

  // npairs >= PIPE_DEPTH; (npairs - PIPE_DEPTH + 1) must be at most 255 or
  // have a divisor that makes both loop counts fit in 8 bits
  function automatic prog_t cp_pipe_prog(int npairs);
    prog_t p;
    int steady, outer, inner, at;
    p = cp_setup();
    // periods 0..PIPE_DEPTH-2: prologue
    for (int k = 0; k < PIPE_DEPTH - 1; k++)
      for (int ph = 0; ph < PIPE_II; ph++) p.push_back(pipe_word(k, ph, npairs));
    // periods PIPE_DEPTH-1 .. npairs-1: steady state, all words identical
    steady = npairs - PIPE_DEPTH + 1;
    outer = 1;
    while (steady / outer > 255 || steady % outer != 0) outer++;
    inner = steady / outer;
    at = p.size();
    if (outer > 1) begin
      p.push_back(seq_loop(8'(outer), 8'(at + 2 + PIPE_II)));
      at++;
    end
    p.push_back(seq_loop(8'(inner), 8'(at + PIPE_II)));
    for (int ph = 0; ph < PIPE_II; ph++) p.push_back(pipe_word(PIPE_DEPTH - 1, ph, npairs));
    if (outer > 1) p.push_back(cp_conf(CG_SCALE, 4'd0, 13'(CL)));
    // periods npairs .. npairs+PIPE_DEPTH-2: epilogue
    for (int k = npairs; k < npairs + PIPE_DEPTH - 1; k++)
      for (int ph = 0; ph < PIPE_II; ph++) p.push_back(pipe_word(k, ph, npairs));
    p.push_back(seq_halt());
    return p;
  endfunction

  // ---------------------------------------------------------------------
  // 8-tap filter (three cross-sections) entirely on HF, one pair every
  // L-2 = 6 cycles. HF's register file runs in split mode: the feedback
  // half holds up0,low0,up1,low1 of each pair, and section s+1 reads
  // low_s(n-1) at rpf and up_s(n) at rpf+3; the final half holds up2,low2
  // for the adder. Pair n starts at 6n; its sections start at offsets 0, 4
  // and 8, so in steady state the resource runs s0(n), s2(n-1), s1(n) and
  // the rho bank holds rho0, rho2, rho1 in that order (final index 1).
  // ---------------------------------------------------------------------
  localparam int RHO2 = 20;        // 0.3125
  localparam int P8_II = 6;
  localparam int P8_DEPTH = 3;

  function automatic void pipe8_ops(int t, ref cp_exec_t f);
    case (t)
      0, 1: begin f.hf.x_ld = 1; f.fin_pop = 1; end
      2, 6, 10: f.hf.rho_nxt = 1;
      3, 7: begin f.hf.add_delay = 1; f.hf.rf_we = 1; end
      4: begin f.hf.rf_we = 1; f.hf.x_ld = 1; f.hf.x_from_rf = 1; end
      5, 9: begin f.hf.x_ld = 1; f.hf.x_from_rf = 1; end
      8: begin f.hf.rf_we = 1; f.hf.x_ld = 1; f.hf.x_from_rf = 1; end
      11: begin f.hf.add_delay = 1; f.hf.rf_we = 1; f.add_lda = 1; f.hf.rd_nxt = 1; end
      12: begin f.hf.rf_we = 1; f.add_op = AS_ADD; end
      13: begin f.add_op = AS_RSUB; f.hf.rd_nxt = 1; f.mul_ld = 1; f.mul_coef = 2'd0; end
      14: begin f.mul_ld = 1; f.mul_coef = 2'd1; f.fout_push = 1; end
      15: f.fout_push = 1;
      default: ;
    endcase
  endfunction

  function automatic instr_t pipe8_word(int k, int ph, int npairs);
    cp_exec_t f = '0;
    for (int j = 0; j < P8_DEPTH; j++) begin
      int n = k - j, t = P8_II * j + ph;
      if (n >= 0 && n < npairs) pipe8_ops(t, f);
      // empty slots before the first and after the last pair still step
      // the coefficient pointer, so that it stays in phase
      else if ((n == -1 && t == 10) || (n >= npairs && t % 4 == 2)) f.hf.rho_nxt = 1;
    end
    return cp_exec(f);
  endfunction

  function automatic prog_t cp_setup8();
    prog_t p;
    bus_cfg_t b0, b1, b2;
    b0 = '{split: 1'b0, drv0: SRC_FIN,  drv1: SRC_NONE};  // FIN->HF
    b1 = '{split: 1'b1, drv0: SRC_NONE, drv1: SRC_ADD};   // ADD->MUL
    b2 = '{split: 1'b0, drv0: SRC_MUL,  drv1: SRC_NONE};  // MUL->FIFO out
    p.push_back(cp_conf(CG_BUS, 4'd0, 13'(b0)));
    p.push_back(cp_conf(CG_BUS, 4'd1, 13'(b1)));
    p.push_back(cp_conf(CG_BUS, 4'd2, 13'(b2)));
    p.push_back(cp_conf(CG_DST, 4'(DST_FOUT), 13'd2));
    p.push_back(cp_conf(CG_DST, 4'(DST_MUL),  13'd1));
    p.push_back(cp_conf(CG_DST, 4'(DST_ADDA), 13'(LINK_DIRECT)));
    p.push_back(cp_conf(CG_DST, 4'(DST_ADDB), 13'(LINK_DIRECT)));
    p.push_back(cp_conf(CG_DST, 4'(DST_HF),   13'd0));
    p.push_back(cp_conf(CG_HF_RHO,   4'd0, 13'(RHO0 & 8'hFF)));
    p.push_back(cp_conf(CG_HF_RHO,   4'd1, 13'(RHO2 & 8'hFF)));
    p.push_back(cp_conf(CG_HF_RHO,   4'd2, 13'(RHO1 & 8'hFF)));
    for (int i = 0; i < 3; i++) p.push_back(cp_conf(CG_HF_SHIFT, 4'(i), 13'(SHIFT)));
    p.push_back(cp_conf(CG_SCALE,    4'd0, 13'(CL)));
    p.push_back(cp_conf(CG_SCALE,    4'd1, 13'(CH)));
    // last rho index 2, split, feedback offset 3, final section index 1
    p.push_back(cp_conf(CG_HF_CFG, 4'd0, 13'(2 | (1 << 4) | (3 << 5) | (1 << 9))));
    // wp 0, rp 15 (final half, entry 7), rpf 5, wpo 0
    p.push_back(cp_conf(CG_HF_PTR, 4'd0, 13'(15 | (5 << 4))));
    return p;
  endfunction

  // npairs >= P8_DEPTH and npairs - P8_DEPTH + 1 <= 255
  function automatic prog_t cp_pipe8_prog(int npairs);
    prog_t p;
    int at;
    p = cp_setup8();
    for (int k = 0; k < P8_DEPTH - 1; k++)
      for (int ph = 0; ph < P8_II; ph++) p.push_back(pipe8_word(k, ph, npairs));
    at = p.size();
    p.push_back(seq_loop(8'(npairs - P8_DEPTH + 1), 8'(at + P8_II)));
    for (int ph = 0; ph < P8_II; ph++) p.push_back(pipe8_word(P8_DEPTH - 1, ph, npairs));
    for (int k = npairs; k < npairs + P8_DEPTH - 1; k++)
      for (int ph = 0; ph < P8_II; ph++) p.push_back(pipe8_word(k, ph, npairs));
    p.push_back(seq_halt());
    return p;
  endfunction

  // ---------------------------------------------------------------------
  // Synthesis (decoding) of the 6-tap analysis output. Per step m it takes
  // the scaled pair (lo(m), hi(m)) and works backwards through the filter:
  //   multiplier  a = C_LO*lo, b = C_HI*hi  (undo the output scaling and
  //               pre-apply the gain lost in the inverse cross-sections)
  //   adder       L = a - b = K*l2(m-1), then U = a + b = K*u2(m); the
  //               result register keeps U until the next step, which gives
  //               the one-pair delay of the upper branch
  //   HF          inverse of section 1 with -rho1 on (U(m-1), L): results
  //               K'*l1(m-2), K'*u1(m-1), shift 5 (gain 2)
  //   VF          inverse of section 0 with -rho0 on (u1(m-2), l1(m-2)) read
  //               back from HF in order: x(2m-4), x(2m-3)
  // 14 cycles per step; the output lags the input by two pairs. Each
  // inverse section is a normal cross-section whose two inputs enter in the
  // opposite roles, since the section is symmetric in them.
  // ---------------------------------------------------------------------
  localparam int C_LO = -262;      // -1.023 (Q2.8), 2 x C_HI as CH = 2 x CL
  localparam int C_HI = -131;      // -0.512
  localparam int SYN_SHIFT_HF = 5;

  function automatic prog_t cp_synth_body();
    prog_t p;
    cp_exec_t f [14];
    for (int i = 0; i < 14; i++) f[i] = '0;
    f[0].mul_ld = 1; f[0].mul_coef = 2'd0; f[0].fin_pop = 1;    // a
    f[1].mul_ld = 1; f[1].mul_coef = 2'd1; f[1].fin_pop = 1;    // b
    f[1].add_lda = 1;                                           // A = a
    f[2].hf.x_ld = 1; f[2].add_op = AS_SUB;                     // X = U(m-1); L
    f[3].hf.x_ld = 1; f[3].add_op = AS_ADD;                     // X = L; U(m)
    f[5].hf.add_delay = 1; f[5].hf.rf_we = 1;                   // l1(m-2)
    f[6].hf.rf_we = 1;                                          // u1(m-1)
    f[7].vf.x_ld = 1; f[7].hf.rd_nxt = 1;                       // X = u1(m-2)
    f[8].vf.x_ld = 1; f[8].hf.rd_nxt = 1;                       // X = l1(m-2)
    f[10].vf.add_delay = 1; f[10].vf.rf_we = 1;                 // x(2j)
    f[11].vf.rf_we = 1;                                         // x(2j+1)
    f[12].fout_push = 1; f[12].vf.rd_nxt = 1;
    f[13].fout_push = 1; f[13].vf.rd_nxt = 1;
    foreach (f[i]) p.push_back(cp_exec(f[i]));
    return p;
  endfunction

  function automatic prog_t cp_synth_prog(int npairs);
    prog_t p, body;
    bus_cfg_t b0, b1, b2;
    b0 = '{split: 1'b0, drv0: SRC_FIN, drv1: SRC_NONE};   // FIN->MUL
    b1 = '{split: 1'b1, drv0: SRC_VF,  drv1: SRC_MUL};    // VF->FOUT | MUL->ADD
    b2 = '{split: 1'b0, drv0: SRC_HF,  drv1: SRC_NONE};   // HF->VF
    p.push_back(cp_conf(CG_BUS, 4'd0, 13'(b0)));
    p.push_back(cp_conf(CG_BUS, 4'd1, 13'(b1)));
    p.push_back(cp_conf(CG_BUS, 4'd2, 13'(b2)));
    p.push_back(cp_conf(CG_DST, 4'(DST_MUL),  13'd0));
    p.push_back(cp_conf(CG_DST, 4'(DST_ADDA), 13'd1));
    p.push_back(cp_conf(CG_DST, 4'(DST_ADDB), 13'd1));
    p.push_back(cp_conf(CG_DST, 4'(DST_HF),   13'(LINK_DIRECT)));
    p.push_back(cp_conf(CG_DST, 4'(DST_VF),   13'd2));
    p.push_back(cp_conf(CG_DST, 4'(DST_FOUT), 13'd1));
    p.push_back(cp_conf(CG_HF_RHO,   4'd0, 13'((-RHO1) & 8'hFF)));
    p.push_back(cp_conf(CG_HF_SHIFT, 4'd0, 13'(SYN_SHIFT_HF)));
    p.push_back(cp_conf(CG_VF_RHO,   4'd0, 13'((-RHO0) & 8'hFF)));
    p.push_back(cp_conf(CG_VF_SHIFT, 4'd0, 13'(SHIFT)));
    p.push_back(cp_conf(CG_SCALE,    4'd0, 13'(C_LO & 10'h3FF)));
    p.push_back(cp_conf(CG_SCALE,    4'd1, 13'(C_HI & 10'h3FF)));
    p.push_back(cp_conf(CG_VF_CFG,   4'd0, 13'd0));
    p.push_back(cp_conf(CG_HF_CFG,   4'd0, 13'd0));
    p.push_back(cp_conf(CG_HF_PTR,   4'd0, 13'd15));   // wp 0, rp 15
    p.push_back(cp_conf(CG_VF_PTR,   4'd0, 13'd0));    // wp 0, rp 0
    body = cp_synth_body();
    p.push_back(seq_loop(8'(npairs), 8'(p.size() + body.size())));
    foreach (body[i]) p.push_back(body[i]);
    p.push_back(seq_halt());
    return p;
  endfunction

  // bit-exact model of cp_synth_prog; y interleaved (lo, hi) pairs
  function automatic void ref_synth(input int y[$], output int z[$]);
    int uprev = 0, u1p = 0;
    z = {};
    for (int m = 0; 2*m+1 < y.size(); m++) begin
      int a = scl(y[2*m], C_LO), b = scl(y[2*m+1], C_HI);
      int l = wrap16(a - b), u = wrap16(a + b);
      int l1 = sat16((((longint'(l) <<< 6) - longint'(RHO1) * uprev)) >>> SYN_SHIFT_HF);
      int u1 = sat16((((longint'(uprev) <<< 6) - longint'(RHO1) * l)) >>> SYN_SHIFT_HF);
      z.push_back(xs(l1, u1p, -RHO0));
      z.push_back(xs(u1p, l1, -RHO0));
      uprev = u;
      u1p = u1;
    end
  endfunction

  localparam logic [7:0] TP_VEC0 = 8'hE0;
  localparam logic [7:0] TP_VEC1 = 8'hF0;

  // TP: r0 write pointer, r1 = 1, r2 read pointer, r7 line counter.
  // Returns the program; ISRs are placed at TP_VEC0/TP_VEC1 by the loader.
  function automatic prog_t tp_stream_prog(int nlines, int npairs);
    prog_t p;
    p.push_back(tp_ldi(4'd1, 16'd1));                 // 0
    p.push_back(tp_ldi(4'd0, 16'hFFFF));              // 1
    p.push_back(tp_ldi(4'd2, 16'hFFFF));              // 2
    p.push_back(tp_ldi(4'd7, 16'd0));                 // 3
    p.push_back(tp_ien(2'b11));                       // 4
    p.push_back(seq_loop(8'(nlines), 8'd10));         // 5
    p.push_back(seq_loop(8'(npairs), 8'd9));          // 6
    p.push_back(tp_exec(MEM_NONE, 0, 0, 0, MV_CP2STG, 0));   // 7
    p.push_back(tp_exec(MEM_NONE, 0, 0, 0, MV_CP2STG, 1));   // 8
    p.push_back(tp_exec(MEM_WRITE, 1, 4'd0, 4'd1, MV_NONE, 0)); // 9
    p.push_back(tp_exec(MEM_NONE, 0, 0, 0, MV_NONE, 0));     // 10 outer tail
    p.push_back(tp_ien(2'b00));                              // 11
    p.push_back(seq_loop(8'(nlines), 8'd17));                // 12
    p.push_back(seq_loop(8'(npairs), 8'd16));                // 13
    p.push_back(tp_exec(MEM_READ, 1, 4'd2, 4'd1, MV_NONE, 0)); // 14
    p.push_back(tp_exec(MEM_NONE, 0, 0, 0, MV_STG2VOUT, 0)); // 15
    p.push_back(tp_exec(MEM_NONE, 0, 0, 0, MV_STG2VOUT, 1)); // 16
    p.push_back(tp_exec(MEM_NONE, 0, 0, 0, MV_NONE, 0));     // 17 outer tail
    p.push_back(seq_halt());                                 // 18
    return p;
  endfunction

  function automatic prog_t tp_isr0();
    prog_t p;
    p.push_back(tp_exec(MEM_NONE, 0, 0, 0, MV_VIN2CP, 0));
    p.push_back(seq_reti());
    return p;
  endfunction

  function automatic prog_t tp_isr1();
    prog_t p;
    p.push_back(tp_exec(MEM_NONE, 1, 4'd7, 4'd1, MV_NONE, 0)); // r7 += 1
    p.push_back(seq_reti());
    return p;
  endfunction

  // ---------------------------------------------------------------------
  // reference model
  // ---------------------------------------------------------------------
  function automatic int sat16(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction
  function automatic int wrap16(int v);
    return int'(shortint'(v));
  endfunction
  // one lattice half-step: (a<<6 + rho*b) >> shift, saturated
  function automatic int xs(int a, int b, int rho);
    longint acc = (longint'(a) <<< 6) + longint'(rho) * longint'(b);
    return sat16(acc >>> SHIFT);
  endfunction
  function automatic int scl(int v, int c);
    longint pr = longint'(v) * longint'(c);
    return sat16((pr + 128) >>> 8);
  endfunction

  // x: samples; returns interleaved low/high outputs
  function automatic void ref_filter(input int x[$], output int y[$]);
    int l1p = 0, l2p = 0;
    y = {};
    for (int n = 0; 2*n+1 < x.size(); n++) begin
      int l0 = x[2*n], u0 = x[2*n+1];
      int u1 = xs(u0, l0, RHO0), l1 = xs(l0, u0, RHO0);
      int u2 = xs(u1, l1p, RHO1), l2 = xs(l1p, u1, RHO1);
      int lo = wrap16(u2 + l2p), hi = wrap16(u2 - l2p);
      y.push_back(scl(lo, CL));
      y.push_back(scl(hi, CH));
      l1p = l1;
      l2p = l2;
    end
  endfunction

  // three cross-sections (rho0, rho1, rho2): 8-tap analysis filter
  function automatic void ref_filter8(input int x[$], output int y[$]);
    int rho[3] = '{RHO0, RHO1, RHO2};
    int lp[3] = '{0, 0, 0};          // delayed lower outputs per section
    y = {};
    for (int n = 0; 2*n+1 < x.size(); n++) begin
      int u = x[2*n+1], l = x[2*n], un, ln, lo, hi;
      un = xs(u, l, rho[0]); ln = xs(l, u, rho[0]);
      u = un; l = ln;
      for (int k = 1; k < 3; k++) begin
        un = xs(u, lp[k-1], rho[k]); ln = xs(lp[k-1], u, rho[k]);
        lp[k-1] = l;
        u = un; l = ln;
      end
      lo = wrap16(u + lp[2]); hi = wrap16(u - lp[2]);
      lp[2] = l;
      y.push_back(scl(lo, CL));
      y.push_back(scl(hi, CH));
    end
  endfunction
endpackage
