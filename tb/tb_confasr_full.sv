// tb_confasr_full: the end-to-end conformer-block test of tb_confasr_top at
// the accelerator's default size (s = d_h = 64, d = d_ff = 512, 8 heads,
// depthwise kernel of 31 taps), with the top instantiated unchanged.
// The program:
//   half-step feed-forward (norm, FC + ReLU, FC, residual x1/2)
//   multi-head self-attention per head: Q into the buffer, positional
//     encoding Q_i R_i (one array row at a time) into the activation
//     memory, K fed back into the array for Q K^T (+ positional term,
//     softmax into the buffer), V^T fed back for A V; then the output FC
//     with residual
//   convolution module: pointwise conv to 2d with GLU (first tile held in
//     the buffer), depthwise conv (folded batch norm + ReLU), pointwise
//     conv with residual
//   half-step feed-forward, final normalization read out through the
//     output port (once raw, once normalised).
// A reference model in this file computes every step with the integer
// arithmetic of the units (exp and sigmoid from real arithmetic) and the
// final outputs must match exactly. The test also counts each mechanism
// (mode switch waits, feedback chaining, depthwise and positional modes,
// softmax, GLU, residual with and without halving, ReLU, statistics
// passes, read-out), checks that a fed-back word starts exactly K + 2
// cycles after the word it depends on, and that back-to-back words of the
// same mode are issued K + 2 cycles apart.
module tb_confasr_full;
  import confasr_pkg::*;
  localparam int N = S, DEPTH = D, NP_LOG2 = 8;
  localparam int AW = $clog2(DEPTH), H = DEPTH / N, KDW = 31, PDW = (KDW - 1) / 2;
  localparam int MAXW = 131072, MAXI = 512;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic a_we;
  logic [AW-1:0] a_addr;
  logic signed [7:0] a_data [N];
  logic instr_valid, instr_ready;
  instr_t instr;
  logic signed [ACC_W-1:0] instr_bias [N];
  logic w_req;
  logic [15:0] w_idx;
  logic signed [7:0] w [N];
  logic [AW-1:0] gamma_idx;
  logic signed [7:0] gamma;
  logic out_valid [N];
  logic [AW-1:0] out_addr [N];
  logic signed [7:0] out_data [N];
  logic busy, err;

  confasr_top dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- program storage ------------------------------------------
  instr_t prog   [MAXI];
  int     p_woff [MAXI];
  int     p_gsel [MAXI];
  int     p_bias [MAXI][N];
  int     nprog = 0;
  logic signed [7:0] WROM [MAXW][N];
  int     nw = 0;
  logic signed [7:0] GAM [8][DEPTH];

  // ---------------- reference state ------------------------------------------
  int X   [N][DEPTH];     // input memory
  int ACT [N][DEPTH];     // activation memory
  int BUF [N][N];         // buffer (as int8 view / exp values)
  int XN  [N][DEPTH];     // normalised input under the current gamma set
  int FBM [N][N];         // last fed-back matrix (requantized)
  int PEV [N][N];         // positional scores of the current head
  int ATT [N][N];         // softmax probabilities
  int OUTR [2][N][DEPTH]; // expected read-outs
  int gsel_cur = 0;
  int mu_r [N], recip_r [N];

  function automatic int sat(longint v);
    return (v > 127) ? 127 : (v < -128) ? -128 : int'(v);
  endfunction

  function automatic int rq(longint acc, int bias, int pe, int mult, int shift, bit relu);
    longint t;
    t = (acc + bias + pe) * mult;
    if (shift > 0) t = t + (longint'(1) << (shift - 1));
    t = sat(t >>> shift);
    if (relu && t < 0) t = 0;
    return int'(t);
  endfunction

  function automatic void ref_stats();
    for (int r = 0; r < N; r++) begin
      longint s, sa, ma;
      s = 0;
      for (int j = 0; j < (1 << NP_LOG2); j++) s += X[r][j];
      mu_r[r] = int'(s >>> NP_LOG2);
      sa = 0;
      for (int j = 0; j < (1 << NP_LOG2); j++) sa += (X[r][j] < mu_r[r]) ? mu_r[r] - X[r][j] : X[r][j] - mu_r[r];
      ma = (sa << S_MA) >> NP_LOG2;
      if (ma == 0) ma = 1;
      recip_r[r] = int'((longint'(1) << RECIP_W) / ma);
    end
  endfunction

  function automatic int ref_norm(int r, int k, int g);
    longint t;
    t = ((longint'(X[r][k] - mu_r[r]) * (1 << S_NORM)) * recip_r[r]) >>> RECIP_W;
    return sat((t * GAM[g][k]) >>> S_CUT);
  endfunction

  function automatic int lut_exp(int score);
    int m;
    m = 32 - score;
    if (m < 0) m = 0;
    if (m > 255) m = 255;
    return int'($floor(1023.0 * $exp(-real'(m) / 16.0) + 0.5));
  endfunction

  function automatic int lut_sig(int x);
    return int'($floor(255.0 / (1.0 + $exp(-real'(x) / 16.0)) + 0.5));
  endfunction

  // ---------------- program construction + reference execution ------------
  int mult_c = 3, shift_c = 7;

  function automatic int new_weights(int rows, int sh);
    int off;
    off = nw;
    for (int i = 0; i < rows; i++)
      for (int c = 0; c < N; c++) WROM[nw + i][c] = 8'($signed(8'($urandom)) >>> sh);
    nw += rows;
    return off;
  endfunction

  function automatic instr_t mk(op_e op, mac_mode_e mode, lsrc_e l, tsrc_e t, int k,
                                int sb, dst_e d, int db);
    instr_t i;
    i = '0;
    i.op = op; i.mode = mode; i.lsrc = l; i.tsrc = t; i.k_len = 11'(k);
    i.src_base = 10'(sb); i.dst = d; i.dst_base = 10'(db);
    i.req_mult = 16'(mult_c); i.req_shift = 5'(shift_c);
    return i;
  endfunction

  function automatic void push(instr_t i, int woff);
    prog[nprog] = i;
    p_woff[nprog] = woff;
    p_gsel[nprog] = gsel_cur;
    for (int c = 0; c < N; c++) p_bias[nprog][c] = ($urandom % 61) - 30;
    nprog++;
  endfunction

  function automatic int bias_of(int c);   // bias of the last pushed word
    return p_bias[nprog - 1][c];
  endfunction

  // norm statistics (new gamma set)
  function automatic void do_norm(int g);
    gsel_cur = g;
    push(mk(OP_NORM, MODE_MM, LSRC_NORM, TSRC_W, 0, 0, DST_NONE, 0), 0);
    ref_stats();
    for (int r = 0; r < N; r++) for (int k = 0; k < DEPTH; k++) XN[r][k] = ref_norm(r, k, g);
  endfunction

  // product tile: left operand matrix L (N x K, from the reference), weights
  // WROM[woff + k][c]; returns requantized N x N tile
  typedef int tile_t [N][N];
  function automatic tile_t mm_ref(int L [N][DEPTH], int K, int woff, bit relu, int pe [N][N], bit addpe);
    tile_t o;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        longint a;
        a = 0;
        for (int k = 0; k < K; k++) a += longint'(L[r][k]) * WROM[woff + k][c];
        o[r][c] = rq(a, bias_of(c), addpe ? pe[r][c] : 0, mult_c, shift_c, relu);
      end
    return o;
  endfunction

  int zero_pe [N][N];

  function automatic void ff_module(int g);
    tile_t o;
    int hid [N][DEPTH];
    do_norm(g);
    for (int t = 0; t < H; t++) begin
      instr_t i;
      int woff;
      woff = new_weights(DEPTH, 2);
      i = mk(OP_MAC, MODE_MM, LSRC_NORM, TSRC_W, DEPTH, 0, DST_ACT, t * N);
      i.relu = 1;
      push(i, woff);
      o = mm_ref(XN, DEPTH, woff, 1, zero_pe, 0);
      for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) ACT[r][t * N + c] = o[r][c];
    end
    hid = ACT;
    for (int t = 0; t < H; t++) begin
      instr_t i;
      int woff;
      woff = new_weights(DEPTH, 2);
      i = mk(OP_MAC, MODE_MM, LSRC_ACT, TSRC_W, DEPTH, 0, DST_RES, t * N);
      i.res_half = 1;
      push(i, woff);
      o = mm_ref(hid, DEPTH, woff, 0, zero_pe, 0);
      for (int r = 0; r < N; r++) for (int c = 0; c < N; c++)
        X[r][t * N + c] = sat(X[r][t * N + c] + (o[r][c] >>> 1));
    end
  endfunction

  function automatic void mhsa_module(int g);
    tile_t q, pe, kk, s, vt, o;
    int L [N][DEPTH];
    do_norm(g);
    for (int h = 0; h < H; h++) begin
      instr_t i;
      int woff;
      // Q_h -> buffer
      woff = new_weights(DEPTH, 2);
      push(mk(OP_MAC, MODE_MM, LSRC_NORM, TSRC_W, DEPTH, 0, DST_BUF, 0), woff);
      q = mm_ref(XN, DEPTH, woff, 0, zero_pe, 0);
      // positional encoding: row r times its own N x N matrix
      woff = new_weights(N * N, 1);
      push(mk(OP_MAC, MODE_POS, LSRC_BUF, TSRC_W, N, 0, DST_ACT, h * N), woff);
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) begin
          longint a;
          a = 0;
          for (int k = 0; k < N; k++) a += longint'(q[r][k]) * WROM[woff + r * N + k][c];
          pe[r][c] = rq(a, bias_of(c), 0, mult_c, shift_c, 0);
          ACT[r][h * N + c] = pe[r][c];
        end
      // K_h, fed back only
      woff = new_weights(DEPTH, 2);
      push(mk(OP_MAC, MODE_MM, LSRC_NORM, TSRC_W, DEPTH, 0, DST_NONE, 0), woff);
      kk = mm_ref(XN, DEPTH, woff, 0, zero_pe, 0);
      // Q K^T + positional term -> softmax
      i = mk(OP_MAC, MODE_MM, LSRC_BUF, TSRC_FB, N, 0, DST_SMAX, 0);
      i.add_pe = 1; i.pe_base = 10'(h * N);
      push(i, 0);
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) begin
          longint a;
          a = 0;
          for (int k = 0; k < N; k++) a += longint'(q[r][k]) * kk[c][k];
          s[r][c] = rq(a, bias_of(c), pe[r][c], mult_c, shift_c, 0);
        end
      for (int r = 0; r < N; r++) begin
        longint sum, rc;
        sum = 0;
        for (int c = 0; c < N; c++) sum += lut_exp(s[r][c]);
        rc = (sum == 0) ? ((longint'(1) << 25) - 1) : (longint'(1) << 24) / sum;
        for (int c = 0; c < N; c++) begin
          longint p;
          p = (lut_exp(s[r][c]) * rc + (1 << 16)) >> 17;
          ATT[r][c] = (p > 127) ? 127 : int'(p);
        end
      end
      // V_h^T: transposed weights from the left, normalised input from the top
      woff = new_weights(DEPTH, 2);
      push(mk(OP_MAC, MODE_MM, LSRC_W, TSRC_NORM, DEPTH, 0, DST_NONE, 0), woff);
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) begin
          longint a;
          a = 0;
          for (int k = 0; k < DEPTH; k++) a += longint'(WROM[woff + k][r]) * XN[c][k];
          vt[r][c] = rq(a, bias_of(c), 0, mult_c, shift_c, 0);
        end
      // A V -> activation tile h
      push(mk(OP_MAC, MODE_MM, LSRC_SMAX, TSRC_FB, N, 0, DST_ACT, h * N), 0);
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) begin
          longint a;
          a = 0;
          for (int k = 0; k < N; k++) a += longint'(ATT[r][k]) * vt[c][k];
          ACT[r][h * N + c] = rq(a, bias_of(c), 0, mult_c, shift_c, 0);
        end
    end
    // output projection + residual
    L = ACT;
    for (int t = 0; t < H; t++) begin
      int woff;
      woff = new_weights(DEPTH, 2);
      push(mk(OP_MAC, MODE_MM, LSRC_ACT, TSRC_W, DEPTH, 0, DST_RES, t * N), woff);
      o = mm_ref(L, DEPTH, woff, 0, zero_pe, 0);
      for (int r = 0; r < N; r++) for (int c = 0; c < N; c++)
        X[r][t * N + c] = sat(X[r][t * N + c] + o[r][c]);
    end
  endfunction

  function automatic void conv_module(int g);
    tile_t g1, g2, o;
    int L [N][DEPTH];
    do_norm(g);
    for (int t = 0; t < H; t++) begin
      int woff;
      woff = new_weights(DEPTH, 2);
      push(mk(OP_MAC, MODE_MM, LSRC_NORM, TSRC_W, DEPTH, 0, DST_BUF, 0), woff);
      g1 = mm_ref(XN, DEPTH, woff, 0, zero_pe, 0);
      woff = new_weights(DEPTH, 2);
      push(mk(OP_MAC, MODE_MM, LSRC_NORM, TSRC_W, DEPTH, 0, DST_GLU, t * N), woff);
      g2 = mm_ref(XN, DEPTH, woff, 0, zero_pe, 0);
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) begin
          int p;
          p = g1[r][c] * lut_sig(g2[r][c]) + 128;
          ACT[r][t * N + c] = sat(p >>> 8);
        end
    end
    // depthwise convolution per tile, in place, batch norm folded, ReLU
    L = ACT;
    for (int t = 0; t < H; t++) begin
      instr_t i;
      int woff;
      woff = new_weights(KDW, 0);
      i = mk(OP_MAC, MODE_DW, LSRC_ACT, TSRC_W, KDW, t * N, DST_ACT, t * N);
      i.relu = 1;
      push(i, woff);
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) begin
          longint a;
          a = 0;
          for (int j = 0; j < KDW; j++)
            if (r + j - PDW >= 0 && r + j - PDW < N) a += longint'(WROM[woff + j][c]) * L[r + j - PDW][t * N + c];
          ACT[r][t * N + c] = rq(a, bias_of(c), 0, mult_c, shift_c, 1);
        end
    end
    L = ACT;
    for (int t = 0; t < H; t++) begin
      int woff;
      woff = new_weights(DEPTH, 2);
      push(mk(OP_MAC, MODE_MM, LSRC_ACT, TSRC_W, DEPTH, 0, DST_RES, t * N), woff);
      o = mm_ref(L, DEPTH, woff, 0, zero_pe, 0);
      for (int r = 0; r < N; r++) for (int c = 0; c < N; c++)
        X[r][t * N + c] = sat(X[r][t * N + c] + o[r][c]);
    end
  endfunction

  function automatic void readout(int g);
    instr_t i;
    i = mk(OP_DUMP, MODE_MM, LSRC_IN, TSRC_W, DEPTH, 0, DST_NONE, 0);
    push(i, 0);
    for (int r = 0; r < N; r++) for (int k = 0; k < DEPTH; k++) OUTR[0][r][k] = X[r][k];
    do_norm(g);
    i.use_norm = 1;
    push(i, 0);
    for (int r = 0; r < N; r++) for (int k = 0; k < DEPTH; k++) OUTR[1][r][k] = XN[r][k];
  endfunction

  // ---------------- host models ------------------------------------------------
  int cur_mac = 0;     // program index of the running MAC word
  int cur_norm = 0;    // program index of the last statistics word
  int pi = 0;          // next word to present
  int ndump = 0;
  int got [2][N][DEPTH];

  always_comb begin
    for (int c = 0; c < N; c++) w[c] = WROM[(p_woff[cur_mac] + int'(w_idx)) % MAXW][c];
    gamma = GAM[p_gsel[cur_norm]][gamma_idx];
    instr = prog[pi];
    for (int c = 0; c < N; c++) instr_bias[c] = ACC_W'(p_bias[pi][c]);
  end

  // ---------------- mechanism counters ---------------------------------------
  int n_modesw = 0, n_fb = 0, n_dw = 0, n_pos = 0, n_smax = 0, n_glu = 0, n_res = 0,
      n_half = 0, n_relu0 = 0, n_stats = 0, n_dump = 0, n_addpe = 0, n_b2b = 0;
  int last_fire = -1, last_k = 0;
  mac_mode_e last_mode = MODE_MM;

  always @(posedge clk) if (rst_n) begin
    if (instr_valid && !instr_ready && prog[pi].op == OP_MAC && prog[pi].mode != dut.mode)
      n_modesw++;
    if (instr_valid && instr_ready) begin
      instr_t f;
      f = prog[pi];
      if (f.op == OP_MAC) begin
        if (f.tsrc == TSRC_FB) begin
          n_fb++;
          checks++;
          if (cyc + 1 - last_fire != last_k + 2) begin
            failures++;
            $display("FAIL fed-back word at distance %0d, expected %0d", cyc + 1 - last_fire, last_k + 2);
          end
        end else if (last_fire >= 0 && f.mode == last_mode && f.mode == MODE_MM &&
                     cyc + 1 - last_fire == last_k + 2) n_b2b++;
        if (f.mode == MODE_DW) n_dw++;
        if (f.mode == MODE_POS) n_pos++;
        if (f.add_pe) n_addpe++;
        last_fire = cyc + 1; last_k = (f.mode == MODE_POS) ? N * N : int'(f.k_len); last_mode = f.mode;
        cur_mac <= pi;
      end
      if (f.op == OP_NORM) begin n_stats++; cur_norm <= pi; end
      if (f.op == OP_DUMP) n_dump++;
      pi <= pi + 1;
    end
    for (int r = 0; r < N; r++) begin
      if (dut.sm_valid[r]) n_smax++;
      if (dut.glu_valid[r]) n_glu++;
      if (dut.rq_valid[r] && dut.slot_dst[dut.rq_slot[r]] == DST_RES) begin
        n_res++;
        if (dut.res_half[r]) n_half++;
      end
      if (dut.rq_valid[r] && dut.rq_data[r] == 0 && dut.u_requant.relu[dut.rq_slot[r]]) n_relu0++;
    end
  end

  // output capture: the two read-outs, in order
  int dump_words = 0;
  always @(posedge clk) if (rst_n)
    for (int r = 0; r < N; r++)
      if (out_valid[r]) begin
        int which;
        which = dump_words / (N * DEPTH);
        if (which < 2) got[which][r][out_addr[r]] = out_data[r];
        dump_words++;
      end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog: stuck at word %0d of %0d", pi, nprog);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic need(int n, string what);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
    else $display("  %-28s %0d", what, n);
  endtask

  initial begin
    int t0;
    a_we = 0; a_addr = 0; instr_valid = 0;
    for (int r = 0; r < N; r++) a_data[r] = 0;
    for (int g = 0; g < 8; g++) for (int k = 0; k < DEPTH; k++) GAM[g][k] = 8'(32 + $urandom % 64);
    for (int r = 0; r < N; r++) for (int k = 0; k < DEPTH; k++) X[r][k] = int'($signed(8'($urandom))) / 2;
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) zero_pe[r][c] = 0;
    // load the block input
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < DEPTH; k++) begin
      @(negedge clk);
      a_we = 1; a_addr = AW'(k);
      for (int r = 0; r < N; r++) a_data[r] = 8'(X[r][k]);
    end
    @(negedge clk);
    a_we = 0;
    // build the program and the reference
    ff_module(0);
    mhsa_module(1);
    conv_module(2);
    ff_module(3);
    readout(4);
    $display("program: %0d words, %0d weight vectors", nprog, nw);
    // run it
    t0 = cyc;
    @(negedge clk);
    instr_valid = 1;
    wait (pi == nprog);
    @(negedge clk);
    instr_valid = 0;
    wait (!busy);
    repeat (4 * N) @(negedge clk);
    $display("block done in %0d cycles", cyc - t0);
    for (int which = 0; which < 2; which++)
      for (int r = 0; r < N; r++)
        for (int k = 0; k < DEPTH; k++) begin
          checks++;
          if (got[which][r][k] != OUTR[which][r][k]) begin
            failures++;
            if (failures < 20) $display("FAIL readout %0d row %0d word %0d: %0d exp %0d", which, r, k, got[which][r][k], OUTR[which][r][k]);
          end
        end
    checks++;
    if (dump_words != 2 * N * DEPTH) begin failures++; $display("FAIL %0d output words", dump_words); end
    checks++;
    if (err) begin failures++; $display("FAIL controller error flag"); end
    need(n_stats, "normalization statistics");
    need(n_modesw, "mode switch waits");
    need(n_fb, "fed-back (transposed) words");
    need(n_b2b, "back-to-back words");
    need(n_pos, "positional-encoding words");
    need(n_addpe, "positional term added");
    need(n_dw, "depthwise words");
    need(n_smax, "softmax inputs");
    need(n_glu, "GLU outputs");
    need(n_res, "residual writes");
    need(n_half, "half residual writes");
    need(n_relu0, "ReLU zeroed outputs");
    need(n_dump, "read-outs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
