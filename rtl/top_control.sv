// top_control: instruction sequencer of the accelerator.
//
// Instruction words (instr_t) arrive on a valid/ready handshake; each one
// is a pass of the MAC array (matrix product, depthwise convolution or
// positional encoding), the statistics pass of the normalization, or a
// read-out of the input memory. A whole conformer block is a program of
// such words, so steps can be reordered or skipped by the host.
//
// The controller is split into cooperating state machines:
//   * a flag generator (MAC control) that emits valid/first/last/slot/row
//     for the top edge of the array and requests external weights
//     (w_req, w_idx) and gains (gamma_idx);
//   * three address generators (memory control), one per memory read
//     port 0, running the diagonal, flat, depthwise (anti-diagonal) or
//     positional-encoding (one bank at a time) read patterns;
//   * the normalization control, which drives the two statistics passes;
//   * a slot table that remembers, for up to four operations in flight,
//     where their results go (destination, tile base, residual weighting)
//     and loads the bias/requantization settings of the slot (GLU and
//     softmax control are destinations here).
// A new word starts when (a) the previous word's flags are out plus two
// cycles, (b) the read ports it needs are free, (c) the array is empty if
// the array mode changes (mode switch), and (d) its slot has drained. A
// word whose top operand is fed back (TSRC_FB) must start exactly two
// cycles after the previous word's flags ended, because the fed-back
// values arrive then; if it cannot, err is set and stays set.
// Generators start in the cycle after the handshake (cycle T).
module top_control
  import confasr_pkg::*;
#(
  parameter int N       = 64,
  parameter int DEPTH   = 512,
  parameter int NP_LOG2 = 8,
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int CW = (N > 1) ? $clog2(N) : 1,
  localparam int NS = 1 << SLOT_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    instr_valid,
  output logic                    instr_ready,
  input  instr_t                  instr,
  input  logic signed [ACC_W-1:0] instr_bias [N],
  output logic                    busy,
  output logic                    err,
  // array and input control
  output mac_mode_e               mode,
  output lsrc_e                   lsrc,
  output tsrc_e                   tsrc,
  output flag_t                   flag,
  output logic                    w_req,
  output logic [15:0]             w_idx,
  output logic [AW-1:0]           gamma_idx,
  // read port 0 of the memories
  output logic [AW-1:0]           in_raddr  [N],
  output logic                    in_rvalid [N],
  output logic [AW-1:0]           act_raddr [N],
  output logic                    act_rvalid[N],
  output logic signed [11:0]      dw_rot,
  output logic [CW-1:0]           buf_raddr [N],
  output logic                    buf_rvalid[N],
  // normalization statistics
  output logic                    stat_valid,
  output logic                    stat_phase,
  output logic                    stat_first,
  output logic                    stat_last,
  // input memory read-out
  output logic                    dump_valid [N],
  output logic                    dump_norm,
  // requantization configuration and drain table
  output logic                    cfg_we,
  output logic [SLOT_W-1:0]       cfg_slot,
  output logic signed [ACC_W-1:0] cfg_bias [N],
  output logic [15:0]             cfg_mult,
  output logic [4:0]              cfg_shift,
  output logic                    cfg_relu,
  output logic                    cfg_add_pe,
  output dst_e                    slot_dst      [NS],
  output logic [9:0]              slot_dst_base [NS],
  output logic [9:0]              slot_pe_base  [NS],
  output logic                    slot_half     [NS]
);

  typedef enum logic [1:0] {PAT_DIAG, PAT_FLAT, PAT_DW, PAT_POS} pat_e;

  typedef struct packed {
    logic        active;
    pat_e        pat;
    logic        dump;
    logic [15:0] t;
    logic [15:0] len;
    logic [9:0]  base;
    logic [10:0] k;
    logic [9:0]  p;
  } gen_t;

  logic [31:0] now;
  logic [31:0] next_ok, array_free;
  logic [31:0] gen_free  [3];
  logic [31:0] slot_free [NS];
  logic [SLOT_W-1:0] slot_next;
  gen_t        g_in, g_act, g_buf;
  logic        fl_active, fl_wuse;
  logic [15:0] fl_t, fl_len;
  logic [10:0] fl_k;
  mac_mode_e   fl_mode;
  logic [SLOT_W-1:0] fl_slot;
  logic [31:0] busy_until;

  // ---- start conditions ---------------------------------------------------
  logic need_in, need_act, need_buf, is_mac, ok, fire;
  logic [15:0] l_flag, l_gen;
  pat_e        pat_new;

  always_comb begin
    is_mac   = (instr.op == OP_MAC);
    need_in  = (instr.op == OP_NORM) || (instr.op == OP_DUMP) ||
               (is_mac && (instr.lsrc == LSRC_NORM || instr.lsrc == LSRC_IN ||
                           instr.tsrc == TSRC_NORM));
    need_act = is_mac && (instr.lsrc == LSRC_ACT);
    need_buf = is_mac && (instr.lsrc == LSRC_BUF || instr.lsrc == LSRC_SMAX);
    l_flag   = (instr.mode == MODE_POS) ? 16'(N * N) : 16'(instr.k_len);
    pat_new  = PAT_DIAG;
    l_gen    = 16'(instr.k_len) + 16'(N - 1);
    if (instr.op == OP_NORM) begin
      pat_new = PAT_FLAT;
      l_gen   = 16'(2 << NP_LOG2);
    end else if (is_mac && instr.mode == MODE_DW) begin
      pat_new = PAT_DW;
      l_gen   = 16'(instr.k_len) + 16'(2 * N - 2);
    end else if (is_mac && instr.mode == MODE_POS) begin
      pat_new = PAT_POS;
      l_gen   = 16'(N * N);
    end
    ok = (now >= next_ok)
      && (!need_in  || now >= gen_free[0])
      && (!need_act || now >= gen_free[1])
      && (!need_buf || now >= gen_free[2])
      && (!is_mac || instr.mode == mode || now >= array_free)
      && (!is_mac || now >= slot_free[slot_next]);
    instr_ready = ok;
    fire        = instr_valid && ok;
  end

  // ---- sequencing registers ---------------------------------------------
  function automatic gen_t gen_start(input pat_e pat, input logic [15:0] len,
                                     input logic [9:0] base, input logic [10:0] k,
                                     input logic dump);
    gen_t g;
    g.active = 1'b1;
    g.pat    = pat;
    g.dump   = dump;
    g.t      = '0;
    g.len    = len;
    g.base   = base;
    g.k      = k;
    g.p      = 10'((k - 11'd1) >> 1);
    return g;
  endfunction

  function automatic gen_t gen_step(input gen_t g);
    gen_t n;
    n = g;
    if (g.active) begin
      n.t = g.t + 16'd1;
      if (g.t + 16'd1 == g.len) n.active = 1'b0;
    end
    return n;
  endfunction

  function automatic logic [31:0] max32(input logic [31:0] a, input logic [31:0] b);
    return (a > b) ? a : b;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      now        <= '0;
      next_ok    <= '0;
      array_free <= '0;
      busy_until <= '0;
      for (int m = 0; m < 3; m++) gen_free[m] <= '0;
      for (int s = 0; s < NS; s++) begin
        slot_free[s]     <= '0;
        slot_dst[s]      <= DST_NONE;
        slot_dst_base[s] <= '0;
        slot_pe_base[s]  <= '0;
        slot_half[s]     <= 1'b0;
      end
      slot_next <= '0;
      g_in      <= '0;
      g_act     <= '0;
      g_buf     <= '0;
      fl_active <= 1'b0;
      fl_wuse   <= 1'b0;
      fl_t      <= '0;
      fl_len    <= '0;
      fl_k      <= '0;
      fl_mode   <= MODE_MM;
      fl_slot   <= '0;
      mode      <= MODE_MM;
      lsrc      <= LSRC_NORM;
      tsrc      <= TSRC_W;
      dump_norm <= 1'b0;
      err       <= 1'b0;
    end else begin
      now   <= now + 32'd1;
      g_in  <= gen_step(g_in);
      g_act <= gen_step(g_act);
      g_buf <= gen_step(g_buf);
      if (fl_active) begin
        fl_t <= fl_t + 16'd1;
        if (fl_t + 16'd1 == fl_len) fl_active <= 1'b0;
      end

      // A fed-back operand is only present at one instant.
      if (instr_valid && is_mac && instr.tsrc == TSRC_FB && now >= next_ok && !(ok && now == next_ok))
        err <= 1'b1;

      if (fire) begin
        next_ok    <= now + 32'd1 + 32'(is_mac ? l_flag : l_gen) + 32'd1;
        busy_until <= max32(busy_until, now + 32'd1 + 32'(l_flag) + 32'(l_gen) + 32'(2 * N + 8));
        if (need_in)  begin
          g_in        <= gen_start(pat_new, l_gen, instr.src_base, instr.k_len, instr.op == OP_DUMP);
          gen_free[0] <= now + 32'd1 + 32'(l_gen) + 32'd1;
          dump_norm   <= instr.use_norm;
        end
        if (need_act) begin
          g_act       <= gen_start(pat_new, l_gen, instr.src_base, instr.k_len, 1'b0);
          gen_free[1] <= now + 32'd1 + 32'(l_gen) + 32'd1;
        end
        if (need_buf) begin
          g_buf       <= gen_start(pat_new, l_gen, instr.src_base, instr.k_len, 1'b0);
          gen_free[2] <= now + 32'd1 + 32'(l_gen) + 32'd1;
        end
        if (is_mac) begin
          fl_active  <= 1'b1;
          fl_t       <= '0;
          fl_len     <= l_flag;
          fl_k       <= instr.k_len;
          fl_mode    <= instr.mode;
          fl_slot    <= slot_next;
          fl_wuse    <= (instr.lsrc == LSRC_W) || (instr.tsrc == TSRC_W);
          mode       <= instr.mode;
          lsrc       <= instr.lsrc;
          tsrc       <= instr.tsrc;
          array_free <= now + 32'd1 + 32'(l_flag) + 32'(2 * N + 4);
          slot_free[slot_next]     <= now + 32'd1 + 32'(l_flag) + 32'(2 * N + 8);
          slot_dst[slot_next]      <= instr.dst;
          slot_dst_base[slot_next] <= instr.dst_base;
          slot_pe_base[slot_next]  <= instr.pe_base;
          slot_half[slot_next]     <= instr.res_half;
          slot_next  <= slot_next + 1'b1;
        end
      end
    end
  end

  // Requantization settings are written in the handshake cycle.
  assign cfg_we     = fire && is_mac;
  assign cfg_slot   = slot_next;
  assign cfg_mult   = instr.req_mult;
  assign cfg_shift  = instr.req_shift;
  assign cfg_relu   = instr.relu;
  assign cfg_add_pe = instr.add_pe;
  for (genvar c = 0; c < N; c++) begin : g_bias
    assign cfg_bias[c] = instr_bias[c];
  end

  assign busy = (now < busy_until) || fl_active;

  // ---- flag generator -----------------------------------------------------
  always_comb begin
    flag  = '0;
    w_req = 1'b0;
    w_idx = fl_t;
    if (fl_active) begin
      flag.valid = 1'b1;
      flag.slot  = fl_slot;
      if (fl_mode == MODE_POS) begin
        flag.first = (fl_t[CW-1:0] == '0);
        flag.last  = (fl_t[CW-1:0] == CW'(N - 1));
        flag.row   = ROW_W'(fl_t >> CW);
      end else begin
        flag.first = (fl_t == 16'd0);
        flag.last  = (fl_t == 16'(fl_k) - 16'd1);
      end
      w_req = fl_wuse;
    end
  end

  // ---- address generators -------------------------------------------------
  always_comb begin
    int j;
    gamma_idx  = AW'(g_in.base + 10'(g_in.t));
    stat_valid = g_in.active && g_in.pat == PAT_FLAT;
    stat_phase = (g_in.t >= 16'(1 << NP_LOG2));
    stat_first = (g_in.t == 16'd0) || (g_in.t == 16'(1 << NP_LOG2));
    stat_last  = (g_in.t == 16'((1 << NP_LOG2) - 1)) || (g_in.t == 16'((2 << NP_LOG2) - 1));
    dw_rot     = 12'(g_act.t) - 12'(g_act.p);
    for (int b = 0; b < N; b++) begin
      // input memory: diagonal or flat
      if (g_in.pat == PAT_FLAT) begin
        j = stat_phase ? int'(g_in.t) - (1 << NP_LOG2) : int'(g_in.t);
        in_rvalid[b] = g_in.active;
      end else begin
        j = int'(g_in.t) - b;
        in_rvalid[b] = g_in.active && j >= 0 && j < int'(g_in.k);
      end
      in_raddr[b]   = AW'(int'(g_in.base) + j);
      dump_valid[b] = in_rvalid[b] && g_in.dump;
      // activation memory: diagonal or depthwise
      if (g_act.pat == PAT_DW) begin
        j = int'(g_act.t) - int'(g_act.p) - b;
        act_rvalid[b] = g_act.active && j >= 0 && j < N;
      end else begin
        j = int'(g_act.t) - b;
        act_rvalid[b] = g_act.active && j >= 0 && j < int'(g_act.k);
      end
      act_raddr[b] = AW'(int'(g_act.base) + j);
      // buffer: diagonal or one bank at a time
      if (g_buf.pat == PAT_POS) begin
        j = int'(g_buf.t) % N;
        buf_rvalid[b] = g_buf.active && (int'(g_buf.t) / N == b);
      end else begin
        j = int'(g_buf.t) - b;
        buf_rvalid[b] = g_buf.active && j >= 0 && j < int'(g_buf.k);
      end
      buf_raddr[b] = CW'(int'(g_buf.base) + j);
    end
  end

endmodule
