// confasr_top: conformer-block accelerator with one shared MAC array.
//
// A conformer block (feed-forward, multi-head self-attention with learned
// positional encoding, convolution module, feed-forward, each with its
// residual connection) runs as a program of instruction words on one
// N x N output-stationary INT8 MAC array. All activations stay on chip:
//   input memory      s rows x d words: block input, residual sums
//   activation memory s rows x d words: intermediate tiles
//   buffer            s rows x s words x 10 bit: Q, softmax exponentials,
//                     first GLU tile
// Both memories and the buffer are read and written per row with an
// address of their own, so operands leave them already skewed for the
// array. The normalization unit sits on the input memory's read path and
// normalises on the fly; array results pass the bias/requantization unit
// and then go to the activation memory, to the input memory through the
// residual adder, to the buffer, through the softmax or GLU unit, to the
// output, or straight back into the top of the array, which transposes
// them (K^T for Q*K^T, V for A*V).
//
// Interface:
//   a_we/a_addr/a_data   load one feature (word a_addr) of all s rows
//   instr_*              instruction words with their bias vector
//   w_req/w_idx/w        external weights: when w_req is high, w must
//                        carry weight vector w_idx of the running word in
//                        the same cycle (no back-pressure)
//   gamma_idx/gamma      normalization gain of feature gamma_idx, same cycle
//   out_valid/addr/data  results, one int8 per row, with their word
//   busy, err            work in flight; a fed-back word missed its slot
// Row r of every memory and lane r of every unit is sequence position r.
module confasr_top
  import confasr_pkg::*;
#(
  parameter int N       = S,          // sequence length = array edge
  parameter int DEPTH   = D,          // words per memory row (d)
  parameter int NP_LOG2 = 8,          // log2 of the features in the norm statistics
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int CW = (N > 1) ? $clog2(N) : 1,
  localparam int NS = 1 << SLOT_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    a_we,
  input  logic [AW-1:0]           a_addr,
  input  logic signed [7:0]       a_data [N],
  input  logic                    instr_valid,
  output logic                    instr_ready,
  input  instr_t                  instr,
  input  logic signed [ACC_W-1:0] instr_bias [N],
  output logic                    w_req,
  output logic [15:0]             w_idx,
  input  logic signed [7:0]       w [N],
  output logic [AW-1:0]           gamma_idx,
  input  logic signed [7:0]       gamma,
  output logic                    out_valid [N],
  output logic [AW-1:0]           out_addr  [N],
  output logic signed [7:0]       out_data  [N],
  output logic                    busy,
  output logic                    err
);

  // ---- controller ----------------------------------------------------------
  mac_mode_e  mode;
  lsrc_e      lsrc;
  tsrc_e      tsrc;
  flag_t      flag;
  logic [AW-1:0] in_raddr [N], act_raddr [N];
  logic [CW-1:0] buf_raddr [N];
  logic       in_rvalid [N], act_rvalid [N], buf_rvalid [N];
  logic signed [11:0] dw_rot;
  logic       stat_valid, stat_phase, stat_first, stat_last;
  logic       dump_valid [N];
  logic       dump_norm;
  logic       cfg_we, cfg_relu, cfg_add_pe;
  logic [SLOT_W-1:0] cfg_slot;
  logic signed [ACC_W-1:0] cfg_bias [N];
  logic [15:0] cfg_mult;
  logic [4:0]  cfg_shift;
  dst_e        slot_dst      [NS];
  logic [9:0]  slot_dst_base [NS];
  logic [9:0]  slot_pe_base  [NS];
  logic        slot_half     [NS];

  top_control #(.N(N), .DEPTH(DEPTH), .NP_LOG2(NP_LOG2)) u_ctrl (
    .clk, .rst_n, .instr_valid, .instr_ready, .instr, .instr_bias, .busy, .err,
    .mode, .lsrc, .tsrc, .flag, .w_req, .w_idx, .gamma_idx,
    .in_raddr, .in_rvalid, .act_raddr, .act_rvalid, .dw_rot, .buf_raddr, .buf_rvalid,
    .stat_valid, .stat_phase, .stat_first, .stat_last, .dump_valid, .dump_norm,
    .cfg_we, .cfg_slot, .cfg_bias, .cfg_mult, .cfg_shift, .cfg_relu, .cfg_add_pe,
    .slot_dst, .slot_dst_base, .slot_pe_base, .slot_half
  );

  // ---- memories ------------------------------------------------------------
  logic          in_we [N], act_we [N], buf_we [N];
  logic [AW-1:0] in_waddr [N], act_waddr [N];
  logic [CW-1:0] buf_waddr [N];
  logic [7:0]    in_wdata [N], act_wdata [N];
  logic [EXP_W-1:0] buf_wdata [N];
  logic [AW-1:0] in_ra  [2][N], act_ra [2][N];
  logic [CW-1:0] buf_ra [2][N];
  logic [7:0]    in_rd  [2][N], act_rd [2][N];
  logic [EXP_W-1:0] buf_rd [2][N];

  row_memory #(.BANKS(N), .DEPTH(DEPTH), .WIDTH(8), .NRD(2)) u_input_mem (
    .clk, .we(in_we), .waddr(in_waddr), .wdata(in_wdata), .raddr(in_ra), .rdata(in_rd));
  row_memory #(.BANKS(N), .DEPTH(DEPTH), .WIDTH(8), .NRD(2)) u_act_mem (
    .clk, .we(act_we), .waddr(act_waddr), .wdata(act_wdata), .raddr(act_ra), .rdata(act_rd));
  row_memory #(.BANKS(N), .DEPTH(N), .WIDTH(EXP_W), .NRD(2)) u_buffer (
    .clk, .we(buf_we), .waddr(buf_waddr), .wdata(buf_wdata), .raddr(buf_ra), .rdata(buf_rd));

  // ---- operand path -------------------------------------------------------
  logic signed [7:0] in0 [N], act0 [N], buf0 [N], norm_y [N], smax [N], fb [N];
  logic signed [7:0] left_in [N], top_in [N];
  flag_t             top_flag [N];
  logic [EXP_W-1:0]  buf0w [N];

  for (genvar r = 0; r < N; r++) begin : g_rd0
    assign in_ra[0][r]  = in_raddr[r];
    assign act_ra[0][r] = act_raddr[r];
    assign buf_ra[0][r] = buf_raddr[r];
    assign in0[r]   = in_rvalid[r]  ? in_rd[0][r]  : '0;
    assign act0[r]  = act_rvalid[r] ? act_rd[0][r] : '0;
    assign buf0w[r] = buf_rvalid[r] ? buf_rd[0][r] : '0;
    assign buf0[r]  = buf0w[r][7:0];
  end

  ma_norm #(.N(N), .NP_LOG2(NP_LOG2)) u_norm (
    .clk, .rst_n, .x(in0), .stat_valid, .stat_phase, .stat_first, .stat_last,
    .gamma_in(gamma), .y(norm_y));

  input_control #(.N(N)) u_inctl (
    .clk, .rst_n, .lsrc, .tsrc, .mode, .flag_in(flag), .w, .norm_y, .in_rd(in0),
    .act_rd(act0), .dw_rot, .buf_rd(buf0), .smax, .fb,
    .left_out(left_in), .top_out(top_in), .flag_out(top_flag));

  logic                    arr_valid [N];
  logic [CW-1:0]           arr_col   [N];
  logic [SLOT_W-1:0]       arr_slot  [N];
  logic signed [ACC_W-1:0] arr_data  [N];

  mac_array #(.N(N)) u_array (
    .clk, .rst_n, .mode, .left_in, .top_in, .top_flag,
    .out_valid(arr_valid), .out_col(arr_col), .out_slot(arr_slot), .out_data(arr_data));

  // ---- result path ----------------------------------------------------------
  logic signed [7:0] pe_add [N];
  logic              rq_valid [N];
  logic [CW-1:0]     rq_col   [N];
  logic [SLOT_W-1:0] rq_slot  [N];
  logic signed [7:0] rq_data  [N];

  for (genvar r = 0; r < N; r++) begin : g_pe
    assign act_ra[1][r] = AW'(slot_pe_base[arr_slot[r]] + 10'(arr_col[r]));
    assign pe_add[r]    = act_rd[1][r];
  end

  bias_requant #(.N(N)) u_requant (
    .clk, .rst_n, .cfg_we, .cfg_slot, .cfg_bias, .cfg_mult, .cfg_shift, .cfg_relu,
    .cfg_add_pe, .in_valid(arr_valid), .in_col(arr_col), .in_slot(arr_slot),
    .in_data(arr_data), .pe_add, .out_valid(rq_valid), .out_col(rq_col),
    .out_slot(rq_slot), .out_data(rq_data));

  assign fb = rq_data;

  // softmax: exponentials into the buffer, probabilities out of it
  logic              sm_valid [N];
  logic              sm_we    [N];
  logic [CW-1:0]     sm_waddr [N];
  logic [EXP_W-1:0]  sm_wdata [N];
  for (genvar r = 0; r < N; r++) begin : g_smv
    assign sm_valid[r] = rq_valid[r] && slot_dst[rq_slot[r]] == DST_SMAX;
  end
  softmax #(.N(N)) u_softmax (
    .clk, .rst_n, .in_valid(sm_valid), .in_col(rq_col), .in_data(rq_data),
    .buf_we(sm_we), .buf_waddr(sm_waddr), .buf_wdata(sm_wdata),
    .buf_rdata(buf0w), .p_out(smax));

  // GLU: second tile gated with the first one held in the buffer
  logic              glu_in_valid [N];
  logic signed [7:0] glu_g1 [N];
  logic              glu_valid [N];
  logic [CW-1:0]     glu_col   [N];
  logic signed [7:0] glu_data  [N];
  logic [9:0]        glu_base  [N];
  for (genvar r = 0; r < N; r++) begin : g_gluv
    assign glu_in_valid[r] = rq_valid[r] && slot_dst[rq_slot[r]] == DST_GLU;
    assign buf_ra[1][r]    = rq_col[r];
    assign glu_g1[r]       = buf_rd[1][r][7:0];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) glu_base[r] <= '0;
      else        glu_base[r] <= slot_dst_base[rq_slot[r]];
    end
  end
  glu #(.N(N)) u_glu (
    .clk, .rst_n, .in_valid(glu_in_valid), .in_col(rq_col), .in_g2(rq_data),
    .buf_g1(glu_g1), .out_valid(glu_valid), .out_col(glu_col), .out_data(glu_data));

  // residual connection into the input memory
  logic signed [7:0] res_x [N], res_out [N];
  logic              res_half [N];
  for (genvar r = 0; r < N; r++) begin : g_resrd
    assign in_ra[1][r] = AW'(slot_dst_base[rq_slot[r]] + 10'(rq_col[r]));
    assign res_x[r]    = in_rd[1][r];
    assign res_half[r] = slot_half[rq_slot[r]];
  end
  residual #(.N(N)) u_residual (.half(res_half), .x(res_x), .y(rq_data), .out(res_out));

  // ---- memory writes ---------------------------------------------------------
  for (genvar r = 0; r < N; r++) begin : g_wr
    dst_e d;
    assign d = slot_dst[rq_slot[r]];
    always_comb begin
      // input memory: host load, or residual sums
      in_we[r]    = a_we || (rq_valid[r] && d == DST_RES);
      in_waddr[r] = a_we ? a_addr : AW'(slot_dst_base[rq_slot[r]] + 10'(rq_col[r]));
      in_wdata[r] = a_we ? a_data[r] : res_out[r];
      // activation memory: GLU results, or requantized results
      act_we[r]    = glu_valid[r] || (rq_valid[r] && d == DST_ACT);
      act_waddr[r] = glu_valid[r] ? AW'(glu_base[r] + 10'(glu_col[r]))
                                  : AW'(slot_dst_base[rq_slot[r]] + 10'(rq_col[r]));
      act_wdata[r] = glu_valid[r] ? glu_data[r] : rq_data[r];
      // buffer: softmax exponentials, or int8 results (Q, first GLU tile)
      buf_we[r]    = sm_we[r] || (rq_valid[r] && d == DST_BUF);
      buf_waddr[r] = sm_we[r] ? sm_waddr[r] : rq_col[r];
      buf_wdata[r] = sm_we[r] ? sm_wdata[r] : EXP_W'(rq_data[r]);
    end

    // ---- output port ----------------------------------------------------------
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        out_valid[r] <= 1'b0;
        out_addr[r]  <= '0;
        out_data[r]  <= '0;
      end else if (rq_valid[r] && d == DST_OUT) begin
        out_valid[r] <= 1'b1;
        out_addr[r]  <= AW'(slot_dst_base[rq_slot[r]] + 10'(rq_col[r]));
        out_data[r]  <= rq_data[r];
      end else begin
        out_valid[r] <= dump_valid[r];
        out_addr[r]  <= in_raddr[r];
        out_data[r]  <= dump_norm ? norm_y[r] : in0[r];
      end
    end
  end

endmodule
