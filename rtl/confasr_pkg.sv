// confasr_pkg: constants and types shared by the conformer-block accelerator.
//
// The sizes follow the accelerator's main configuration: sequence length
// s = 64 (equal to the head dimension d_h and to the MAC array edge),
// feature dimension d = 512, h = 8 heads, INT8 weights and activations.
// The requantization shifts of the normalization (S_ma = 2, S_norm = 7,
// S_cut = 8) and the constant softmax maximum (32) are the published
// values. Accumulator width, the LUT input scaling, the instruction word
// layout and the slot mechanism that tags results in flight are choices of
// this implementation.
package confasr_pkg;

  // ---- main configuration ------------------------------------------------
  localparam int S       = 64;   // sequence length = array edge = d_h
  localparam int D       = 512;  // feature dimension
  localparam int H       = 8;    // heads
  localparam int ACC_W   = 32;   // accumulator width (choice)
  localparam int ROW_W   = 8;    // width of the row tag in the stream flags
  localparam int NSLOT   = 4;    // operations whose results may be in flight
  localparam int SLOT_W  = 2;

  // ---- normalization (mean absolute) -----------------------------------
  localparam int S_MA    = 2;
  localparam int S_NORM  = 7;
  localparam int S_CUT   = 8;
  localparam int RECIP_W = 16;   // reciprocal = 2^RECIP_W / ma (choice)

  // ---- softmax / GLU -----------------------------------------------------
  localparam int SM_MAX      = 32;  // constant maximum subtracted before exp
  localparam int EXP_W       = 10;  // exp LUT output width
  localparam int SM_RECIP_SH = 24;  // reciprocal of the row sum = 2^24 / sum
  localparam int SM_OUT_SH   = 17;  // probability scale 2^7 after bit select
  localparam int SIG_W       = 8;   // sigmoid LUT output width
  // Both LUTs take their int8 input with the shared scaling factor 1/16
  // (choice; the constant itself is not published).
  localparam int LUT_FRAC    = 16;

  // ---- stream flags travelling with the top operand ----------------------
  typedef struct packed {
    logic              valid;  // operand pair is part of an accumulation
    logic              first;  // first product: accumulator restarts
    logic              last;   // last product: result is final next cycle
    logic [SLOT_W-1:0] slot;   // which operation the result belongs to
    logic [ROW_W-1:0]  row;    // active row in positional-encoding mode
  } flag_t;

  typedef enum logic [1:0] {
    MODE_MM  = 2'd0,  // matrix-matrix, operands travel right and down
    MODE_DW  = 2'd1,  // 1D depthwise convolution, left operand broadcast down a column
    MODE_POS = 2'd2   // positional encoding, one active row, weights applied directly
  } mac_mode_e;

  typedef enum logic [2:0] {
    LSRC_NORM = 3'd0,  // normalised input memory (diagonal read)
    LSRC_IN   = 3'd1,  // raw input memory (diagonal read)
    LSRC_ACT  = 3'd2,  // activation memory (diagonal or depthwise read)
    LSRC_BUF  = 3'd3,  // buffer (diagonal or positional-encoding read)
    LSRC_W    = 3'd4,  // external weights, skewed in the input control
    LSRC_SMAX = 3'd5   // softmax outputs computed from the buffer
  } lsrc_e;

  typedef enum logic [1:0] {
    TSRC_W    = 2'd0,  // external weights, skewed in the input control
    TSRC_FB   = 2'd1,  // requantized array output fed back (transposes)
    TSRC_NORM = 2'd2   // normalised input memory (diagonal read)
  } tsrc_e;

  typedef enum logic [2:0] {
    DST_ACT   = 3'd0,  // activation memory
    DST_RES   = 3'd1,  // residual add into the input memory
    DST_BUF   = 3'd2,  // buffer
    DST_GLU   = 3'd3,  // GLU with the tile held in the buffer, into activation memory
    DST_SMAX  = 3'd4,  // softmax exponentials into the buffer
    DST_OUT   = 3'd5,  // output port
    DST_NONE  = 3'd6   // only fed back to the array
  } dst_e;

  typedef enum logic [1:0] {
    OP_MAC   = 2'd0,  // one pass of the MAC array
    OP_NORM  = 2'd1,  // mean and mean-absolute statistics of the input memory
    OP_DUMP  = 2'd2   // stream the input memory (optionally normalised) to the output
  } op_e;

  typedef struct packed {
    op_e         op;
    mac_mode_e   mode;
    lsrc_e       lsrc;
    tsrc_e       tsrc;
    logic [10:0] k_len;     // accumulation length (taps in depthwise mode)
    logic [9:0]  src_base;  // first word read from the diagonal source
    dst_e        dst;
    logic [9:0]  dst_base;  // first word written (residual / activation tile)
    logic [9:0]  pe_base;   // activation tile added as positional encoding
    logic        add_pe;
    logic        relu;
    logic        res_half;  // residual adds half of the module output
    logic        use_norm;  // OP_DUMP: normalise on the way out
    logic [15:0] req_mult;  // requantization multiplier
    logic [4:0]  req_shift; // requantization shift (rounding)
  } instr_t;

  // Saturate a signed value to int8.
  function automatic logic signed [7:0] sat8(input logic signed [47:0] v);
    if (v > 48'sd127)       return 8'sd127;
    else if (v < -48'sd128) return -8'sd128;
    else                    return v[7:0];
  endfunction

  // exp LUT: round((2^EXP_W - 1) * exp(-m / LUT_FRAC)), m = 0..255,
  // computed with integer arithmetic: e^(-1/16) in Q30 raised to m.
  typedef logic [EXP_W-1:0] exp_lut_t [256];
  function automatic exp_lut_t gen_exp_lut();
    exp_lut_t t;
    longint v;
    v = 64'd1 << 30;                          // 1.0 in Q30
    for (int m = 0; m < 256; m++) begin
      t[m] = EXP_W'(((v * ((1 << EXP_W) - 1)) + (64'd1 << 29)) >> 30);
      v = (v * 64'd1008687096 + (64'd1 << 29)) >> 30; // e^(-1/16) * 2^30
    end
    return t;
  endfunction

  // Sigmoid LUT indexed by the int8 input as unsigned byte:
  // round(255 * 1 / (1 + exp(-x / LUT_FRAC))).
  typedef logic [SIG_W-1:0] sig_lut_t [256];
  function automatic sig_lut_t gen_sig_lut();
    sig_lut_t t;
    longint e [129];
    longint v, num, den;
    v = 64'd1 << 30;
    for (int m = 0; m <= 128; m++) begin
      e[m] = v;                               // exp(-m/16) in Q30
      v = (v * 64'd1008687096 + (64'd1 << 29)) >> 30;
    end
    for (int i = 0; i < 256; i++) begin
      int x;
      int m;
      x = (i < 128) ? i : i - 256;
      m = (x < 0) ? -x : x;
      if (x >= 0) begin                       // 1/(1+e^-m)
        num = 64'd255 << 30;
        den = (64'd1 << 30) + e[m];
      end else begin                          // e^-m/(1+e^-m)
        num = 64'd255 * e[m];
        den = (64'd1 << 30) + e[m];
      end
      t[i] = SIG_W'((num + den / 2) / den);
    end
    return t;
  endfunction

endpackage
