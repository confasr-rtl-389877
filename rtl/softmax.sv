// softmax: integer softmax over the rows of an attention score matrix.
//
// All heads and blocks share one input scaling factor (1/LUT_FRAC), so a
// single exp LUT serves every softmax, and the maximum subtracted before
// the exponential is the constant SM_MAX = 32 instead of the row maximum,
// which saves a second read of the scores. Each of the N row lanes works
// in two phases:
//   phase 1 (scores arrive, one per lane and cycle, with their column):
//     e = EXP_LUT[min(255, max(0, SM_MAX - score))]   (10 bit)
//     e is written to the shared buffer at the score's column and added
//     to the row sum; with column N-1 the reciprocal
//     recip = 2^SM_RECIP_SH / sum is stored.
//   phase 2 (buffer read back in any order):
//     p = min(127, (e * recip + 2^(SM_OUT_SH-1)) >> SM_OUT_SH)
//     an unsigned probability with scale 2^-7 (rounded, truncated and
//     clipped: the bit selection).
// The constant maximum, 10-bit LUT words and the shared buffer follow the
// published module; the LUT scaling, the reciprocal width and the output
// scale are choices of this design. A row sum of zero yields the largest
// reciprocal. Timing: phase 1 results are written in the input cycle, the
// reciprocal is ready one cycle after column N-1; phase 2 is combinational
// from the buffer read data.
module softmax
  import confasr_pkg::*;
#(
  parameter int N = 64,
  localparam int CW = (N > 1) ? $clog2(N) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid [N],
  input  logic [CW-1:0]     in_col   [N],
  input  logic signed [7:0] in_data  [N],
  output logic              buf_we    [N],
  output logic [CW-1:0]     buf_waddr [N],
  output logic [EXP_W-1:0]  buf_wdata [N],
  input  logic [EXP_W-1:0]  buf_rdata [N],
  output logic signed [7:0] p_out     [N]
);

  localparam exp_lut_t EXP_LUT = gen_exp_lut();
  localparam int SUM_W = EXP_W + CW + 1;

  for (genvar r = 0; r < N; r++) begin : g_lane
    logic signed [9:0]   x;
    logic [7:0]          m;
    logic [EXP_W-1:0]    e;
    logic [SUM_W-1:0]    sum, sum_n;
    logic [SM_RECIP_SH:0] recip;
    logic [SM_RECIP_SH+EXP_W:0] prod;

    always_comb begin
      x = 10'sd32 - 10'(in_data[r]);           // max - score
      if (x < 0)        m = 8'd0;              // score above the constant max
      else if (x > 255) m = 8'd255;
      else              m = x[7:0];
      e     = EXP_LUT[m];
      sum_n = ((in_col[r] == '0) ? '0 : sum) + SUM_W'(e);
    end

    assign buf_we[r]    = in_valid[r];
    assign buf_waddr[r] = in_col[r];
    assign buf_wdata[r] = e;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        sum   <= '0;
        recip <= '0;
      end else if (in_valid[r]) begin
        sum <= sum_n;
        if (in_col[r] == CW'(N - 1))
          recip <= (sum_n == '0) ? {(SM_RECIP_SH+1){1'b1}}
                                 : (SM_RECIP_SH+1)'((64'd1 << SM_RECIP_SH) / 64'(sum_n));
      end
    end

    always_comb begin
      prod = (SM_RECIP_SH+EXP_W+1)'(buf_rdata[r]) * (SM_RECIP_SH+EXP_W+1)'(recip)
           + (SM_RECIP_SH+EXP_W+1)'(1 << (SM_OUT_SH - 1));
      prod = prod >> SM_OUT_SH;
      p_out[r] = (prod > 127) ? 8'sd127 : 8'(prod);
    end
  end

endmodule
