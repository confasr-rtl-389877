// input_control: selects and aligns the operands at the MAC array edges.
//
// Left edge (one int8 per row): normalised or raw input memory, activation
// memory, buffer, softmax output, or external weights. Top edge (one int8
// per column): external weights, the requantized array output fed back
// (which transposes it, see below), or the normalised input memory.
//
// The array needs its edges skewed: lane j one cycle later than lane j-1.
// Memory sources already arrive skewed because the memories are read
// diagonally, and the fed-back output leaves the array as a diagonal
// wavefront. Only the external weights, presented as one vector per
// cycle, pass through triangular skew registers here (lane j delayed by
// j cycles). The stream flags and both source selects are skewed the
// same way, so that a lane changes source exactly when the operation that
// owns it changes, even while the previous operation is still streaming
// on higher lanes.
//
// In depthwise mode the activation memory is read along the anti-diagonal
// (bank b at word t - P - b); lane c then takes bank dw_rot - c, with
// dw_rot = t - P, which delivers channel c's sequence to lane c.
// Feeding back row r of the output (element c in cycle T + r + c) into top
// lane r gives the transposed matrix as the next right-hand operand.
module input_control
  import confasr_pkg::*;
#(
  parameter int N = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  input  lsrc_e             lsrc,
  input  tsrc_e             tsrc,
  input  mac_mode_e         mode,
  input  flag_t             flag_in,
  input  logic signed [7:0] w        [N],
  input  logic signed [7:0] norm_y   [N],
  input  logic signed [7:0] in_rd    [N],
  input  logic signed [7:0] act_rd   [N],
  input  logic signed [11:0] dw_rot,
  input  logic signed [7:0] buf_rd   [N],
  input  logic signed [7:0] smax     [N],
  input  logic signed [7:0] fb       [N],
  output logic signed [7:0] left_out [N],
  output logic signed [7:0] top_out  [N],
  output flag_t             flag_out [N]
);

  // Skewed copies: lane j sees the input of j cycles ago.
  logic signed [7:0] w_s [N];   // weights, for either edge
  lsrc_e             ls  [N];
  tsrc_e             ts  [N];

  assign w_s[0]      = w[0];
  assign ls[0]       = lsrc;
  assign ts[0]       = tsrc;
  assign flag_out[0] = flag_in;

  for (genvar j = 1; j < N; j++) begin : g_skew
    logic signed [7:0] wsr [j];
    flag_t             fsr [j];
    lsrc_e             lsr [j];
    tsrc_e             tsr [j];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < j; i++) begin
          wsr[i] <= '0;
          fsr[i] <= '0;
          lsr[i] <= LSRC_NORM;
          tsr[i] <= TSRC_W;
        end
      end else begin
        wsr[0] <= w[j];
        fsr[0] <= flag_in;
        lsr[0] <= lsrc;
        tsr[0] <= tsrc;
        for (int i = 1; i < j; i++) begin
          wsr[i] <= wsr[i-1];
          fsr[i] <= fsr[i-1];
          lsr[i] <= lsr[i-1];
          tsr[i] <= tsr[i-1];
        end
      end
    end
    assign w_s[j]      = wsr[j-1];
    assign flag_out[j] = fsr[j-1];
    assign ls[j]       = lsr[j-1];
    assign ts[j]       = tsr[j-1];
  end

  for (genvar j = 0; j < N; j++) begin : g_lane
    logic signed [7:0] act_sel;
    always_comb begin
      act_sel = act_rd[j];
      if (mode == MODE_DW) begin
        act_sel = '0;
        for (int b = 0; b < N; b++)
          if (32'(dw_rot) - j == b) act_sel = act_rd[b];
      end
      unique case (ls[j])
        LSRC_NORM: left_out[j] = norm_y[j];
        LSRC_IN:   left_out[j] = in_rd[j];
        LSRC_ACT:  left_out[j] = act_sel;
        LSRC_BUF:  left_out[j] = buf_rd[j];
        LSRC_W:    left_out[j] = w_s[j];
        LSRC_SMAX: left_out[j] = smax[j];
        default:   left_out[j] = '0;
      endcase
      unique case (ts[j])
        TSRC_W:    top_out[j] = w_s[j];
        TSRC_FB:   top_out[j] = fb[j];
        TSRC_NORM: top_out[j] = norm_y[j];
        default:   top_out[j] = '0;
      endcase
    end
  end

endmodule
