// glu: gated linear unit GLU(G1, G2) = G1 * sigmoid(G2), one lane per row.
//
// The pointwise convolution ahead of the GLU produces 2d features. Its
// output tiles are computed in an order that first stores a G1 tile in the
// shared buffer and then produces the matching G2 tile (h tiles later in
// the feature dimension). Each G2 value arriving here, with its column,
// goes through a sigmoid LUT (8-bit output, shared scaling factor for all
// blocks), is multiplied with the G1 value read from the buffer at the
// same column, registered and bit-selected:
//   out = sat8((g1 * SIG_LUT[g2] + 128) >>> 8)
// The LUT, the shared scale and the reuse of the buffer are published;
// the LUT input scale 1/LUT_FRAC, the 255 full scale and the rounding are
// choices of this design. Timing: one register stage.
module glu
  import confasr_pkg::*;
#(
  parameter int N = 64,
  localparam int CW = (N > 1) ? $clog2(N) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid [N],
  input  logic [CW-1:0]     in_col   [N],
  input  logic signed [7:0] in_g2    [N],
  input  logic signed [7:0] buf_g1   [N],
  output logic              out_valid [N],
  output logic [CW-1:0]     out_col   [N],
  output logic signed [7:0] out_data  [N]
);

  localparam sig_lut_t SIG_LUT = gen_sig_lut();

  for (genvar r = 0; r < N; r++) begin : g_lane
    logic signed [17:0] prod;
    assign prod = 18'(buf_g1[r]) * $signed({1'b0, SIG_LUT[in_g2[r]]}) + 18'sd128;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        out_valid[r] <= 1'b0;
        out_col[r]   <= '0;
        out_data[r]  <= '0;
      end else begin
        out_valid[r] <= in_valid[r];
        out_col[r]   <= in_col[r];
        out_data[r]  <= sat8(48'(prod >>> 8));
      end
    end
  end

endmodule
