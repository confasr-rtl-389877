// ma_norm: integer mean-absolute (MA) normalization, one lane per row.
//
// Instead of layer normalization (which needs a square root) each row x of
// the input memory is normalised as
//   y_j = sat8( ((((x_j - mu) << S_NORM) * recip) >>> RECIP_W) * gamma_j >>> S_CUT )
// with mu the mean and ma the mean absolute deviation of the first NP
// features of the row only (half of d in the main configuration), and
//   recip = 2^RECIP_W / max(1, (sum|x_j - mu| << S_MA) >> log2(NP)).
// There is no bias (beta) term. The shifts S_MA = 2, S_NORM = 7 and
// S_CUT = 8 are the published ones; using a reciprocal plus multiply for
// the division, the exact rounding (arithmetic shifts, truncating) and
// computing mu before ma in two passes are choices of this design.
//
// Statistics: the controller streams the first NP words of every row, all
// lanes at once, twice: stat_phase 0 accumulates x and ends (stat_last) by
// storing mu; stat_phase 1 accumulates |x - mu| and ends by storing recip.
// mu and recip stay in their (gated) registers, so normalised outputs can
// then be recomputed from the input memory whenever a later step needs
// them. Output: y is combinational from x and the lane's gamma. gamma_in
// carries gamma for the feature read by lane 0 in this cycle; lane r uses
// it r cycles later, matching the diagonal read of the input memory.
module ma_norm
  import confasr_pkg::*;
#(
  parameter int N       = 64,
  parameter int NP_LOG2 = 8     // log2 of the features used for the statistics
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic signed [7:0] x [N],
  input  logic              stat_valid,
  input  logic              stat_phase,
  input  logic              stat_first,
  input  logic              stat_last,
  input  logic signed [7:0] gamma_in,
  output logic signed [7:0] y [N]
);

  logic signed [7:0] gamma_l [N];
  assign gamma_l[0] = gamma_in;
  for (genvar r = 1; r < N; r++) begin : g_gskew
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) gamma_l[r] <= '0;
      else        gamma_l[r] <= gamma_l[r-1];
    end
  end

  for (genvar r = 0; r < N; r++) begin : g_lane
    logic signed [31:0]     acc, term, sum;
    logic signed [9:0]      mu;
    logic [RECIP_W:0]       recip;
    logic signed [9:0]      dx;
    logic [31:0]            ma;
    logic signed [47:0]     t1, t2, t3;

    assign dx   = 10'(x[r]) - mu;
    assign term = stat_phase ? ((dx < 0) ? -32'(dx) : 32'(dx)) : 32'(x[r]);
    assign sum  = (stat_first ? 32'sd0 : acc) + term;
    assign ma   = (32'(sum) << S_MA) >> NP_LOG2;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        acc   <= '0;
        mu    <= '0;
        recip <= '0;
      end else if (stat_valid) begin
        acc <= sum;
        if (stat_last && !stat_phase) mu <= 10'(sum >>> NP_LOG2);
        if (stat_last && stat_phase)
          recip <= (RECIP_W+1)'((33'd1 << RECIP_W) / ((ma == 0) ? 33'd1 : 33'(ma)));
      end
    end

    assign t1   = 48'(dx) <<< S_NORM;
    assign t2   = (t1 * $signed({1'b0, 47'(recip)})) >>> RECIP_W;
    assign t3   = t2 * 48'(gamma_l[r]);
    assign y[r] = sat8(t3 >>> S_CUT);
  end

endmodule
