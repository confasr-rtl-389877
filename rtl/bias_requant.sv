// bias_requant: bias addition and requantization of the array outputs.
//
// Each of the N row lanes takes one accumulator value per cycle together
// with its column index and slot tag from the MAC array and computes
//   t = acc + bias[slot][col] (+ pe_add when the slot adds the positional
//       encoding term read from the activation memory)
//   y = sat8((t * mult + 2^(shift-1)) >>> shift), then ReLU if enabled.
// An addition ahead of a multiply-and-bit-select requantizer, with rounding
// to nearest, is the published structure; the same adder adds the
// positional-encoding scores to Q*K^T, and a batch normalization can be
// folded into bias and multiplier. The ReLU placed here, the rounding of
// ties upward and the per-slot configuration table are choices of this
// design.
//
// Configuration: cfg_we writes the bias vector (one value per output
// column), multiplier, shift, ReLU and positional-encoding enables of one
// slot. Results of several operations can be in flight at once, each
// tagged with its slot. Timing: one register stage (result one cycle after
// the input).
module bias_requant
  import confasr_pkg::*;
#(
  parameter int N = 64,
  localparam int CW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    cfg_we,
  input  logic [SLOT_W-1:0]       cfg_slot,
  input  logic signed [ACC_W-1:0] cfg_bias [N],
  input  logic [15:0]             cfg_mult,
  input  logic [4:0]              cfg_shift,
  input  logic                    cfg_relu,
  input  logic                    cfg_add_pe,
  input  logic                    in_valid [N],
  input  logic [CW-1:0]           in_col   [N],
  input  logic [SLOT_W-1:0]       in_slot  [N],
  input  logic signed [ACC_W-1:0] in_data  [N],
  input  logic signed [7:0]       pe_add   [N],
  output logic                    out_valid [N],
  output logic [CW-1:0]           out_col   [N],
  output logic [SLOT_W-1:0]       out_slot  [N],
  output logic signed [7:0]       out_data  [N]
);

  localparam int NS = 1 << SLOT_W;

  logic signed [ACC_W-1:0] bias  [NS][N];
  logic [15:0]             mult  [NS];
  logic [4:0]              shift [NS];
  logic                    relu  [NS];
  logic                    addpe [NS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NS; s++) begin
        mult[s]  <= '0;
        shift[s] <= '0;
        relu[s]  <= 1'b0;
        addpe[s] <= 1'b0;
        for (int c = 0; c < N; c++) bias[s][c] <= '0;
      end
    end else if (cfg_we) begin
      mult[cfg_slot]  <= cfg_mult;
      shift[cfg_slot] <= cfg_shift;
      relu[cfg_slot]  <= cfg_relu;
      addpe[cfg_slot] <= cfg_add_pe;
      for (int c = 0; c < N; c++) bias[cfg_slot][c] <= cfg_bias[c];
    end
  end

  for (genvar r = 0; r < N; r++) begin : g_lane
    logic signed [47:0] t, p, rnd;
    logic signed [7:0]  y;
    logic [SLOT_W-1:0]  s;

    always_comb begin
      s   = in_slot[r];
      t   = 48'(in_data[r]) + 48'(bias[s][in_col[r]])
          + (addpe[s] ? 48'(pe_add[r]) : 48'sd0);
      p   = t * $signed({32'd0, mult[s]});
      rnd = (shift[s] == 0) ? 48'sd0 : (48'sd1 <<< (shift[s] - 5'd1));
      y   = sat8((p + rnd) >>> shift[s]);
      if (relu[s] && y < 0) y = '0;
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        out_valid[r] <= 1'b0;
        out_col[r]   <= '0;
        out_slot[r]  <= '0;
        out_data[r]  <= '0;
      end else begin
        out_valid[r] <= in_valid[r];
        out_col[r]   <= in_col[r];
        out_slot[r]  <= in_slot[r];
        out_data[r]  <= in_valid[r] ? y : 8'sd0;
      end
    end
  end

endmodule
