// mac_array: N x N output-stationary MAC array.
//
// Operands enter at the left edge (one int8 per row) and at the top edge
// (one int8 per column, with the stream flags). In MODE_MM, A moves one PE
// to the right and B one PE down per cycle, so PE(r,c) accumulates
// sum_k left_r[k] * top_c[k] when the edges are fed skewed: row r delayed
// by r cycles, column c by c cycles. In MODE_DW the value at the left edge
// of row c is broadcast to every PE of column c while the weights keep
// moving down, which turns each column into a 1D depthwise convolution
// over the sequence (PE(r,c) produces output position r of channel c).
// In MODE_POS only the row named by the flags' row tag accumulates, with
// the weights applied directly from the top edge, so each row can be
// multiplied with its own matrix.
//
// Readout: a PE whose last product was accumulated raises done for one
// cycle. Because the flags move diagonally, at most one PE per row is done
// in any cycle; each row presents that PE's sum, its column index and its
// slot tag on out_valid/out_col/out_slot/out_data. For back-to-back
// accumulations in MODE_MM the row outputs therefore leave as a diagonal
// wavefront: row r, column c is presented at cycle T + K + 1 + r + c when
// the edge feeding of a K-long accumulation started at cycle T.
module mac_array
  import confasr_pkg::*;
#(
  parameter int N = 64,
  localparam int CW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  mac_mode_e               mode,
  input  logic signed [7:0]       left_in  [N],
  input  logic signed [7:0]       top_in   [N],
  input  flag_t                   top_flag [N],
  output logic                    out_valid [N],
  output logic [CW-1:0]           out_col   [N],
  output logic [SLOT_W-1:0]       out_slot  [N],
  output logic signed [ACC_W-1:0] out_data  [N]
);

  logic signed [7:0]       a_q  [N][N];
  logic signed [7:0]       b_q  [N][N];
  flag_t                   f_q  [N][N];
  logic signed [ACC_W-1:0] acc  [N][N];
  logic                    done [N][N];
  logic [SLOT_W-1:0]       dslt [N][N];

  for (genvar r = 0; r < N; r++) begin : g_row
    for (genvar c = 0; c < N; c++) begin : g_col
      logic signed [7:0] a_left, b_up;
      flag_t             f_up;
      if (c == 0) begin : g_l
        assign a_left = left_in[r];
      end else begin : g_n
        assign a_left = a_q[r][c-1];
      end
      if (r == 0) begin : g_t
        assign b_up = top_in[c];
        assign f_up = top_flag[c];
      end else begin : g_u
        assign b_up = b_q[r-1][c];
        assign f_up = f_q[r-1][c];
      end
      mac_pe #(.ROW(r)) u_pe (
        .clk      (clk),
        .rst_n    (rst_n),
        .mode     (mode),
        .a_left   (a_left),
        .a_dw     (left_in[c]),
        .b_up     (b_up),
        .f_up     (f_up),
        .b_pe     (top_in[c]),
        .f_pe     (top_flag[c]),
        .a_q      (a_q[r][c]),
        .b_q      (b_q[r][c]),
        .f_q      (f_q[r][c]),
        .acc      (acc[r][c]),
        .done     (done[r][c]),
        .done_slot(dslt[r][c])
      );
    end

    // Row readout: AND-OR selection of the (single) done PE.
    always_comb begin
      out_valid[r] = 1'b0;
      out_col[r]   = '0;
      out_slot[r]  = '0;
      out_data[r]  = '0;
      for (int c = 0; c < N; c++) begin
        if (done[r][c]) begin
          out_valid[r] = 1'b1;
          out_col[r]   = out_col[r]  | CW'(c);
          out_slot[r]  = out_slot[r] | dslt[r][c];
          out_data[r]  = out_data[r] | acc[r][c];
        end
      end
    end
  end

endmodule
