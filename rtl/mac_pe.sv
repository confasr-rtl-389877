// mac_pe: one processing element of the output-stationary MAC array.
//
// Each PE holds the operand registers A and B and an accumulator. Both
// operands have an input multiplexer chosen by the array mode:
//   A: from the left neighbour (matrix product, positional encoding) or
//      the depthwise-convolution broadcast of its column (MODE_DW);
//   B: from the PE above (matrix product, depthwise convolution) or
//      applied directly from the array top (MODE_POS, only while the
//      stream's row tag names this PE's row).
// The stream flags (valid/first/last/slot) travel with B. One cycle after
// the operands are registered the product is accumulated; a "first"
// product restarts the accumulator and a "last" one raises done for one
// cycle, during which acc holds the final sum. The accumulator and done
// only change for valid operands, which stands for the clock-gated
// registers of the published PE.
module mac_pe
  import confasr_pkg::*;
#(
  parameter int ROW = 0
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  mac_mode_e               mode,
  input  logic signed [7:0]       a_left,  // from left neighbour
  input  logic signed [7:0]       a_dw,    // depthwise broadcast of this column
  input  logic signed [7:0]       b_up,    // from PE above
  input  flag_t                   f_up,
  input  logic signed [7:0]       b_pe,    // direct top operand (positional encoding)
  input  flag_t                   f_pe,
  output logic signed [7:0]       a_q,
  output logic signed [7:0]       b_q,
  output flag_t                   f_q,
  output logic signed [ACC_W-1:0] acc,
  output logic                    done,
  output logic [SLOT_W-1:0]       done_slot
);

  logic signed [7:0] a_src, b_src;
  flag_t             f_src;
  logic signed [15:0] prod;

  always_comb begin
    a_src = (mode == MODE_DW) ? a_dw : a_left;
    if (mode == MODE_POS) begin
      b_src       = b_pe;
      f_src       = f_pe;
      f_src.valid = f_pe.valid && (f_pe.row == ROW_W'(ROW));
    end else begin
      b_src = b_up;
      f_src = f_up;
    end
  end

  assign prod = a_q * b_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q       <= '0;
      b_q       <= '0;
      f_q       <= '0;
      acc       <= '0;
      done      <= 1'b0;
      done_slot <= '0;
    end else begin
      a_q  <= a_src;
      b_q  <= b_src;
      f_q  <= f_src;
      done <= f_q.valid && f_q.last;
      if (f_q.valid) begin
        acc       <= f_q.first ? ACC_W'(prod) : acc + ACC_W'(prod);
        done_slot <= f_q.slot;
      end
    end
  end

endmodule
