// residual: residual connection of a conformer sub-module, one lane per row.
//
// Adds a module output y to the value x held in the input memory at the
// same position and saturates to int8: out = sat8(x + y), or
// out = sat8(x + (y >>> 1)) when the lane's half is set, the one-half weighting of
// the two feed-forward modules. The sum is written back to the input
// memory, so the next module starts from it. Halving by an arithmetic
// shift and saturation are choices of this design. Combinational.
module residual
  import confasr_pkg::*;
#(
  parameter int N = 64
) (
  input  logic              half [N],
  input  logic signed [7:0] x [N],
  input  logic signed [7:0] y [N],
  output logic signed [7:0] out [N]
);

  for (genvar r = 0; r < N; r++) begin : g_lane
    logic signed [8:0] yy;
    assign yy     = half[r] ? (9'(y[r]) >>> 1) : 9'(y[r]);
    assign out[r] = sat8(48'(9'(x[r]) + yy));
  end

endmodule
