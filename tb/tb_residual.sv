// tb_residual: self-checking test of the residual adder: random int8
// operands, full and half weighting per lane, saturation at both ends.
module tb_residual;
  import confasr_pkg::*;
  localparam int N = 4;
  logic              half [N];
  logic signed [7:0] x [N], y [N], out [N];
  int checks = 0, failures = 0;
  residual #(.N(N)) dut (.*);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int it = 0; it < 2000; it++) begin
      int e;
      for (int r = 0; r < N; r++) begin
        x[r] = 8'($urandom); y[r] = 8'($urandom); half[r] = 1'($urandom);
      end
      if (it == 0) begin x[0] = 127; y[0] = 127; half[0] = 0; x[1] = -128; y[1] = -128; half[1] = 1; end
      #1;
      for (int r = 0; r < N; r++) begin
        e = int'(x[r]) + (half[r] ? ((int'(y[r]) < 0) ? -((-int'(y[r]) + 1) / 2) : int'(y[r]) / 2) : int'(y[r]));
        if (e > 127) e = 127;
        if (e < -128) e = -128;
        checks++;
        if (int'(out[r]) != e) begin
          failures++;
          $display("FAIL x=%0d y=%0d half=%0d out=%0d exp=%0d", x[r], y[r], half[r], out[r], e);
        end
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
