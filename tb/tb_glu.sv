// tb_glu: self-checking test of the GLU lanes. The reference computes the
// sigmoid with real arithmetic, sigma(x/16) * 255 rounded, and the gated
// product with rounding and saturation; the result must appear one cycle
// after the input together with valid and column.
module tb_glu;
  import confasr_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic              in_valid [N];
  logic [1:0]        in_col   [N];
  logic signed [7:0] in_g2    [N];
  logic signed [7:0] buf_g1   [N];
  logic              out_valid [N];
  logic [1:0]        out_col   [N];
  logic signed [7:0] out_data  [N];
  int checks = 0, failures = 0;
  glu #(.N(N)) dut (.*);

  function automatic int ref_glu(int g1, int g2);
    real s;
    int  si, p;
    s  = 1.0 / (1.0 + $exp(-real'(g2) / 16.0));
    si = int'($floor(255.0 * s + 0.5));
    p  = g1 * si + 128;
    p  = (p >= 0) ? p / 256 : -((-p + 255) / 256);
    if (p > 127) p = 127;
    if (p < -128) p = -128;
    return p;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int e [N];
    logic v [N];
    logic [1:0] c [N];
    for (int r = 0; r < N; r++) begin in_valid[r] = 0; in_col[r] = 0; in_g2[r] = 0; buf_g1[r] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 600; it++) begin
      @(negedge clk);
      for (int r = 0; r < N; r++) begin
        in_valid[r] = 1'($urandom); in_col[r] = 2'($urandom);
        in_g2[r] = 8'($urandom); buf_g1[r] = 8'($urandom);
        if (it < 256) in_g2[r] = 8'(it);     // sweep the whole LUT once
        e[r] = ref_glu(buf_g1[r], in_g2[r]); v[r] = in_valid[r]; c[r] = in_col[r];
      end
      @(negedge clk);
      for (int r = 0; r < N; r++) begin
        checks++;
        if (out_valid[r] != v[r] || out_col[r] != c[r] || int'(out_data[r]) != e[r]) begin
          failures++;
          $display("FAIL lane %0d: out %0d exp %0d (v %0d/%0d)", r, out_data[r], e[r], out_valid[r], v[r]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
