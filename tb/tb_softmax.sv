// tb_softmax: self-checking test of the integer softmax (N = 4 lanes,
// rows of 4 scores) together with a banked buffer. Phase 1 streams each
// row's scores with their columns in ascending order, lane r starting r
// cycles after lane 0 as the array delivers them; phase 2 reads the buffer back. The reference uses real
// arithmetic for exp(-(32 - score)/16) * 1023 and integer arithmetic for
// the sum, reciprocal and bit selection. A second check compares the
// probabilities with the real softmax to within 3/128.
module tb_softmax;
  import confasr_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid [N];
  logic [1:0] in_col [N];
  logic signed [7:0] in_data [N];
  logic buf_we [N];
  logic [1:0] buf_waddr [N];
  logic [EXP_W-1:0] buf_wdata [N];
  logic [EXP_W-1:0] buf_rdata [N];
  logic signed [7:0] p_out [N];
  logic [1:0] raddr [1][N];
  logic [EXP_W-1:0] rdata [1][N];
  int checks = 0, failures = 0;

  softmax #(.N(N)) dut (.*);
  row_memory #(.BANKS(N), .DEPTH(N), .WIDTH(EXP_W), .NRD(1)) u_buf (
    .clk, .we(buf_we), .waddr(buf_waddr), .wdata(buf_wdata), .raddr, .rdata);
  for (genvar r = 0; r < N; r++) begin : g_b
    assign buf_rdata[r] = rdata[0][r];
  end

  function automatic int lut(int score);
    int m;
    m = 32 - score;
    if (m < 0) m = 0;
    if (m > 255) m = 255;
    return int'($floor(1023.0 * $exp(-real'(m) / 16.0) + 0.5));
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sc [N][N];
    for (int r = 0; r < N; r++) begin in_valid[r] = 0; in_col[r] = 0; in_data[r] = 0; raddr[0][r] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 40; rep++) begin
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) sc[r][c] = (rep < 5) ? int'($signed(8'($urandom))) : int'($signed(8'($urandom))) / 4;
      for (int t = 0; t < 2 * N - 1; t++) begin
        @(negedge clk);
        for (int r = 0; r < N; r++) begin
          int cc;
          cc = t - r;                       // diagonal arrival, as from the array
          in_valid[r] = (cc >= 0 && cc < N); in_col[r] = 2'(cc); in_data[r] = 8'(sc[r][cc & 3]);
        end
      end
      @(negedge clk);
      for (int r = 0; r < N; r++) in_valid[r] = 0;
      for (int c = 0; c < N; c++) begin
        @(negedge clk);
        for (int r = 0; r < N; r++) raddr[0][r] = 2'((c + r) % N);
        #1;
        for (int r = 0; r < N; r++) begin
          longint sum, recip, p;
          real rs, rp;
          int cc;
          cc = (c + r) % N;
          sum = 0; rs = 0.0;
          for (int k = 0; k < N; k++) begin
            sum += lut(sc[r][k]);
            rs += $exp(real'(sc[r][k]) / 16.0);
          end
          recip = (sum == 0) ? ((longint'(1) << 25) - 1) : (longint'(1) << 24) / sum;
          p = (lut(sc[r][cc]) * recip + (1 << 16)) >> 17;
          if (p > 127) p = 127;
          checks++;
          if (longint'(p_out[r]) != p) begin
            failures++;
            $display("FAIL lane %0d col %0d: %0d exp %0d", r, cc, p_out[r], p);
          end
          // against the real softmax, when no score exceeds the constant max
          rp = $exp(real'(sc[r][cc]) / 16.0) / rs * 128.0;
          if (sc[r][0] <= 32 && sc[r][1] <= 32 && sc[r][2] <= 32 && sc[r][3] <= 32 && sum > 0) begin
            checks++;
            if (rp - real'(p_out[r]) > 3.0 || real'(p_out[r]) - rp > 3.0) begin
              failures++;
              $display("FAIL accuracy lane %0d: %0d vs %f", r, p_out[r], rp);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
