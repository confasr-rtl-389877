// tb_ma_norm: self-checking test of the mean-absolute normalization
// (N = 4 lanes, statistics over NP = 8 features of a 16-feature row).
// Runs the two statistics passes over the first NP features, then streams
// all features diagonally (lane r reads feature k in cycle T + r + k) with
// gamma_k presented in cycle T + k, and compares every output with an
// integer reference of the normalization formula.
module tb_ma_norm;
  import confasr_pkg::*;
  localparam int N = 4, NP_LOG2 = 3, NP = 8, DF = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic signed [7:0] x [N], y [N];
  logic stat_valid, stat_phase, stat_first, stat_last;
  logic signed [7:0] gamma_in;
  int checks = 0, failures = 0;
  ma_norm #(.N(N), .NP_LOG2(NP_LOG2)) dut (.*);

  logic signed [7:0] X [N][DF];
  logic signed [7:0] G [DF];

  function automatic int asr(longint v, int s);   // arithmetic shift right
    return int'(v >>> s);
  endfunction

  function automatic int ref_y(int r, int k);
    longint sum, sabs, ma, recip, t1, t2, t3;
    int mu;
    sum = 0;
    for (int j = 0; j < NP; j++) sum += X[r][j];
    mu = asr(sum, NP_LOG2);
    sabs = 0;
    for (int j = 0; j < NP; j++) sabs += (X[r][j] - mu < 0) ? mu - X[r][j] : X[r][j] - mu;
    ma = (sabs << S_MA) >> NP_LOG2;
    if (ma == 0) ma = 1;
    recip = (longint'(1) << RECIP_W) / ma;
    t1 = longint'(X[r][k] - mu) * (1 << S_NORM);
    t2 = (t1 * recip) >>> RECIP_W;
    t3 = (t2 * G[k]) >>> S_CUT;
    if (t3 > 127) t3 = 127;
    if (t3 < -128) t3 = -128;
    return int'(t3);
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    stat_valid = 0; stat_phase = 0; stat_first = 0; stat_last = 0; gamma_in = 0;
    for (int r = 0; r < N; r++) x[r] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 6; rep++) begin
      for (int r = 0; r < N; r++)
        for (int k = 0; k < DF; k++)
          X[r][k] = (rep == 5 && r == 0) ? 8'sd9 : 8'($signed($urandom) >>> (rep % 4));
      for (int k = 0; k < DF; k++) G[k] = 8'($urandom);
      // statistics: two passes, all lanes in parallel
      for (int ph = 0; ph < 2; ph++)
        for (int j = 0; j < NP; j++) begin
          @(negedge clk);
          stat_valid = 1; stat_phase = 1'(ph); stat_first = (j == 0); stat_last = (j == NP - 1);
          for (int r = 0; r < N; r++) x[r] = X[r][j];
        end
      @(negedge clk);
      stat_valid = 0; stat_first = 0; stat_last = 0;
      // diagonal output stream
      for (int t = 0; t < DF + N - 1; t++) begin
        gamma_in = (t < DF) ? G[t] : 8'($urandom);
        for (int r = 0; r < N; r++) x[r] = (t - r >= 0 && t - r < DF) ? X[r][t - r] : 8'sd0;
        #1;
        for (int r = 0; r < N; r++)
          if (t - r >= 0 && t - r < DF) begin
            int e;
            e = ref_y(r, t - r);
            checks++;
            if (int'(y[r]) != e) begin
              failures++;
              $display("FAIL rep %0d lane %0d k %0d: %0d exp %0d", rep, r, t - r, y[r], e);
            end
          end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
