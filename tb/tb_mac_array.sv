// tb_mac_array: self-checking test of the N x N array (N = 4).
// MODE_MM: two back-to-back random products C = A*B with skewed edges;
//   every output must appear once, at cycle T + K + 1 + r + c, with the
//   right column, slot and value.
// MODE_DW: per-channel 1D convolution with K taps and zero padding;
//   PE(r,c) must hold y_c[r] = sum_j w_c[j] * x_c[r + j - P].
// MODE_POS: row i is multiplied with its own matrix R_i.
module tb_mac_array;
  import confasr_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  mac_mode_e mode;
  logic signed [7:0] left_in [N], top_in [N];
  flag_t top_flag [N];
  logic out_valid [N];
  logic [1:0] out_col [N];
  logic [SLOT_W-1:0] out_slot [N];
  logic signed [ACC_W-1:0] out_data [N];
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  mac_array #(.N(N)) dut (.*);

  // expected outputs: value and cycle per (row, col), per test
  int exp_val [N][N];
  int exp_cyc [N][N];
  int seen    [N][N];
  logic [SLOT_W-1:0] exp_slot;

  always @(negedge clk) begin
    for (int r = 0; r < N; r++)
      if (out_valid[r]) begin
        int c;
        c = int'(out_col[r]);
        checks++;
        if (out_data[r] != exp_val[r][c] || out_slot[r] != exp_slot ||
            (exp_cyc[r][c] >= 0 && cyc != exp_cyc[r][c])) begin
          failures++;
          $display("FAIL r%0d c%0d: %0d exp %0d at %0d exp %0d", r, c, out_data[r],
                   exp_val[r][c], cyc, exp_cyc[r][c]);
        end
        seen[r][c]++;
      end
  end

  task automatic clear_edges();
    for (int j = 0; j < N; j++) begin left_in[j] = 0; top_in[j] = 0; top_flag[j] = '0; end
  endtask

  task automatic check_all_seen();
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        checks++;
        if (seen[r][c] != 1) begin failures++; $display("FAIL r%0d c%0d seen %0d", r, c, seen[r][c]); end
        seen[r][c] = 0;
      end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int K, T, P;
    logic signed [7:0] A [N][16], B [16][N];
    logic signed [7:0] X [N][N], W [N][8], R [N][N][N];
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) seen[r][c] = 0;
    mode = MODE_MM; clear_edges();
    repeat (2) @(posedge clk);
    rst_n = 1;
    // ---------------- MODE_MM -----------------------------------------------
    for (int rep = 0; rep < 3; rep++) begin
      K = 3 + rep * 5;
      for (int i = 0; i < N; i++) for (int k = 0; k < K; k++) A[i][k] = 8'($urandom);
      for (int k = 0; k < K; k++) for (int j = 0; j < N; j++) B[k][j] = 8'($urandom);
      @(negedge clk);
      T = cyc;
      exp_slot = SLOT_W'(rep);
      for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) begin
        exp_val[r][c] = 0;
        for (int k = 0; k < K; k++) exp_val[r][c] += int'(A[r][k]) * int'(B[k][c]);
        exp_cyc[r][c] = T + K + 1 + r + c;
      end
      for (int t = 0; t < K + N - 1; t++) begin
        for (int j = 0; j < N; j++) begin
          int k;
          k = t - j;
          left_in[j] = (k >= 0 && k < K) ? A[j][k] : 8'($urandom);
          top_in[j]  = (k >= 0 && k < K) ? B[k][j] : 8'($urandom);
          top_flag[j] = '0;
          if (k >= 0 && k < K) begin
            top_flag[j].valid = 1; top_flag[j].first = (k == 0); top_flag[j].last = (k == K - 1);
            top_flag[j].slot = SLOT_W'(rep);
          end
        end
        @(negedge clk);
      end
      clear_edges();
      repeat (2 * N + 2) @(negedge clk);
      check_all_seen();
    end
    // ---------------- MODE_DW -----------------------------------------------
    mode = MODE_DW;
    K = 3; P = 1;
    for (int c = 0; c < N; c++) begin
      for (int t = 0; t < N; t++) X[c][t] = 8'($urandom);
      for (int j = 0; j < K; j++) W[c][j] = 8'($urandom);
    end
    @(negedge clk);
    T = cyc;
    exp_slot = 2'd1;
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) begin
      exp_val[r][c] = 0;
      for (int j = 0; j < K; j++)
        if (r + j - P >= 0 && r + j - P < N) exp_val[r][c] += int'(W[c][j]) * int'(X[c][r + j - P]);
      exp_cyc[r][c] = T + K + 1 + r + c;
    end
    for (int t = 0; t < K + 2 * N; t++) begin
      for (int c = 0; c < N; c++) begin
        int j, x;
        j = t - c;                       // tap index on top lane c
        x = t - c - P;                   // sequence index on left lane c
        left_in[c] = (x >= 0 && x < N) ? X[c][x] : 8'sd0;
        top_in[c]  = (j >= 0 && j < K) ? W[c][j] : 8'($urandom);
        top_flag[c] = '0;
        if (j >= 0 && j < K) begin
          top_flag[c].valid = 1; top_flag[c].first = (j == 0); top_flag[c].last = (j == K - 1);
          top_flag[c].slot = 2'd1;
        end
      end
      @(negedge clk);
    end
    clear_edges();
    repeat (2 * N + 2) @(negedge clk);
    check_all_seen();
    // ---------------- MODE_POS ----------------------------------------------
    mode = MODE_POS;
    for (int i = 0; i < N; i++) for (int k = 0; k < N; k++) begin
      A[i][k] = 8'($urandom);
      for (int c = 0; c < N; c++) R[i][k][c] = 8'($urandom);
    end
    @(negedge clk);
    T = cyc;
    exp_slot = 2'd2;
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) begin
      exp_val[r][c] = 0;
      for (int k = 0; k < N; k++) exp_val[r][c] += int'(A[r][k]) * int'(R[r][k][c]);
      exp_cyc[r][c] = T + r * N + N + 1 + c;
    end
    for (int t = 0; t < N * N + N; t++) begin
      for (int j = 0; j < N; j++) begin
        int u, i, k;
        u = t - j;                        // top lane j is skewed by j
        i = (u >= 0) ? u / N : 0;
        k = (u >= 0) ? u % N : 0;
        top_flag[j] = '0;
        top_in[j] = 8'($urandom);
        if (u >= 0 && u < N * N) begin
          top_in[j] = R[i][k][j];
          top_flag[j].valid = 1; top_flag[j].first = (k == 0); top_flag[j].last = (k == N - 1);
          top_flag[j].slot = 2'd2; top_flag[j].row = ROW_W'(i);
        end
        // left lane j carries row j's operand while row j is active
        left_in[j] = (t >= j * N && t < j * N + N) ? A[j][t - j * N] : 8'($urandom);
      end
      @(negedge clk);
    end
    clear_edges();
    repeat (2 * N + 2) @(negedge clk);
    check_all_seen();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
