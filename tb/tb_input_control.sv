// tb_input_control: self-checking test of the operand selection and skew
// (N = 4). Drives random data on every source each cycle, records the
// history, and checks that lane j of each edge carries the selected source:
// memory/feedback sources unchanged in the same cycle, external weights
// and flags delayed by j cycles, the selects themselves delayed by j
// cycles, and in depthwise mode lane c taking activation bank dw_rot - c
// (zero outside the array).
module tb_input_control;
  import confasr_pkg::*;
  localparam int N = 4, HIST = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  lsrc_e lsrc;
  tsrc_e tsrc;
  mac_mode_e mode;
  flag_t flag_in;
  logic signed [7:0] w [N], norm_y [N], in_rd [N], act_rd [N], buf_rd [N], smax [N], fb [N];
  logic signed [11:0] dw_rot;
  logic signed [7:0] left_out [N], top_out [N];
  flag_t flag_out [N];
  int checks = 0, failures = 0;
  input_control #(.N(N)) dut (.*);

  logic signed [7:0] w_h [HIST][N];
  flag_t f_h [HIST];
  lsrc_e l_h [HIST];
  tsrc_e t_h [HIST];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lsrc = LSRC_NORM; tsrc = TSRC_W; mode = MODE_MM; flag_in = '0; dw_rot = 0;
    for (int j = 0; j < N; j++) begin w[j] = 0; norm_y[j] = 0; in_rd[j] = 0; act_rd[j] = 0; buf_rd[j] = 0; smax[j] = 0; fb[j] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 800; t++) begin
      @(negedge clk);
      if (t % 7 == 0) lsrc = lsrc_e'($urandom % 6);
      if (t % 5 == 0) tsrc = tsrc_e'($urandom % 3);
      mode = (t >= 400) ? MODE_DW : MODE_MM;
      dw_rot = 12'($signed($urandom % 12) - 3);
      flag_in = flag_t'($urandom);
      for (int j = 0; j < N; j++) begin
        w[j] = 8'($urandom); norm_y[j] = 8'($urandom); in_rd[j] = 8'($urandom);
        act_rd[j] = 8'($urandom); buf_rd[j] = 8'($urandom); smax[j] = 8'($urandom); fb[j] = 8'($urandom);
      end
      for (int j = 0; j < N; j++) w_h[t % HIST][j] = w[j];
      f_h[t % HIST] = flag_in; l_h[t % HIST] = lsrc; t_h[t % HIST] = tsrc;
      #1;
      if (t >= N)
        for (int j = 0; j < N; j++) begin
          int o;
          logic signed [7:0] el, et, a;
          o = (t - j) % HIST;
          a = (int'(dw_rot) - j >= 0 && int'(dw_rot) - j < N) ? act_rd[int'(dw_rot) - j] : 8'sd0;
          case (l_h[o])
            LSRC_NORM: el = norm_y[j];
            LSRC_IN:   el = in_rd[j];
            LSRC_ACT:  el = (mode == MODE_DW) ? a : act_rd[j];
            LSRC_BUF:  el = buf_rd[j];
            LSRC_W:    el = w_h[o][j];
            default:   el = smax[j];
          endcase
          case (t_h[o])
            TSRC_W:  et = w_h[o][j];
            TSRC_FB: et = fb[j];
            default: et = norm_y[j];
          endcase
          checks += 3;
          if (left_out[j] != el) begin failures++; $display("FAIL left lane %0d t %0d", j, t); end
          if (top_out[j] != et) begin failures++; $display("FAIL top lane %0d t %0d", j, t); end
          if (flag_out[j] != f_h[o]) begin failures++; $display("FAIL flag lane %0d t %0d", j, t); end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
