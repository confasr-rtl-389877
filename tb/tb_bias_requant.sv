// tb_bias_requant: self-checking test of the bias/requantization lanes.
// Loads random settings into all four slots, then feeds random
// accumulator values with random slot and column tags and compares the
// registered result one cycle later with an integer reference:
// sat8(((acc + bias + pe) * mult + 2^(shift-1)) >> shift), ReLU optional.
module tb_bias_requant;
  import confasr_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cfg_we, cfg_relu, cfg_add_pe;
  logic [SLOT_W-1:0] cfg_slot;
  logic signed [ACC_W-1:0] cfg_bias [N];
  logic [15:0] cfg_mult;
  logic [4:0] cfg_shift;
  logic in_valid [N];
  logic [1:0] in_col [N];
  logic [SLOT_W-1:0] in_slot [N];
  logic signed [ACC_W-1:0] in_data [N];
  logic signed [7:0] pe_add [N];
  logic out_valid [N];
  logic [1:0] out_col [N];
  logic [SLOT_W-1:0] out_slot [N];
  logic signed [7:0] out_data [N];
  int checks = 0, failures = 0;
  bias_requant #(.N(N)) dut (.*);

  longint bias_m [4][N];
  int mult_m [4], shift_m [4], relu_m [4], pe_m [4];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_we = 0; cfg_relu = 0; cfg_add_pe = 0; cfg_slot = 0; cfg_mult = 0; cfg_shift = 0;
    for (int r = 0; r < N; r++) begin
      cfg_bias[r] = 0; in_valid[r] = 0; in_col[r] = 0; in_slot[r] = 0; in_data[r] = 0; pe_add[r] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 4; s++) begin
      @(negedge clk);
      cfg_we = 1; cfg_slot = 2'(s);
      cfg_mult = 16'(1 + $urandom % 600); cfg_shift = 5'(s == 3 ? 0 : 8 + $urandom % 10);
      cfg_relu = 1'(s & 1); cfg_add_pe = 1'(s >> 1);
      mult_m[s] = cfg_mult; shift_m[s] = cfg_shift; relu_m[s] = cfg_relu; pe_m[s] = cfg_add_pe;
      for (int c = 0; c < N; c++) begin
        cfg_bias[c] = ACC_W'($signed($urandom % 4001) - 2000); bias_m[s][c] = cfg_bias[c];
      end
    end
    @(negedge clk);
    cfg_we = 0;
    for (int it = 0; it < 500; it++) begin
      longint e [N];
      logic v [N];
      for (int r = 0; r < N; r++) begin
        longint t;
        int s;
        in_valid[r] = 1'($urandom); in_col[r] = 2'($urandom); in_slot[r] = 2'($urandom);
        in_data[r] = ACC_W'($signed($urandom % 200001) - 100000);
        if (in_slot[r] == 3) in_data[r] = ACC_W'($signed($urandom % 301) - 150);
        pe_add[r] = 8'($urandom);
        s = in_slot[r];
        t = longint'(in_data[r]) + bias_m[s][in_col[r]] + (pe_m[s] ? longint'(pe_add[r]) : 0);
        t = t * mult_m[s];
        if (shift_m[s] > 0) t = t + (longint'(1) << (shift_m[s] - 1));
        t = t >>> shift_m[s];
        if (t > 127) t = 127;
        if (t < -128) t = -128;
        if (relu_m[s] && t < 0) t = 0;
        e[r] = in_valid[r] ? t : 0;
        v[r] = in_valid[r];
      end
      @(negedge clk);
      for (int r = 0; r < N; r++) begin
        checks++;
        if (out_valid[r] != v[r] || longint'(out_data[r]) != e[r]) begin
          failures++;
          $display("FAIL lane %0d: %0d exp %0d", r, out_data[r], e[r]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
