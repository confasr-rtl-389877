// tb_mac_pe: self-checking test of one processing element. Random operand
// streams with first/last flags in the three modes: matrix product (A from
// the left, B from above), depthwise (A from the column broadcast) and
// positional encoding (B applied directly, accumulating only when the
// row tag matches). Checks the accumulated sum, the one-cycle done pulse
// two cycles after the last operand, the slot tag and the forwarding of
// A, B and the flags.
module tb_mac_pe;
  import confasr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  mac_mode_e mode;
  logic signed [7:0] a_left, a_dw, b_up, b_pe, a_q, b_q;
  flag_t f_up, f_pe, f_q;
  logic signed [ACC_W-1:0] acc;
  logic done;
  logic [SLOT_W-1:0] done_slot;
  int checks = 0, failures = 0;
  mac_pe #(.ROW(3)) dut (.*);

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mode = MODE_MM; a_left = 0; a_dw = 0; b_up = 0; b_pe = 0; f_up = '0; f_pe = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 90; it++) begin
      int k, sum, m, rowtag;
      logic signed [7:0] pa, pb;
      logic [SLOT_W-1:0] sl;
      m = it % 3;
      k = 1 + ($urandom % 12);
      sl = SLOT_W'($urandom);
      sum = 0;
      rowtag = (m == 2 && (it % 4 == 2)) ? 5 : 3;   // some streams for another row
      @(negedge clk);
      mode = mac_mode_e'(m);
      for (int i = 0; i < k; i++) begin
        logic signed [7:0] a, b;
        a = 8'($urandom); b = 8'($urandom);
        a_left = (m == 1) ? 8'($urandom) : a;
        a_dw   = (m == 1) ? a : 8'($urandom);
        b_up   = (m == 2) ? 8'($urandom) : b;
        b_pe   = (m == 2) ? b : 8'($urandom);
        f_up = '0; f_pe = '0;
        if (m == 2) begin
          f_pe.valid = 1; f_pe.first = (i == 0); f_pe.last = (i == k - 1); f_pe.slot = sl;
          f_pe.row = ROW_W'(rowtag);
        end else begin
          f_up.valid = 1; f_up.first = (i == 0); f_up.last = (i == k - 1); f_up.slot = sl;
        end
        sum += int'(a) * int'(b);
        pa = a; pb = b;
        @(negedge clk);
        chk(a_q == pa, "A register");
        chk(b_q == pb, "B register");
        chk(f_q.valid == (rowtag == 3), "flag register");
        chk(!done, "no early done");
      end
      f_up = '0; f_pe = '0;
      @(negedge clk);
      if (rowtag == 3) begin
        chk(done == 1'b1, "done pulse");
        chk(acc == ACC_W'(sum), $sformatf("sum mode %0d: %0d vs %0d", m, acc, sum));
        chk(done_slot == sl, "slot");
      end else begin
        chk(done == 1'b0, "other row stays idle");
      end
      @(negedge clk);
      chk(!done, "done lasts one cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
