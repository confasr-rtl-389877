// tb_buffer: self-checking test of the banked register file
// used as the shared buffer: 10-bit words. Writes random words to random
// banks and addresses, keeps a reference copy, and checks both read ports,
// including per-bank (diagonal) addressing and read-before-write in the
// same cycle.
module tb_buffer;
  localparam int BANKS = 8, DEPTH = 16, WIDTH = 10, NRD = 2;
  logic clk = 0;
  always #5 clk = ~clk;
  logic             we    [BANKS];
  logic [3:0]       waddr [BANKS];
  logic [WIDTH-1:0] wdata [BANKS];
  logic [3:0]       raddr [NRD][BANKS];
  logic [WIDTH-1:0] rdata [NRD][BANKS];
  logic [WIDTH-1:0] ref_m [BANKS][DEPTH];
  int checks = 0, failures = 0;

  row_memory #(.BANKS(BANKS), .DEPTH(DEPTH), .WIDTH(WIDTH), .NRD(NRD)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < BANKS; b++) begin we[b] = 0; waddr[b] = 0; wdata[b] = 0; end
    for (int p = 0; p < NRD; p++) for (int b = 0; b < BANKS; b++) raddr[p][b] = 0;
    // fill everything
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      for (int b = 0; b < BANKS; b++) begin
        we[b] = 1; waddr[b] = 4'(a); wdata[b] = WIDTH'($urandom); ref_m[b][a] = wdata[b];
      end
    end
    @(negedge clk);
    for (int b = 0; b < BANKS; b++) we[b] = 0;
    // random traffic
    for (int it = 0; it < 400; it++) begin
      @(negedge clk);
      for (int p = 0; p < NRD; p++)
        for (int b = 0; b < BANKS; b++) raddr[p][b] = 4'($urandom);
      for (int b = 0; b < BANKS; b++) begin
        we[b] = 1'($urandom); waddr[b] = (it % 3 == 0) ? raddr[0][b] : 4'($urandom);
        wdata[b] = WIDTH'($urandom);
      end
      #1;
      for (int p = 0; p < NRD; p++)
        for (int b = 0; b < BANKS; b++) begin
          checks++;
          if (rdata[p][b] !== ref_m[b][raddr[p][b]]) begin
            failures++;
            $display("FAIL port %0d bank %0d addr %0d: %h != %h", p, b, raddr[p][b], rdata[p][b], ref_m[b][raddr[p][b]]);
          end
        end
      @(posedge clk);
      for (int b = 0; b < BANKS; b++) if (we[b]) ref_m[b][waddr[b]] = wdata[b];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
