// row_memory: banked register file used for the input memory, the
// activation memory and the shared buffer.
//
// The store is made of BANKS independent register files, one per sequence
// position (row), each DEPTH words of WIDTH bits. Every bank has its own
// addresses, so in one cycle the s rows can be read and written in
// parallel at different words. This is what allows the diagonal access of
// the accelerator: row r touching word k + r - t in cycle t, which matches
// the skewed timing of the MAC array edges.
//
// Interface: one write port per bank (we/waddr/wdata) and NRD read ports
// per bank (raddr/rdata). Reads are asynchronous (register-file style) and
// return the old word when the same word is written in the same cycle.
// Timing: a write is visible to reads from the cycle after the edge.
// The published design uses 1R/1W register-file macros; the second read
// port here serves the residual, GLU and positional-encoding reads that
// happen while the first port streams operands (a choice of this design).
// Contents are not reset.
module row_memory #(
  parameter int BANKS = 64,
  parameter int DEPTH = 512,
  parameter int WIDTH = 8,
  parameter int NRD   = 2,
  localparam int AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we    [BANKS],
  input  logic [AW-1:0]    waddr [BANKS],
  input  logic [WIDTH-1:0] wdata [BANKS],
  input  logic [AW-1:0]    raddr [NRD][BANKS],
  output logic [WIDTH-1:0] rdata [NRD][BANKS]
);

  for (genvar b = 0; b < BANKS; b++) begin : g_bank
    logic [WIDTH-1:0] mem [DEPTH];

    always_ff @(posedge clk) begin
      if (we[b]) mem[waddr[b]] <= wdata[b];
    end

    for (genvar p = 0; p < NRD; p++) begin : g_rd
      assign rdata[p][b] = mem[raddr[p][b]];
    end
  end

endmodule
