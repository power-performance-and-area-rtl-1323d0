// weight_sram_bank: one on-chip weight SRAM bank.
//
// ROWS rows of WIDTH bits; a row holds the 16 8-bit weights consumed by the
// 16 MAC units in one cycle (lane k in bits [8k+7:8k]). The bank has one
// synchronous read port and one write port, so new weights can be written
// while inference reads (the weight-update phase of the pseudo-training
// workload).
//
// Timing: raddr is sampled with re at a clock edge and the row appears on
// rdata after that edge, holding until the next read. A read of the row
// written at the same edge returns the old contents. The array is not
// reset; every row must be written before it is read.
//
// The bank size follows the architecture (8192 x 128 bits); the two-port
// organisation and read latency are this design's own. In silicon this is
// an SRAM macro; here it is an array that synthesizes to a memory.
module weight_sram_bank #(
  parameter int ROWS   = 8192,
  parameter int WIDTH  = 128,
  localparam int ADDR_W = $clog2(ROWS)
) (
  input  logic              clk,
  input  logic              re,
  input  logic [ADDR_W-1:0] raddr,
  output logic [WIDTH-1:0]  rdata,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [WIDTH-1:0]  wdata
);

  logic [WIDTH-1:0] mem [ROWS];

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

endmodule
