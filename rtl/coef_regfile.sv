// coef_regfile: coarse-grain-sparsity connection coefficients.
//
// For every block row of every weight matrix the network keeps N_SEL/BLOCK
// weight blocks. This register file stores, per block row, the block-column
// index of each kept block, one SEL_W-bit field per neuron-select
// multiplexer (ENTRY_W bits in all). Entries are numbered by global output
// row: entry = (layer * N_NEURONS + output row) / BLOCK, four hidden-layer
// matrices of N_NEURONS rows followed by the output matrix of N_OUT_ROWS
// rows. With the defaults: 384 entries of 48 bits.
//
// Interface: synchronous write port, combinational read port. Not reset;
// it is loaded before the first frame.
//
// Storing the coefficients as per-multiplexer select fields inside the
// controller follows the architecture. The entry count covers all five
// weight matrices (the output matrix counted twice), matching the six
// weight banks; that, and the load port, are this design's own choices.
module coef_regfile #(
  parameter int N_NEURONS  = 1024,
  parameter int N_SEL      = 128,
  parameter int BLOCK      = 16,
  parameter int N_HIDDEN   = 4,
  parameter int N_OUT_ROWS = 2048,
  localparam int ENTRIES   = (N_HIDDEN * N_NEURONS + N_OUT_ROWS) / BLOCK,
  localparam int ENTRY_W   = (N_SEL / BLOCK) * $clog2(N_NEURONS / BLOCK),
  localparam int EADDR_W   = $clog2(ENTRIES)
) (
  input  logic               clk,
  input  logic               we,
  input  logic [EADDR_W-1:0] waddr,
  input  logic [ENTRY_W-1:0] wdata,
  input  logic [EADDR_W-1:0] raddr,
  output logic [ENTRY_W-1:0] rdata
);

  logic [ENTRY_W-1:0] rf [ENTRIES];

  always_ff @(posedge clk) begin
    if (we) rf[waddr] <= wdata;
  end

  assign rdata = rf[raddr];

endmodule
