// weight_memory: the six weight SRAM banks and the bank multiplexer.
//
// All compressed weights of the network live in N_BANKS banks of ROWS rows:
// one bank for each of the four hidden-layer weight matrices and two for
// the output layer, which has about twice as many weights. The banks form
// one global row space, bank = row / ROWS, so that the controller simply
// counts rows from the first layer to the last. The multiplexer after the
// banks forwards the row of the bank that was read.
//
// Timing: one-cycle read latency as in weight_sram_bank; the bank index of
// a read is registered to steer the multiplexer in the following cycle. The
// write port is independent of the read port.
//
// Six banks of 8192 x 128 bits follow the architecture; the global row
// numbering is this design's own.
module weight_memory #(
  parameter int N_BANKS = 6,
  parameter int ROWS    = 8192,
  parameter int WIDTH   = 128,
  localparam int ROW_W  = $clog2(ROWS),
  localparam int BANK_W = (N_BANKS > 1) ? $clog2(N_BANKS) : 1,
  localparam int ADDR_W = ROW_W + BANK_W
) (
  input  logic              clk,
  input  logic              re,
  input  logic [ADDR_W-1:0] raddr,
  output logic [WIDTH-1:0]  rdata,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [WIDTH-1:0]  wdata
);

  logic [BANK_W-1:0] rbank, wbank, rbank_q;
  logic [WIDTH-1:0]  bank_rdata [N_BANKS];

  assign rbank = raddr[ADDR_W-1:ROW_W];
  assign wbank = waddr[ADDR_W-1:ROW_W];

  for (genvar b = 0; b < N_BANKS; b++) begin : g_bank
    weight_sram_bank #(.ROWS(ROWS), .WIDTH(WIDTH)) u_bank (
      .clk  (clk),
      .re   (re && rbank == BANK_W'(b)),
      .raddr(raddr[ROW_W-1:0]),
      .rdata(bank_rdata[b]),
      .we   (we && wbank == BANK_W'(b)),
      .waddr(waddr[ROW_W-1:0]),
      .wdata(wdata)
    );
  end

  always_ff @(posedge clk) begin
    if (re) rbank_q <= rbank;
  end

  always_comb begin
    rdata = '0;
    for (int b = 0; b < N_BANKS; b++)
      if (rbank_q == BANK_W'(b)) rdata = bank_rdata[b];
  end

endmodule
