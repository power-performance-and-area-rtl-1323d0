// neuron_select: picks the input neurons that meet non-zero weight blocks.
//
// Coarse-grain sparsification divides each N_NEURONS x N_NEURONS weight
// matrix into BLOCK x BLOCK weight blocks and keeps N_SEL/N_NEURONS of them
// (12.5 %) in every block row. For the block row being computed, only the
// input neurons of the kept block columns contribute. This unit consists of
// N_MUX = N_SEL/BLOCK multiplexers; multiplexer m picks one of the
// N_BLK = N_NEURONS/BLOCK groups of BLOCK consecutive input neurons, chosen
// by its SEL_W-bit field of sel, and places it at selected[m*BLOCK +: BLOCK].
// With BLOCK = 16 that is eight 64:1 multiplexers with 6 select bits each;
// with BLOCK = 64, two 16:1 multiplexers with 4 bits each.
//
// Interface: purely combinational. sel field m sits in
// sel[m*SEL_W +: SEL_W], as stored in the coefficient register file.
//
// The multiplexer structure and its sizes follow the architecture; the bit
// order of sel is this design's own.
module neuron_select
  import dnn_pkg::*;
#(
  parameter int N_NEURONS = 1024,
  parameter int N_SEL     = 128,
  parameter int BLOCK     = 16,
  localparam int N_MUX    = N_SEL / BLOCK,
  localparam int N_BLK    = N_NEURONS / BLOCK,
  localparam int SEL_W    = $clog2(N_BLK)
) (
  input  neuron_t                   neurons  [N_NEURONS],
  input  logic    [N_MUX*SEL_W-1:0] sel,
  output neuron_t                   selected [N_SEL]
);

  for (genvar m = 0; m < N_MUX; m++) begin : g_mux
    logic [SEL_W-1:0] blk;
    assign blk = sel[m*SEL_W +: SEL_W];
    for (genvar j = 0; j < BLOCK; j++) begin : g_lane
      // one BLOCK-wide N_BLK:1 multiplexer, built lane by lane
      neuron_t cand [N_BLK];
      for (genvar b = 0; b < N_BLK; b++) begin : g_cand
        assign cand[b] = neurons[b*BLOCK + j];
      end
      assign selected[m*BLOCK + j] = cand[blk];
    end
  end

endmodule
