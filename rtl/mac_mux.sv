// mac_mux: hands one selected neuron to each MAC unit every cycle.
//
// A pass computes N_MAC output neurons, MAC k accumulating output k, over
// the N_SEL selected input neurons; it takes N_SEL cycles. In cycle t the
// mux picks group g = t / N_MAC of N_MAC selected neurons and rotates it by
// r = t mod N_MAC, so MAC k receives selected neuron g*N_MAC + (r+k) mod N_MAC.
// Over the N_MAC cycles of a group every MAC sees every neuron of the group
// once, and in any cycle all MACs see different neurons. The weight SRAM
// rows are stored in the same rotated order (see dnn_fsm).
//
// Interface: combinational; group and rot come from the controller.
//
// Only the mux's place in the datapath and its 128-in/16-out widths come
// from the architecture; the rotation schedule is this design's own.
module mac_mux
  import dnn_pkg::*;
#(
  parameter int N_SEL   = 128,
  parameter int N_MAC   = 16,
  localparam int GRP_W  = $clog2(N_SEL / N_MAC),
  localparam int ROT_W  = $clog2(N_MAC)
) (
  input  neuron_t             selected [N_SEL],
  input  logic    [GRP_W-1:0] group,
  input  logic    [ROT_W-1:0] rot,
  output neuron_t             lanes    [N_MAC]
);

  for (genvar k = 0; k < N_MAC; k++) begin : g_lane
    logic [ROT_W-1:0] pos;
    assign pos = rot + ROT_W'(k);  // wraps modulo N_MAC
    always_comb begin
      lanes[k] = '0;
      for (int g = 0; g < N_SEL / N_MAC; g++)
        if (GRP_W'(g) == group) lanes[k] = selected[g*N_MAC + int'(pos)];
    end
  end

endmodule
