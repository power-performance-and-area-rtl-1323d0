// output_neurons: activations of the layer being computed.
//
// The MAC results reach this register one value per cycle through the
// output demultiplexer: with we set, d is written to entry idx. When a
// hidden layer is finished the whole register is copied back into the
// input neurons for the next layer.
//
// Interface: write port (we, idx, d) takes effect at the clock edge; q
// shows all entries. Reset clears the register.
//
// The register and its demultiplexer follow the architecture; the reset
// value is this design's own.
module output_neurons
  import dnn_pkg::*;
#(
  parameter int N_NEURONS = 1024,
  localparam int IDX_W    = $clog2(N_NEURONS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic [IDX_W-1:0] idx,
  input  neuron_t          d,
  output neuron_t          q [N_NEURONS]
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < N_NEURONS; i++) q[i] <= '0;
    end else if (we) begin
      q[idx] <= d;
    end
  end

endmodule
