// input_neurons: register holding the inputs of the layer being computed.
//
// The network is evaluated one layer at a time. Before the first layer the
// register loads the feature window from the input shift register (the
// N_WIN window values fill the low indices, the rest are zero); before every
// later layer it loads the previous layer's activations from the output
// neurons register. The two-way input multiplexer of the block diagram is
// part of this module.
//
// Interface: load_win and load_fb are one-cycle load strobes (load_win wins
// if both are set); q is valid from the cycle after the strobe and holds
// until the next one. Reset clears the register.
//
// The register, its width and the two sources follow the architecture; the
// zero padding of the window and the reset value are this design's own.
module input_neurons
  import dnn_pkg::*;
#(
  parameter int N_NEURONS = 1024,
  parameter int N_WIN     = 440
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    load_win,
  input  logic    load_fb,
  input  neuron_t win [N_WIN],
  input  neuron_t fb  [N_NEURONS],
  output neuron_t q   [N_NEURONS]
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < N_NEURONS; i++) q[i] <= '0;
    end else if (load_win) begin
      for (int i = 0; i < N_NEURONS; i++) q[i] <= (i < N_WIN) ? win[i] : '0;
    end else if (load_fb) begin
      for (int i = 0; i < N_NEURONS; i++) q[i] <= fb[i];
    end
  end

endmodule
