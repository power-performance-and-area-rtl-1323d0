// relu: activation between the MAC array and the output neurons.
//
// Hidden layers end in a rectified linear unit, q = max(d, 0). The output
// layer has no activation: with bypass set the value passes unchanged, so
// the output scores keep their sign.
//
// Interface: combinational, 12-bit two's complement in and out.
//
// ReLU on the hidden layers follows the network definition; using the same
// unit with a bypass for the output layer is this design's own choice.
module relu
  import dnn_pkg::*;
(
  input  neuron_t d,
  input  logic    bypass,
  output neuron_t q
);

  assign q = (bypass || d >= 0) ? d : '0;

endmodule
