// dnn_pkg: number formats shared by the CGS-sparse speech DNN datapath.
//
// Neurons travel on 12-bit buses and weights are stored as 8-bit values;
// both are two's complement. The 8-bit weight width is the figure the
// architecture is built around (16 weights per 128-bit SRAM row); the
// 12-bit neuron width is read from the bus widths of the block diagram.
// The signed fixed-point interpretation (weights with FRAC fraction bits,
// see mac_unit) is this design's own choice.
package dnn_pkg;

  localparam int NEURON_W = 12;  // width of one neuron value
  localparam int WEIGHT_W = 8;   // width of one stored weight

  typedef logic signed [NEURON_W-1:0] neuron_t;
  typedef logic signed [WEIGHT_W-1:0] weight_t;

endpackage
