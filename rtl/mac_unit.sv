// mac_unit: one multiply-accumulate lane of the 16-lane MAC array.
//
// Each enabled cycle multiplies a 12-bit neuron by an 8-bit weight and adds
// the product to an ACC_W-bit accumulator; first restarts the sum with the
// current product, last closes it. When the last product is added, the sum
// is scaled back to the neuron format (arithmetic shift right by FRAC, the
// number of fraction bits of a weight) and saturated to 12 bits into the
// result register, which holds it while the next dot product accumulates.
//
// Timing: the result of a dot product whose last term is presented in cycle
// n is on result from cycle n+1 until the next last term.
//
// The MAC lane and its 12-bit result follow the architecture; the fixed-
// point format, the accumulator width and saturation are this design's own.
module mac_unit
  import dnn_pkg::*;
#(
  parameter int ACC_W = 28,
  parameter int FRAC  = 7
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,
  input  logic    first,
  input  logic    last,
  input  neuron_t neuron,
  input  weight_t weight,
  output neuron_t result
);

  localparam neuron_t NEURON_MAX = neuron_t'((1 << (NEURON_W - 1)) - 1);
  localparam neuron_t NEURON_MIN = neuron_t'(-(1 << (NEURON_W - 1)));

  logic signed [ACC_W-1:0] acc, prod, sum, scaled;

  always_comb begin
    prod   = ACC_W'(neuron) * ACC_W'(weight);
    sum    = (first ? '0 : acc) + prod;
    scaled = sum >>> FRAC;
  end

  function automatic neuron_t saturate(logic signed [ACC_W-1:0] v);
    if (v > ACC_W'(NEURON_MAX)) return NEURON_MAX;
    if (v < ACC_W'(NEURON_MIN)) return NEURON_MIN;
    return neuron_t'(v);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc    <= '0;
      result <= '0;
    end else if (en) begin
      acc <= sum;
      if (last) result <= saturate(scaled);
    end
  end

endmodule
