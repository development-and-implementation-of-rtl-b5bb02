// nn_pkg: number formats and the output stage shared by every layer.
//
// Activations and weights are signed fixed-point words of DATA_W bits with
// FRAC_W fractional bits. A product then carries 2*FRAC_W fractional bits,
// and a DSP-style accumulator of ACC_W bits (48, as in a UltraScale+ DSP
// slice) holds the running sums without overflow for every layer size used
// here. Requantisation back to DATA_W bits drops FRAC_W low bits
// (truncation, i.e. rounding towards minus infinity) and saturates to the
// signed range. The optional ReLU is applied after that.
//
// The word lengths are this design's choice: the layers take "integer and
// fractional bits" as parameters, but no particular values are fixed.
package nn_pkg;

  parameter int unsigned DATA_W = 16;
  parameter int unsigned FRAC_W = 8;
  parameter int unsigned ACC_W  = 48;

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  localparam data_t DATA_MAX = data_t'({1'b0, {(DATA_W-1){1'b1}}});
  localparam data_t DATA_MIN = data_t'({1'b1, {(DATA_W-1){1'b0}}});

  // Parameter load bus, shared by all layers. row selects the neuron (dense)
  // or filter (conv); col selects the input (dense) or kernel tap (conv),
  // and col equal to the number of inputs/taps selects the bias.
  typedef struct packed {
    logic        we;
    logic [1:0]  layer;   // 0: conv, 1: first dense, 2: second dense, 3: second conv
    logic [15:0] row;
    logic [15:0] col;
    data_t       data;
  } cfg_t;

  // True when the shifted accumulator does not fit into data_t.
  function automatic logic acc_saturates(input acc_t acc);
    acc_t s;
    s = acc >>> FRAC_W;
    return (s > acc_t'(DATA_MAX)) || (s < acc_t'(DATA_MIN));
  endfunction

  // Requantise an accumulator to data_t, with optional ReLU.
  function automatic data_t requantise(input acc_t acc, input logic relu);
    acc_t  s;
    data_t d;
    s = acc >>> FRAC_W;
    if (s > acc_t'(DATA_MAX))      d = DATA_MAX;
    else if (s < acc_t'(DATA_MIN)) d = DATA_MIN;
    else                           d = data_t'(s);
    if (relu && d < 0) d = '0;
    return d;
  endfunction

endpackage
