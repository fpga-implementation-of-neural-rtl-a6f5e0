// nn_pkg: number format and shared arithmetic for the neural-network datapaths.
//
// Every activation, pixel, weight and bias is a 16-bit signed fixed-point number
// with FRAC fractional bits (Q7.8 by default). Products are summed in an ACC_W-bit
// accumulator that cannot overflow for the largest dot product in this design
// (800 terms of 32 bits). requant() turns an accumulator value back into a 16-bit
// activation: arithmetic shift right by FRAC, optional ReLU, saturation.
// The 16-bit word follows the document (each pixel is converted into 16 bits);
// the split into integer and fraction bits, the accumulator width, rounding by
// truncation and saturation are this design's choices.
package nn_pkg;

  localparam int unsigned DATA_W = 16;
  localparam int unsigned FRAC   = 8;
  localparam int unsigned ACC_W  = 48;

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  localparam data_t DATA_MAX = data_t'({1'b0, {(DATA_W-1){1'b1}}});
  localparam data_t DATA_MIN = data_t'({1'b1, {(DATA_W-1){1'b0}}});

  // Bias aligned to the product scale (2*FRAC fraction bits).
  function automatic acc_t bias_ext(data_t b);
    return acc_t'(b) <<< FRAC;
  endfunction

  // Accumulator (2*FRAC fraction bits) to activation (FRAC fraction bits).
  function automatic data_t requant(acc_t a, logic relu);
    acc_t s;
    s = a >>> FRAC;
    if (relu && s < 0)            return '0;
    if (s > acc_t'(DATA_MAX))     return DATA_MAX;
    if (s < acc_t'(DATA_MIN))     return DATA_MIN;
    return data_t'(s);
  endfunction

  // Host load port of the weight, bias and input memories. 'sel' picks the
  // memory, 'unit' the neuron (or output channel), 'index' the word in it.
  typedef struct packed {
    logic        en;
    logic [3:0]  sel;
    logic [7:0]  unit;
    logic [15:0] index;
    data_t       data;
  } load_t;

endpackage
