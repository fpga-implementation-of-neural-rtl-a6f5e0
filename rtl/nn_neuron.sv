// nn_neuron: one neuron, computing y = act(sum_i x_i * w_i + b).
//
// The inputs arrive serially, one (x, w) pair per cycle with in_valid high. in_first
// marks the first pair of a dot product and restarts the sum; in_last marks the
// final pair. The cycle after the final pair, out_valid is high for one cycle and y
// holds the result: the sum plus the bias, shifted back to 16 bits, passed through
// ReLU when relu is high, and saturated. A dot product of N pairs therefore takes
// N cycles plus one. One multiplier and one adder per neuron, as a DSP slice would
// implement it.
// The document gives the neuron's function (weighted inputs plus a bias, Fig. 1)
// but not its insides; the serial multiply-accumulate and ReLU are this design's
// choices.
module nn_neuron
  import nn_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  logic  in_first,
  input  logic  in_last,
  input  data_t x,
  input  data_t w,
  input  data_t bias,
  input  logic  relu,
  output data_t y,
  output logic  out_valid
);
  acc_t acc, sum;

  always_comb sum = (in_first ? acc_t'(0) : acc) + (acc_t'(x) * acc_t'(w));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      y         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid && in_last;
      if (in_valid) begin
        acc <= sum;
        if (in_last) y <= requant(sum + bias_ext(bias), relu);
      end
    end
  end
endmodule
