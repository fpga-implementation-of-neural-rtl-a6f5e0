// ann_layer: one fully connected layer of the distributed ANN architecture.
//
// N_OUT neurons work side by side. After 'start' the layer steps an index i from 0
// to N_IN-1, asks its source for input i on x_addr (x_rd high) and reads weight i of
// every neuron from that neuron's own weight memory in the same cycle. One cycle
// later x_data and the weights are valid and every neuron accumulates x_i * w_i, so
// each neuron sees every output of the previous layer (the document's distributed
// architecture, Fig. 5). A layer pass takes N_IN + 2 cycles from start to the one-cycle
// 'done' pulse, after which y holds all N_OUT results until the next pass ends.
//
// Weights and biases are written from outside before use: wt_we writes weight
// wt_index of neuron wt_unit, b_we writes the bias of neuron wt_unit. Weights sit
// in one memory per neuron (block RAM); biases in registers.
// Layer sizes come from the document; the streaming schedule, the 1-cycle source
// latency and the load port are this design's choices.
module ann_layer
  import nn_pkg::*;
#(
  parameter int unsigned N_IN  = 784,
  parameter int unsigned N_OUT = 30,
  parameter bit          RELU  = 1'b1,
  localparam int unsigned IW   = (N_IN  > 1) ? $clog2(N_IN)  : 1,
  localparam int unsigned UW   = (N_OUT > 1) ? $clog2(N_OUT) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  output logic                  busy,
  output logic                  done,
  // input stream: x_data is the source word addressed one cycle earlier
  output logic                  x_rd,
  output logic [IW-1:0]         x_addr,
  input  data_t                 x_data,
  // results
  output data_t [N_OUT-1:0]     y,
  // weight and bias load
  input  logic                  wt_we,
  input  logic                  b_we,
  input  logic [UW-1:0]         wt_unit,
  input  logic [IW-1:0]         wt_index,
  input  data_t                 wt_data
);
  logic [IW-1:0] idx;
  logic          run;
  logic          v_d, first_d, last_d;
  data_t         w_q    [N_OUT];
  data_t         bias_q [N_OUT];
  logic [N_OUT-1:0] nvalid;

  assign busy   = run | v_d;
  assign x_rd   = run;
  assign x_addr = idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run     <= 1'b0;
      idx     <= '0;
      v_d     <= 1'b0;
      first_d <= 1'b0;
      last_d  <= 1'b0;
    end else begin
      v_d     <= run;
      first_d <= run && (idx == '0);
      last_d  <= run && (idx == IW'(N_IN - 1));
      if (start && !busy) begin
        run <= 1'b1;
        idx <= '0;
      end else if (run) begin
        if (idx == IW'(N_IN - 1)) run <= 1'b0;
        else                      idx <= idx + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (b_we) bias_q[wt_unit] <= wt_data;
  end

  for (genvar n = 0; n < N_OUT; n++) begin : g_neuron
    nn_ram #(.WIDTH(DATA_W), .DEPTH(N_IN)) u_wmem (
      .clk     (clk),
      .wr_en   (wt_we && (wt_unit == UW'(n))),
      .wr_addr (wt_index),
      .wr_data (wt_data),
      .rd_en   (run),
      .rd_addr (idx),
      .rd_data (w_q[n])
    );
    nn_neuron u_neuron (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (v_d),
      .in_first  (first_d),
      .in_last   (last_d),
      .x         (x_data),
      .w         (w_q[n]),
      .bias      (bias_q[n]),
      .relu      (RELU),
      .y         (y[n]),
      .out_valid (nvalid[n])
    );
  end

  assign done = &nvalid;   // all neurons finish in the same cycle
endmodule
