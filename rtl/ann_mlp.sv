// ann_mlp: the feed-forward multilayer perceptron, distributed architecture.
//
// A 784-word input buffer holds one image (28x28 pixels, one 16-bit word each).
// N_HIDDEN fully connected hidden layers of N_HID ReLU neurons and an output layer
// of N_CLASS linear neurons follow; the maximum function picks the class and a
// validation unit compares it with the expected label. The layers run one after
// another: each layer streams the previous layer's outputs, one per cycle, to all
// of its neurons at once, so an image takes
//   sum over layers of (inputs of the layer + 2) + 1 cycles
// (= 786 + 32 + 32 + 32 + 1 = 883 cycles at the default sizes, counted in rising
// edges from the one that accepts start to the one that raises done) 
//
// Loading (ld.en high, one word per cycle, only while idle):
//   ld.sel = 0        input pixel ld.index
//   ld.sel = 1 + k    weight ld.index of neuron ld.unit in layer k (k = 0 is the first hidden layer)
//   ld.sel = 8 + k    bias of neuron ld.unit in layer k
// 'start' begins an image and samples 'label'; 'done' pulses with 'class_o' valid,
// 'scores' keeps the output layer's values.
// Sizes follow the document's figures (784-30-30-30-10); the activation, the load
// port and the layer-by-layer schedule are this design's choices.
module ann_mlp
  import nn_pkg::*;
#(
  parameter int unsigned N_INPUT  = 784,
  parameter int unsigned N_HID    = 30,
  parameter int unsigned N_HIDDEN = 3,
  parameter int unsigned N_CLASS  = 10,
  localparam int unsigned N_LAYERS = N_HIDDEN + 1,
  localparam int unsigned CW       = (N_CLASS > 1) ? $clog2(N_CLASS) : 1,
  localparam int unsigned MAXN     = (N_HID > N_CLASS) ? N_HID : N_CLASS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  load_t                ld,
  input  logic                 start,
  input  logic [CW-1:0]        label,
  input  logic                 clear_stats,
  output logic                 busy,
  output logic                 done,
  output logic [CW-1:0]        class_o,
  output data_t [N_CLASS-1:0]  scores,
  output logic                 match,
  output logic [15:0]          n_total,
  output logic [15:0]          n_correct
);
  localparam int unsigned IW0 = $clog2(N_INPUT);

  data_t ybus [N_LAYERS][MAXN];   // each layer's outputs, unused entries zero
  logic  [N_LAYERS-1:0] l_start, l_done;
  logic  [CW-1:0] label_q;
  logic  am_valid;

  // image input buffer
  logic            in_rd;
  logic [IW0-1:0]  in_addr;
  data_t           in_data;

  nn_ram #(.WIDTH(DATA_W), .DEPTH(N_INPUT)) u_inbuf (
    .clk     (clk),
    .wr_en   (ld.en && ld.sel == 4'd0),
    .wr_addr (IW0'(ld.index)),
    .wr_data (ld.data),
    .rd_en   (in_rd),
    .rd_addr (in_addr),
    .rd_data (in_data)
  );

  for (genvar k = 0; k < N_LAYERS; k++) begin : g_layer
    localparam int unsigned NI = (k == 0) ? N_INPUT : N_HID;
    localparam int unsigned NO = (k == N_LAYERS - 1) ? N_CLASS : N_HID;
    localparam int unsigned IW = (NI > 1) ? $clog2(NI) : 1;
    localparam int unsigned UW = (NO > 1) ? $clog2(NO) : 1;

    logic          x_rd;
    logic [IW-1:0] x_addr;
    data_t         x_data;
    data_t [NO-1:0] y;

    if (k == 0) begin : g_src
      assign in_rd   = x_rd;
      assign in_addr = x_addr;
      assign x_data  = in_data;
      assign l_start[k] = start && !busy;
    end else begin : g_src
      // previous layer's outputs, read with the same one-cycle latency as a RAM
      always_ff @(posedge clk) if (x_rd) x_data <= ybus[k-1][x_addr];
      assign l_start[k] = l_done[k-1];
    end

    ann_layer #(.N_IN(NI), .N_OUT(NO), .RELU(k != N_LAYERS - 1)) u_layer (
      .clk      (clk),
      .rst_n    (rst_n),
      .start    (l_start[k]),
      .busy     (),
      .done     (l_done[k]),
      .x_rd     (x_rd),
      .x_addr   (x_addr),
      .x_data   (x_data),
      .y        (y),
      .wt_we    (ld.en && ld.sel == 4'(1 + k)),
      .b_we     (ld.en && ld.sel == 4'(8 + k)),
      .wt_unit  (UW'(ld.unit)),
      .wt_index (IW'(ld.index)),
      .wt_data  (ld.data)
    );

    for (genvar n = 0; n < MAXN; n++) begin : g_ybus
      if (n < NO) begin : g_used
        assign ybus[k][n] = y[n];
      end else begin : g_unused
        assign ybus[k][n] = '0;
      end
    end
  end

  // a pass is in flight from start until the argmax result is out
  logic run_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q   <= 1'b0;
      label_q <= '0;
    end else begin
      if (start && !busy) begin
        run_q   <= 1'b1;
        label_q <= label;
      end else if (am_valid) begin
        run_q <= 1'b0;
      end
    end
  end
  assign busy = run_q;

  // weights, biases and pixels may only be loaded while no image is in flight
  a_load_idle: assert property (@(posedge clk) disable iff (!rst_n) ld.en |-> !busy);

  for (genvar n = 0; n < N_CLASS; n++) begin : g_scores
    assign scores[n] = ybus[N_LAYERS-1][n];
  end

  ann_argmax #(.N(N_CLASS)) u_argmax (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (l_done[N_LAYERS-1]),
    .v         (scores),
    .class_o   (class_o),
    .max_o     (),
    .out_valid (am_valid)
  );
  assign done = am_valid;

  ann_validate #(.CW(CW), .CNT(16)) u_validate (
    .clk       (clk),
    .rst_n     (rst_n),
    .clear     (clear_stats),
    .in_valid  (am_valid),
    .predicted (class_o),
    .expected  (label_q),
    .match     (match),
    .n_total   (n_total),
    .n_correct (n_correct)
  );
endmodule
