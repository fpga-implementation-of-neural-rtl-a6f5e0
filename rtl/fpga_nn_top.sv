// fpga_nn_top: the two networks of the design, side by side.
//
// ann_mlp is the fully connected 784-30-30-30-10 perceptron for 28x28 handwritten
// digits (distributed architecture); cnn_top is the convolutional network for
// 32x32 RGB patches. They share the clock and reset and nothing else: each has its
// own load port for weights, biases and image, its own start/done handshake and
// its own result. See ann_mlp and cnn_top for the load encodings and timing.
module fpga_nn_top
  import nn_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  // fully connected network
  input  load_t         ann_ld,
  input  logic          ann_start,
  input  logic [3:0]    ann_label,
  input  logic          ann_clear_stats,
  output logic          ann_busy,
  output logic          ann_done,
  output logic [3:0]    ann_class,
  output data_t [9:0]   ann_scores,
  output logic          ann_match,
  output logic [15:0]   ann_n_total,
  output logic [15:0]   ann_n_correct,
  // convolutional network
  input  load_t         cnn_ld,
  input  logic          cnn_start,
  output logic          cnn_busy,
  output logic          cnn_done,
  output logic [3:0]    cnn_class,
  output data_t [9:0]   cnn_scores
);
  ann_mlp u_ann (
    .clk         (clk),
    .rst_n       (rst_n),
    .ld          (ann_ld),
    .start       (ann_start),
    .label       (ann_label),
    .clear_stats (ann_clear_stats),
    .busy        (ann_busy),
    .done        (ann_done),
    .class_o     (ann_class),
    .scores      (ann_scores),
    .match       (ann_match),
    .n_total     (ann_n_total),
    .n_correct   (ann_n_correct)
  );

  cnn_top u_cnn (
    .clk     (clk),
    .rst_n   (rst_n),
    .ld      (cnn_ld),
    .start   (cnn_start),
    .busy    (cnn_busy),
    .done    (cnn_done),
    .class_o (cnn_class),
    .scores  (cnn_scores)
  );
endmodule
