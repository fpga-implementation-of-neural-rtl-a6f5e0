// cnn_top: the convolutional network, one image at a time.
//
// Stage order: convolution (CIN -> C1 maps), 2x2 max pooling, convolution
// (C1 -> C2), 2x2 average pooling, convolution (C2 -> C3), 2x2 average pooling,
// reshape to a vector of C3*(IMG/8)^2 features, full connection to N_CLASS
// outputs with ReLU, and the maximum function for the class. Every convolution is
// KxK with PAD zero pixels of padding, a bias and ReLU. With the default sizes a
// 32x32 RGB patch gives 32 maps of 32x32, 16x16 after max pooling, 8x8 and 4x4
// after the average poolings, and 1024 features.
//
// Each stage writes its result into a feature-map block RAM of its own, and a
// sequencer starts the next stage when one reports 'done', so the stages run one
// after another. An image takes (with the default sizes)
//   C1*IMG^2*CIN*K^2 + 4*C1*(IMG/2)^2 + C2*(IMG/2)^2*C1*K^2 + 4*C2*(IMG/4)^2
//   + C3*(IMG/4)^2*C2*K^2 + 4*C3*(IMG/8)^2 + N_CLASS*C3*(IMG/8)^2 + 23 cycles
// (rising edges from the one that accepts start to the one that raises done).
//
// Loading (ld.en high, one word per cycle, only while idle):
//   ld.sel = 0        image word ld.index = (c*IMG + y)*IMG + x
//   ld.sel = 1, 2, 3  convolution 1, 2, 3 weight ld.index = (ci*K + ky)*K + kx of map ld.unit
//   ld.sel = 4        full-connection weight ld.index of output ld.unit
//   ld.sel = 8..11    bias of map / output ld.unit of convolution 1, 2, 3, full connection
// 'start' begins an image; 'done' pulses with class_o and scores valid.
// The stage order, the 32x32x3 input, the 5x5 kernel with 2-pixel padding, the
// 32 first-layer maps and the 16x16 size after max pooling follow the document.
// The map counts of the second and third convolution, the 2x2 pooling windows and
// the ten outputs are this design's choices.
module cnn_top
  import nn_pkg::*;
#(
  parameter int unsigned IMG     = 32,
  parameter int unsigned CIN     = 3,
  parameter int unsigned C1      = 32,
  parameter int unsigned C2      = 32,
  parameter int unsigned C3      = 64,
  parameter int unsigned K       = 5,
  parameter int unsigned PAD     = 2,
  parameter int unsigned N_CLASS = 10,
  localparam int unsigned S1 = IMG, S2 = IMG / 2, S3 = IMG / 4, S4 = IMG / 8,
  localparam int unsigned N_FEAT = C3 * S4 * S4,
  localparam int unsigned CW = (N_CLASS > 1) ? $clog2(N_CLASS) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  load_t               ld,
  input  logic                start,
  output logic                busy,
  output logic                done,
  output logic [CW-1:0]       class_o,
  output data_t [N_CLASS-1:0] scores
);
  typedef enum logic [3:0] {
    ST_IDLE, ST_CONV1, ST_POOL1, ST_CONV2, ST_POOL2, ST_CONV3, ST_POOL3, ST_FC, ST_MAX
  } state_t;
  state_t st;

  localparam int unsigned D0 = CIN * S1 * S1;   // image
  localparam int unsigned D1 = C1 * S1 * S1;    // conv1 out
  localparam int unsigned D2 = C1 * S2 * S2;    // pool1 out
  localparam int unsigned D3 = C2 * S2 * S2;    // conv2 out
  localparam int unsigned D4 = C2 * S3 * S3;    // pool2 out
  localparam int unsigned D5 = C3 * S3 * S3;    // conv3 out
  localparam int unsigned D6 = C3 * S4 * S4;    // pool3 out = features

  localparam int unsigned UW_1 = $clog2(C1), XW_1 = $clog2(CIN * K * K);
  localparam int unsigned UW_2 = $clog2(C2), XW_2 = $clog2(C1 * K * K);
  localparam int unsigned UW_3 = $clog2(C3), XW_3 = $clog2(C2 * K * K);

  // stage handshakes
  logic c1_done, p1_done, c2_done, p2_done, c3_done, p3_done, fc_done;
  logic c1_busy, p1_busy, c2_busy, p2_busy, c3_busy, p3_busy, fc_busy;
  logic am_valid;

  // buffer ports: r* read side, w* write side
  logic              r0, r1, r2, r3, r4, r5, r6;
  logic [$clog2(D0)-1:0] ra0;
  logic [$clog2(D1)-1:0] ra1, wa1;
  logic [$clog2(D2)-1:0] ra2, wa2;
  logic [$clog2(D3)-1:0] ra3, wa3;
  logic [$clog2(D4)-1:0] ra4, wa4;
  logic [$clog2(D5)-1:0] ra5, wa5;
  logic [$clog2(D6)-1:0] ra6, wa6;
  logic              w1, w2, w3, w4, w5, w6;
  data_t             rd0, rd1, rd2, rd3, rd4, rd5, rd6;
  data_t             wd1, wd2, wd3, wd4, wd5, wd6;

  nn_ram #(.WIDTH(DATA_W), .DEPTH(D0)) u_img (.clk, .wr_en(ld.en && ld.sel == 4'd0),
    .wr_addr($clog2(D0)'(ld.index)), .wr_data(ld.data), .rd_en(r0), .rd_addr(ra0), .rd_data(rd0));
  nn_ram #(.WIDTH(DATA_W), .DEPTH(D1)) u_f1 (.clk, .wr_en(w1), .wr_addr(wa1), .wr_data(wd1),
    .rd_en(r1), .rd_addr(ra1), .rd_data(rd1));
  nn_ram #(.WIDTH(DATA_W), .DEPTH(D2)) u_f2 (.clk, .wr_en(w2), .wr_addr(wa2), .wr_data(wd2),
    .rd_en(r2), .rd_addr(ra2), .rd_data(rd2));
  nn_ram #(.WIDTH(DATA_W), .DEPTH(D3)) u_f3 (.clk, .wr_en(w3), .wr_addr(wa3), .wr_data(wd3),
    .rd_en(r3), .rd_addr(ra3), .rd_data(rd3));
  nn_ram #(.WIDTH(DATA_W), .DEPTH(D4)) u_f4 (.clk, .wr_en(w4), .wr_addr(wa4), .wr_data(wd4),
    .rd_en(r4), .rd_addr(ra4), .rd_data(rd4));
  nn_ram #(.WIDTH(DATA_W), .DEPTH(D5)) u_f5 (.clk, .wr_en(w5), .wr_addr(wa5), .wr_data(wd5),
    .rd_en(r5), .rd_addr(ra5), .rd_data(rd5));
  nn_ram #(.WIDTH(DATA_W), .DEPTH(D6)) u_f6 (.clk, .wr_en(w6), .wr_addr(wa6), .wr_data(wd6),
    .rd_en(r6), .rd_addr(ra6), .rd_data(rd6));

  cnn_conv #(.H(S1), .W(S1), .CIN(CIN), .COUT(C1), .K(K), .PAD(PAD)) u_conv1 (
    .clk, .rst_n, .start(st == ST_CONV1 && !c1_busy && !c1_done), .busy(c1_busy), .done(c1_done),
    .in_rd(r0), .in_addr(ra0), .in_data(rd0), .out_we(w1), .out_addr(wa1), .out_data(wd1),
    .wt_we(ld.en && ld.sel == 4'd1), .b_we(ld.en && ld.sel == 4'd8),
    .wt_unit(UW_1'(ld.unit)), .wt_index(XW_1'(ld.index)),
    .wt_data(ld.data));

  cnn_pool #(.H(S1), .W(S1), .C(C1), .AVG(1'b0)) u_pool1 (
    .clk, .rst_n, .start(st == ST_POOL1 && !p1_busy && !p1_done), .busy(p1_busy), .done(p1_done),
    .in_rd(r1), .in_addr(ra1), .in_data(rd1), .out_we(w2), .out_addr(wa2), .out_data(wd2));

  cnn_conv #(.H(S2), .W(S2), .CIN(C1), .COUT(C2), .K(K), .PAD(PAD)) u_conv2 (
    .clk, .rst_n, .start(st == ST_CONV2 && !c2_busy && !c2_done), .busy(c2_busy), .done(c2_done),
    .in_rd(r2), .in_addr(ra2), .in_data(rd2), .out_we(w3), .out_addr(wa3), .out_data(wd3),
    .wt_we(ld.en && ld.sel == 4'd2), .b_we(ld.en && ld.sel == 4'd9),
    .wt_unit(UW_2'(ld.unit)), .wt_index(XW_2'(ld.index)),
    .wt_data(ld.data));

  cnn_pool #(.H(S2), .W(S2), .C(C2), .AVG(1'b1)) u_pool2 (
    .clk, .rst_n, .start(st == ST_POOL2 && !p2_busy && !p2_done), .busy(p2_busy), .done(p2_done),
    .in_rd(r3), .in_addr(ra3), .in_data(rd3), .out_we(w4), .out_addr(wa4), .out_data(wd4));

  cnn_conv #(.H(S3), .W(S3), .CIN(C2), .COUT(C3), .K(K), .PAD(PAD)) u_conv3 (
    .clk, .rst_n, .start(st == ST_CONV3 && !c3_busy && !c3_done), .busy(c3_busy), .done(c3_done),
    .in_rd(r4), .in_addr(ra4), .in_data(rd4), .out_we(w5), .out_addr(wa5), .out_data(wd5),
    .wt_we(ld.en && ld.sel == 4'd3), .b_we(ld.en && ld.sel == 4'd10),
    .wt_unit(UW_3'(ld.unit)), .wt_index(XW_3'(ld.index)),
    .wt_data(ld.data));

  cnn_pool #(.H(S3), .W(S3), .C(C3), .AVG(1'b1)) u_pool3 (
    .clk, .rst_n, .start(st == ST_POOL3 && !p3_busy && !p3_done), .busy(p3_busy), .done(p3_done),
    .in_rd(r5), .in_addr(ra5), .in_data(rd5), .out_we(w6), .out_addr(wa6), .out_data(wd6));

  cnn_fc #(.N_IN(N_FEAT), .N_OUT(N_CLASS), .RELU(1'b1)) u_fc (
    .clk, .rst_n, .start(st == ST_FC && !fc_busy && !fc_done), .busy(fc_busy), .done(fc_done),
    .in_rd(r6), .in_addr(ra6), .in_data(rd6), .y(scores),
    .wt_we(ld.en && ld.sel == 4'd4), .b_we(ld.en && ld.sel == 4'd11),
    .wt_unit(CW'(ld.unit)), .wt_index($clog2(N_FEAT)'(ld.index)),
    .wt_data(ld.data));

  ann_argmax #(.N(N_CLASS)) u_argmax (
    .clk, .rst_n, .in_valid(fc_done), .v(scores), .class_o(class_o), .max_o(),
    .out_valid(am_valid));

  // Sequencer. A stage is started in the first cycle of its state (its start is
  // gated by its own busy/done) and the state moves on when the stage reports done.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) st <= ST_IDLE;
    else begin
      unique case (st)
        ST_IDLE:  if (start)    st <= ST_CONV1;
        ST_CONV1: if (c1_done)  st <= ST_POOL1;
        ST_POOL1: if (p1_done)  st <= ST_CONV2;
        ST_CONV2: if (c2_done)  st <= ST_POOL2;
        ST_POOL2: if (p2_done)  st <= ST_CONV3;
        ST_CONV3: if (c3_done)  st <= ST_POOL3;
        ST_POOL3: if (p3_done)  st <= ST_FC;
        ST_FC:    if (fc_done)  st <= ST_MAX;
        ST_MAX:   if (am_valid) st <= ST_IDLE;
        default:                st <= ST_IDLE;
      endcase
    end
  end

  assign busy = (st != ST_IDLE);

  // The stages share nothing but must still run strictly one after another, and
  // weights or the image may only be loaded while no image is in flight.
  a_one_stage: assert property (@(posedge clk) disable iff (!rst_n)
    ($countones({c1_busy, p1_busy, c2_busy, p2_busy, c3_busy, p3_busy, fc_busy}) <= 1));
  a_load_idle: assert property (@(posedge clk) disable iff (!rst_n) ld.en |-> !busy);
  assign done = am_valid;
endmodule
