// tb_fpga_nn_top: end-to-end test of the whole design at its full size.
//
// The 784-30-30-30-10 perceptron and the 32x32x3 convolutional network run at
// the same time, each fed through its own load port. The perceptron classifies
// two generated 28x28 images (one with a wrong expected label), the CNN one
// generated 32x32 RGB patch. Scores, classes, validation counters and both
// latencies (883 cycles; the CNN cycle formula) are compared with the integer
// model. Mechanisms counted, each of which must occur: ReLU clipping, padding
// taps, convolution, max pooling, average pooling and full-connection runs,
// label match and mismatch.
module tb_fpga_nn_top;
  import nn_pkg::*;
  import tb_nn_ref::*;

  // perceptron sizes
  localparam int NIN = 784, NH = 30, NL = 4, NC = 10;
  // CNN sizes
  localparam int IMG = 32, CIN = 3, C1 = 32, C2 = 32, C3 = 64, K = 5, PAD = 2;
  localparam int NF = C3 * (IMG / 8) * (IMG / 8);
  localparam int T_CNN = C1 * IMG * IMG * CIN * K * K + 4 * C1 * (IMG / 2) * (IMG / 2)
                       + C2 * (IMG / 2) * (IMG / 2) * C1 * K * K + 4 * C2 * (IMG / 4) * (IMG / 4)
                       + C3 * (IMG / 4) * (IMG / 4) * C2 * K * K + 4 * C3 * (IMG / 8) * (IMG / 8)
                       + NC * NF + 23;

  logic clk = 0, rst_n = 0;
  load_t ann_ld = '0, cnn_ld = '0;
  logic ann_start = 0, ann_clear_stats = 0, cnn_start = 0;
  logic [3:0] ann_label = 0, ann_class, cnn_class;
  logic ann_busy, ann_done, ann_match, cnn_busy, cnn_done;
  data_t [9:0] ann_scores, cnn_scores;
  logic [15:0] ann_n_total, ann_n_correct;

  int checks = 0, failures = 0, relu_clips = 0, n_match = 0, n_mismatch = 0;
  int n_conv = 0, n_maxpool = 0, n_avgpool = 0, n_fc = 0;
  longint pads = 0;

  always #5 clk = ~clk;

  fpga_nn_top dut (.*);

  always @(posedge clk) if (rst_n) begin
    if (dut.u_cnn.c1_done || dut.u_cnn.c2_done || dut.u_cnn.c3_done) n_conv++;
    if (dut.u_cnn.p1_done) n_maxpool++;
    if (dut.u_cnn.p2_done || dut.u_cnn.p3_done) n_avgpool++;
    if (dut.u_cnn.fc_done) n_fc++;
  end

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ann_load(int sel, int unit, int index, int data);
    @(posedge clk);
    ann_ld <= '{en: 1'b1, sel: 4'(sel), unit: 8'(unit), index: 16'(index), data: data_t'(data)};
  endtask

  task automatic cnn_load(int sel, int unit, int index, int data);
    @(posedge clk);
    cnn_ld <= '{en: 1'b1, sel: 4'(sel), unit: 8'(unit), index: 16'(index), data: data_t'(data)};
  endtask

  task automatic ann_image(int img, int lab_off);
    int a[], b[];
    int cyc, exp_class;
    a = new[NIN];
    foreach (a[i]) begin a[i] = pgen(img, i); ann_load(0, 0, i, a[i]); end
    @(posedge clk) ann_ld.en <= 1'b0;
    for (int k = 0; k < NL; k++) begin
      dense(a, (k == 0) ? NIN : NH, (k == NL - 1) ? NC : NH, 1 + k, 8 + k, k != NL - 1, b);
      if (k != NL - 1) foreach (b[n]) if (b[n] == 0) relu_clips++;
      a = b;
    end
    exp_class = argmax(a);
    @(posedge clk);
    ann_start <= 1; ann_label <= 4'((exp_class + lab_off) % 10);
    @(posedge clk) ann_start <= 0;
    cyc = 1;
    forever begin #1; if (ann_done) break; @(posedge clk); cyc++; end
    checks++;
    if (cyc != 883) begin failures++; $display("ANN latency %0d, expected 883", cyc); end
    for (int n = 0; n < NC; n++) begin
      checks++;
      if (int'(ann_scores[n]) != a[n]) begin
        failures++; $display("ANN img %0d score %0d = %0d, expected %0d", img, n, int'(ann_scores[n]), a[n]);
      end
    end
    checks++;
    if (int'(ann_class) != exp_class) begin
      failures++; $display("ANN img %0d class %0d, expected %0d", img, ann_class, exp_class);
    end
    @(posedge clk); #1;
    checks++;
    if (ann_match != (lab_off == 0)) begin failures++; $display("ANN img %0d match=%0d", img, ann_match); end
    if (ann_match) n_match++; else n_mismatch++;
    $display("ANN image %0d: class %0d", img, exp_class);
  endtask

  task automatic ann_thread();
    for (int k = 0; k < NL; k++) begin
      automatic int ni = (k == 0) ? NIN : NH;
      automatic int no = (k == NL - 1) ? NC : NH;
      for (int n = 0; n < no; n++) begin
        for (int i = 0; i < ni; i++) ann_load(1 + k, n, i, wgen(1 + k, n, i));
        ann_load(8 + k, n, 0, wgen(8 + k, n, 0));
      end
    end
    @(posedge clk) ann_ld.en <= 1'b0;
    ann_image(0, 0);
    ann_image(1, 5);
    checks++;
    if (ann_n_total != 2 || ann_n_correct != 1) begin
      failures++; $display("ANN counters %0d/%0d, expected 1/2", ann_n_correct, ann_n_total);
    end
  endtask

  task automatic cnn_thread();
    int a[], b[];
    int cyc, exp_class;
    for (int co = 0; co < C1; co++) begin
      for (int i = 0; i < CIN * K * K; i++) cnn_load(1, co, i, wgen(1, co, i));
      cnn_load(8, co, 0, wgen(8, co, 0));
    end
    for (int co = 0; co < C2; co++) begin
      for (int i = 0; i < C1 * K * K; i++) cnn_load(2, co, i, wgen(2, co, i));
      cnn_load(9, co, 0, wgen(9, co, 0));
    end
    for (int co = 0; co < C3; co++) begin
      for (int i = 0; i < C2 * K * K; i++) cnn_load(3, co, i, wgen(3, co, i));
      cnn_load(10, co, 0, wgen(10, co, 0));
    end
    for (int o = 0; o < NC; o++) begin
      for (int i = 0; i < NF; i++) cnn_load(4, o, i, wgen(4, o, i));
      cnn_load(11, o, 0, wgen(11, o, 0));
    end
    a = new[CIN * IMG * IMG];
    foreach (a[i]) begin a[i] = pgen(50, i) * 8; cnn_load(0, 0, i, a[i]); end
    @(posedge clk) cnn_ld.en <= 1'b0;
    conv(a, IMG, IMG, CIN, C1, K, PAD, 1, 8, b, pads);              a = b;
    foreach (a[i]) if (a[i] == 0) relu_clips++;
    pool(a, IMG, IMG, C1, 1'b0, b);                                 a = b;
    conv(a, IMG / 2, IMG / 2, C1, C2, K, PAD, 2, 9, b, pads);       a = b;
    pool(a, IMG / 2, IMG / 2, C2, 1'b1, b);                         a = b;
    conv(a, IMG / 4, IMG / 4, C2, C3, K, PAD, 3, 10, b, pads);      a = b;
    pool(a, IMG / 4, IMG / 4, C3, 1'b1, b);                         a = b;
    dense(a, NF, NC, 4, 11, 1'b1, b);                               a = b;
    exp_class = argmax(a);
    @(posedge clk) cnn_start <= 1;
    @(posedge clk) cnn_start <= 0;
    cyc = 1;
    forever begin #1; if (cnn_done) break; @(posedge clk); cyc++; end
    checks++;
    if (cyc != T_CNN) begin failures++; $display("CNN took %0d cycles, expected %0d", cyc, T_CNN); end
    for (int n = 0; n < NC; n++) begin
      checks++;
      if (int'(cnn_scores[n]) != a[n]) begin
        failures++; $display("CNN score %0d = %0d, expected %0d", n, int'(cnn_scores[n]), a[n]);
      end
    end
    checks++;
    if (int'(cnn_class) != exp_class) begin
      failures++; $display("CNN class %0d, expected %0d", cnn_class, exp_class);
    end
    $display("CNN image: class %0d in %0d cycles", exp_class, cyc);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    fork
      ann_thread();
      cnn_thread();
    join
    $display("mechanisms: relu_clips=%0d padding_taps=%0d conv=%0d maxpool=%0d avgpool=%0d fc=%0d match=%0d mismatch=%0d",
             relu_clips, pads, n_conv, n_maxpool, n_avgpool, n_fc, n_match, n_mismatch);
    checks++;
    if (relu_clips == 0 || pads == 0 || n_conv != 3 || n_maxpool != 1 || n_avgpool != 2 ||
        n_fc != 1 || n_match == 0 || n_mismatch == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
