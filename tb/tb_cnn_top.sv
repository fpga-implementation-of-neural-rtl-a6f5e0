// tb_cnn_top: runs the whole convolutional network at a reduced size (8x8 RGB
// input, 4 maps in every convolution, 10 outputs) on two generated images.
// Loads weights, biases and pixels through the load port, compares the ten
// scores and the class with the integer model of every stage, and checks the
// image time against the cycle formula of the sequencer. Counts padding taps,
// ReLU clipping and the runs of every stage (convolution, max and average
// pooling, full connection); a mechanism that never occurred is a failure.
module tb_cnn_top;
  import nn_pkg::*;
  import tb_nn_ref::*;

  localparam int IMG = 8, CIN = 3, C1 = 4, C2 = 4, C3 = 4, K = 5, PAD = 2, NC = 10;
  localparam int NF = C3 * (IMG / 8) * (IMG / 8);
  localparam int T = C1 * IMG * IMG * CIN * K * K + 4 * C1 * (IMG / 2) * (IMG / 2)
                   + C2 * (IMG / 2) * (IMG / 2) * C1 * K * K + 4 * C2 * (IMG / 4) * (IMG / 4)
                   + C3 * (IMG / 4) * (IMG / 4) * C2 * K * K + 4 * C3 * (IMG / 8) * (IMG / 8)
                   + NC * NF + 23;

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  load_t ld = '0;
  logic [3:0] class_o;
  data_t [NC-1:0] scores;
  int checks = 0, failures = 0, clips = 0;
  int n_conv = 0, n_maxpool = 0, n_avgpool = 0, n_fc = 0;
  longint pads = 0;

  always #5 clk = ~clk;

  cnn_top #(.IMG(IMG), .CIN(CIN), .C1(C1), .C2(C2), .C3(C3), .K(K), .PAD(PAD), .N_CLASS(NC)) dut (.*);

  always @(posedge clk) if (rst_n) begin
    if (dut.c1_done || dut.c2_done || dut.c3_done) n_conv++;
    if (dut.p1_done) n_maxpool++;
    if (dut.p2_done || dut.p3_done) n_avgpool++;
    if (dut.fc_done) n_fc++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(int sel, int unit, int index, int data);
    @(posedge clk);
    ld <= '{en: 1'b1, sel: 4'(sel), unit: 8'(unit), index: 16'(index), data: data_t'(data)};
  endtask

  task automatic run_image(int img);
    int a[], b[];
    int cyc, exp_class;
    a = new[CIN * IMG * IMG];
    foreach (a[i]) begin a[i] = pgen(img, i) * 8; load(0, 0, i, a[i]); end
    @(posedge clk) ld.en <= 1'b0;
    conv(a, IMG, IMG, CIN, C1, K, PAD, 1, 8, b, pads);      a = b;
    foreach (a[i]) if (a[i] == 0) clips++;
    pool(a, IMG, IMG, C1, 1'b0, b);                         a = b;
    conv(a, IMG / 2, IMG / 2, C1, C2, K, PAD, 2, 9, b, pads); a = b;
    pool(a, IMG / 2, IMG / 2, C2, 1'b1, b);                 a = b;
    conv(a, IMG / 4, IMG / 4, C2, C3, K, PAD, 3, 10, b, pads); a = b;
    pool(a, IMG / 4, IMG / 4, C3, 1'b1, b);                 a = b;
    dense(a, NF, NC, 4, 11, 1'b1, b);                       a = b;
    foreach (a[i]) if (a[i] == 0) clips++;
    exp_class = argmax(a);
    @(posedge clk) start <= 1;
    @(posedge clk) start <= 0;
    cyc = 1;
    forever begin #1; if (done) break; @(posedge clk); cyc++; end
    checks++;
    if (cyc != T) begin failures++; $display("image took %0d cycles, expected %0d", cyc, T); end
    for (int n = 0; n < NC; n++) begin
      checks++;
      if (int'(scores[n]) != a[n]) begin
        failures++; $display("img %0d score %0d = %0d, expected %0d", img, n, int'(scores[n]), a[n]);
      end
    end
    checks++;
    if (int'(class_o) != exp_class) begin
      failures++; $display("img %0d class %0d, expected %0d", img, class_o, exp_class);
    end
    $display("img %0d: class %0d", img, exp_class);
  endtask

  task automatic load_conv(int sel, int cout, int ckk);
    for (int co = 0; co < cout; co++) begin
      for (int i = 0; i < ckk; i++) load(sel, co, i, wgen(sel, co, i));
      load(sel + 7, co, 0, wgen(sel + 7, co, 0));
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    load_conv(1, C1, CIN * K * K);
    load_conv(2, C2, C1 * K * K);
    load_conv(3, C3, C2 * K * K);
    load_conv(4, NC, NF);
    @(posedge clk) ld.en <= 1'b0;
    run_image(0);
    run_image(1);
    $display("mechanisms: padding_taps=%0d relu_clips=%0d conv=%0d maxpool=%0d avgpool=%0d fc=%0d",
             pads, clips, n_conv, n_maxpool, n_avgpool, n_fc);
    checks++;
    if (pads == 0 || clips == 0 || n_conv != 6 || n_maxpool != 2 || n_avgpool != 4 || n_fc != 2)
      failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
