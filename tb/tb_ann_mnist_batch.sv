// tb_ann_mnist_batch: the perceptron over a batch the size of the MNIST test set.
//
// Runs 10,000 generated 28x28 images through the full-size 784-30-30-30-10
// network one after another, as a test-set evaluation would. Every image's class
// is compared with the integer model; the expected label given to the
// validation unit is the model's class except for every seventh image, where
// it is deliberately wrong. At the end n_total must be 10,000 and n_correct
// 10,000 - 1,429, which shows the 16-bit counters hold a full test set. Weights
// are loaded once; each image is loaded (784 words) and classified (883 cycles).
module tb_ann_mnist_batch;
  import nn_pkg::*;
  import tb_nn_ref::*;

  localparam int NIN = 784, NH = 30, NL = 4, NC = 10, N_IMAGES = 10000;
  logic clk = 0, rst_n = 0, start = 0, clear_stats = 0;
  load_t ld = '0;
  logic [3:0] label = 0, class_o;
  logic busy, done, match;
  data_t [NC-1:0] scores;
  logic [15:0] n_total, n_correct;
  int checks = 0, failures = 0, wrong_labels = 0;

  always #5 clk = ~clk;

  ann_mlp dut (.*);

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(int sel, int unit, int index, int data);
    @(posedge clk);
    ld <= '{en: 1'b1, sel: 4'(sel), unit: 8'(unit), index: 16'(index), data: data_t'(data)};
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int k = 0; k < NL; k++) begin
      automatic int ni = (k == 0) ? NIN : NH;
      automatic int no = (k == NL - 1) ? NC : NH;
      for (int n = 0; n < no; n++) begin
        for (int i = 0; i < ni; i++) load(1 + k, n, i, wgen(1 + k, n, i));
        load(8 + k, n, 0, wgen(8 + k, n, 0));
      end
    end
    for (int img = 0; img < N_IMAGES; img++) begin
      automatic int a[] = new[NIN];
      automatic int b[];
      automatic int exp_class;
      automatic bit wrong = (img % 7 == 3);
      foreach (a[i]) begin a[i] = pgen(1000 + img, i); load(0, 0, i, a[i]); end
      @(posedge clk) ld.en <= 1'b0;
      for (int k = 0; k < NL; k++) begin
        dense(a, (k == 0) ? NIN : NH, (k == NL - 1) ? NC : NH, 1 + k, 8 + k, k != NL - 1, b);
        a = b;
      end
      exp_class = argmax(a);
      if (wrong) wrong_labels++;
      @(posedge clk);
      start <= 1; label <= 4'((exp_class + (wrong ? 1 : 0)) % 10);
      @(posedge clk) start <= 0;
      forever begin #1; if (done) break; @(posedge clk); end
      checks++;
      if (int'(class_o) != exp_class) begin
        failures++;
        if (failures < 10) $display("image %0d class %0d, expected %0d", img, class_o, exp_class);
      end
    end
    @(posedge clk); #1;
    checks++;
    if (int'(n_total) != N_IMAGES || int'(n_correct) != N_IMAGES - wrong_labels) begin
      failures++;
      $display("counters %0d/%0d, expected %0d/%0d", n_correct, n_total, N_IMAGES - wrong_labels, N_IMAGES);
    end
    $display("batch: %0d images, %0d agreed with the given label (%0d.%02d %%)", n_total, n_correct,
             n_correct * 100 / n_total, (n_correct * 10000 / n_total) % 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
