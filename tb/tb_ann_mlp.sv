// tb_ann_mlp: runs the full-size 784-30-30-30-10 perceptron on three generated
// images. Loads every weight, bias and pixel through the load port, compares the
// ten output scores and the class with the integer model, checks the latency
// (883 cycles from start to done), and checks the validation counters with one
// deliberately wrong label. Counts how often ReLU clipped a hidden neuron.
module tb_ann_mlp;
  import nn_pkg::*;
  import tb_nn_ref::*;

  localparam int NIN = 784, NH = 30, NL = 4, NC = 10;
  logic clk = 0, rst_n = 0, start = 0, clear_stats = 0;
  load_t ld = '0;
  logic [3:0] label = 0, class_o;
  logic busy, done, match;
  data_t [NC-1:0] scores;
  logic [15:0] n_total, n_correct;
  int checks = 0, failures = 0, relu_clips = 0, n_match = 0, n_mismatch = 0;

  always #5 clk = ~clk;

  ann_mlp dut (.*);

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

  task automatic run_image(int img, int lab_off);
    int a[], b[];
    int cyc, exp_class;
    a = new[NIN];
    for (int i = 0; i < NIN; i++) begin
      a[i] = pgen(img, i);
      load(0, 0, i, a[i]);
    end
    @(posedge clk) ld.en <= 1'b0;
    for (int k = 0; k < NL; k++) begin
      dense(a, (k == 0) ? NIN : NH, (k == NL - 1) ? NC : NH, 1 + k, 8 + k, k != NL - 1, b);
      if (k != NL - 1) foreach (b[n]) if (b[n] == 0) relu_clips++;
      a = b;
    end
    exp_class = argmax(a);
    @(posedge clk);
    start <= 1; label <= 4'((exp_class + lab_off) % 10);
    @(posedge clk) start <= 0;
    cyc = 1;
    forever begin
      #1;
      if (done) break;
      @(posedge clk);
      cyc++;
    end
    checks++;
    if (cyc != 883) begin failures++; $display("latency %0d, expected 883", cyc); end
    for (int n = 0; n < NC; n++) begin
      checks++;
      if (int'(scores[n]) != a[n]) begin
        failures++; $display("img %0d score %0d = %0d, expected %0d", img, n, scores[n], a[n]);
      end
    end
    checks++;
    if (int'(class_o) != exp_class) begin
      failures++; $display("img %0d class %0d, expected %0d", img, class_o, exp_class);
    end
    @(posedge clk); #1;
    checks++;
    if (match != (lab_off == 0)) begin failures++; $display("img %0d match=%0d", img, match); end
    if (match) n_match++; else n_mismatch++;
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
    @(posedge clk) ld.en <= 1'b0;
    run_image(0, 0);
    run_image(1, 3);
    run_image(2, 0);
    checks++;
    if (n_total != 3 || n_correct != 2) begin
      failures++; $display("counters %0d/%0d, expected 2/3", n_correct, n_total);
    end
    $display("mechanisms: relu_clips=%0d matches=%0d mismatches=%0d", relu_clips, n_match, n_mismatch);
    checks++;
    if (relu_clips == 0 || n_match == 0 || n_mismatch == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
