// tb_nn_neuron: checks the serial multiply-accumulate neuron.
// Streams dot products of random length (1..40) with random 16-bit operands,
// back to back and with gaps, with and without ReLU, and compares y with an
// integer model. Also checks that out_valid comes exactly one cycle after the
// last pair, and that large sums saturate.
module tb_nn_neuron;
  import nn_pkg::*;
  import tb_nn_ref::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_first = 0, in_last = 0, relu = 0;
  data_t x = 0, w = 0, bias = 0, y;
  logic out_valid;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  nn_neuron dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_dot(int n, bit r, int mode, bit gap);
    longint acc = 0;
    int b, exp_y;
    b = (mode == 2) ? 32767 : int'($urandom_range(0, 2047)) - 1024;
    for (int i = 0; i < n; i++) begin
      int xi, wi;
      if (mode == 2) begin xi = 32767; wi = 32767; end
      else begin
        xi = int'($urandom_range(0, 65535)) - 32768;
        wi = int'($urandom_range(0, 1023)) - 512;
      end
      acc += longint'(xi) * wi;
      @(posedge clk);
      in_valid <= 1; in_first <= (i == 0); in_last <= (i == n - 1);
      x <= data_t'(xi); w <= data_t'(wi); bias <= data_t'(b); relu <= r;
      if (gap && i != n - 1) begin
        @(posedge clk); in_valid <= 0;
      end
    end
    @(posedge clk);
    in_valid <= 0; in_first <= 0; in_last <= 0;
    exp_y = rq(acc, b, r);
    #1;
    checks++;
    if (!out_valid) begin failures++; $display("out_valid missing one cycle after last"); end
    checks++;
    if (int'(y) != exp_y) begin
      failures++; $display("y=%0d expected %0d (n=%0d relu=%0d)", y, exp_y, n, r);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 200; t++)
      run_dot(int'($urandom_range(1, 40)), t[0], (t % 50 == 7) ? 2 : 0, t[2]);
    @(posedge clk); #1;
    checks++;
    if (out_valid) begin failures++; $display("spurious out_valid"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
