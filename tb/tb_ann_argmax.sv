// tb_ann_argmax: checks the maximum function over ten signed values: random
// vectors, ties (lowest index must win), all-negative vectors, and the
// one-cycle latency of out_valid.
module tb_ann_argmax;
  import nn_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  data_t [9:0] v = '0;
  logic [3:0] class_o;
  data_t max_o;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ann_argmax #(.N(10)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 300; t++) begin
      int vals[10], best;
      for (int k = 0; k < 10; k++) begin
        case (t % 3)
          0: vals[k] = int'($urandom_range(0, 65535)) - 32768;
          1: vals[k] = int'($urandom_range(0, 3));            // many ties
          default: vals[k] = -int'($urandom_range(1, 30000));
        endcase
      end
      best = 0;
      for (int k = 1; k < 10; k++) if (vals[k] > vals[best]) best = k;
      @(posedge clk);
      in_valid <= 1;
      for (int k = 0; k < 10; k++) v[k] <= data_t'(vals[k]);
      @(posedge clk);
      in_valid <= 0;
      #1;
      checks++;
      if (!out_valid || class_o != best[3:0] || int'(max_o) != vals[best]) begin
        failures++;
        $display("t=%0d class=%0d max=%0d expected %0d/%0d", t, class_o, max_o, best, vals[best]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
