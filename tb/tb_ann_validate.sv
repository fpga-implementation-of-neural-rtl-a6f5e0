// tb_ann_validate: checks the result comparison: per-image match flag, the
// classified and correct counters against a model, and clear.
module tb_ann_validate;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0, match;
  logic [3:0] predicted = 0, expected = 0;
  logic [15:0] n_total, n_correct;
  int checks = 0, failures = 0, m_total = 0, m_correct = 0;

  always #5 clk = ~clk;

  ann_validate #(.CW(4), .CNT(16)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 400; t++) begin
      logic [3:0] p, e;
      bit vld, clr;
      p = 4'($urandom_range(0, 9));
      e = $urandom_range(0, 1) ? p : 4'($urandom_range(0, 9));
      vld = $urandom_range(0, 3) != 0;
      clr = (t == 200);
      @(posedge clk);
      predicted <= p; expected <= e; in_valid <= vld; clear <= clr;
      if (clr) begin m_total = 0; m_correct = 0; end
      else if (vld) begin m_total++; if (p == e) m_correct++; end
      @(posedge clk);
      in_valid <= 0; clear <= 0;
      #1;
      checks++;
      if (n_total != 16'(m_total) || n_correct != 16'(m_correct) ||
          (vld && !clr && match != (p == e))) begin
        failures++;
        $display("t=%0d total=%0d correct=%0d match=%0d expected %0d %0d", t, n_total, n_correct, match, m_total, m_correct);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
