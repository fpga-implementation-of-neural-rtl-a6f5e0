// ann_validate: compares the network's answer with the expected label.
//
// Each cycle with in_valid high counts one classified image in n_total and, when
// 'predicted' equals 'expected', one correct answer in n_correct; 'match' shows the
// outcome of the latest comparison. clear zeroes the counters. Accuracy is
// n_correct / n_total. The document uses the expected output as a comparison factor
// against the network output (Fig. 1, validating the result with predefined data);
// the counters and their width are this design's choices.
module ann_validate #(
  parameter int unsigned CW  = 4,
  parameter int unsigned CNT = 16
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clear,
  input  logic           in_valid,
  input  logic [CW-1:0]  predicted,
  input  logic [CW-1:0]  expected,
  output logic           match,
  output logic [CNT-1:0] n_total,
  output logic [CNT-1:0] n_correct
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      match     <= 1'b0;
      n_total   <= '0;
      n_correct <= '0;
    end else if (clear) begin
      match     <= 1'b0;
      n_total   <= '0;
      n_correct <= '0;
    end else if (in_valid) begin
      match   <= (predicted == expected);
      n_total <= n_total + 1'b1;
      if (predicted == expected) n_correct <= n_correct + 1'b1;
    end
  end
endmodule
