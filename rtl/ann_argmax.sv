// ann_argmax: the output layer's maximum function.
//
// When in_valid is high, the index of the largest of the N signed values in 'v' is
// registered into 'class_o' and out_valid is high on the next cycle. On a tie the
// lower index wins. The comparison is a combinational linear scan; for the ten
// outputs of the document's networks it is short. The document names a maximum
// function on the output layer; the tie rule and the one-cycle latency are this
// design's choices.
module ann_argmax
  import nn_pkg::*;
#(
  parameter int unsigned N  = 10,
  localparam int unsigned CW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  data_t [N-1:0] v,
  output logic [CW-1:0] class_o,
  output data_t         max_o,
  output logic          out_valid
);
  logic [CW-1:0] best_i;
  data_t         best_v;

  always_comb begin
    best_i = '0;
    best_v = v[0];
    for (int unsigned k = 1; k < N; k++) begin
      if (v[k] > best_v) begin
        best_v = v[k];
        best_i = CW'(k);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      class_o   <= '0;
      max_o     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        class_o <= best_i;
        max_o   <= best_v;
      end
    end
  end
endmodule
