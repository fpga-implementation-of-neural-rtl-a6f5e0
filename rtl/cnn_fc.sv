// cnn_fc: fully connected layer of the CNN, followed by ReLU.
//
// The flattened feature vector (N_IN words, read from an outside memory with one
// cycle of latency) is multiplied with the weight row of each of the N_OUT outputs
// in turn by one neuron (multiplier plus accumulator); the bias is added and ReLU
// applied. Results are kept in 'y', all valid when 'done' pulses,
// N_OUT*N_IN + 3 cycles after start. wt_we writes weight wt_index of output
// wt_unit into the internal weight RAM; b_we writes that output's bias.
// The document feeds the reshaped features to the full connection and ReLU
// layers; the output count (ten digit classes) and the serial schedule are this
// design's choices.
module cnn_fc
  import nn_pkg::*;
#(
  parameter int unsigned N_IN  = 1024,
  parameter int unsigned N_OUT = 10,
  parameter bit          RELU  = 1'b1,
  localparam int unsigned IW   = (N_IN  > 1) ? $clog2(N_IN)  : 1,
  localparam int unsigned UW   = (N_OUT > 1) ? $clog2(N_OUT) : 1,
  localparam int unsigned WAW  = $clog2(N_IN * N_OUT)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  output logic               busy,
  output logic               done,
  output logic               in_rd,
  output logic [IW-1:0]      in_addr,
  input  data_t              in_data,
  output data_t [N_OUT-1:0]  y,
  input  logic               wt_we,
  input  logic               b_we,
  input  logic [UW-1:0]      wt_unit,
  input  logic [IW-1:0]      wt_index,
  input  data_t              wt_data
);
  int unsigned i, o;
  logic run, last_all;

  assign last_all = (i == N_IN - 1) && (o == N_OUT - 1);
  assign in_rd    = run;
  assign in_addr  = IW'(i);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; i <= 0; o <= 0;
    end else if (start && !busy) begin
      run <= 1'b1; i <= 0; o <= 0;
    end else if (run) begin
      if (last_all) run <= 1'b0;
      if (i != N_IN - 1) i <= i + 1;
      else begin
        i <= 0;
        o <= o + 1;
      end
    end
  end

  data_t w_q;
  nn_ram #(.WIDTH(DATA_W), .DEPTH(N_IN * N_OUT)) u_wmem (
    .clk     (clk),
    .wr_en   (wt_we),
    .wr_addr (WAW'(wt_unit * N_IN + wt_index)),
    .wr_data (wt_data),
    .rd_en   (run),
    .rd_addr (WAW'(o * N_IN + i)),
    .rd_data (w_q)
  );

  data_t bias_q [N_OUT];
  always_ff @(posedge clk) if (b_we) bias_q[wt_unit] <= wt_data;

  logic          v_d, first_d, last_d;
  logic [UW-1:0] o_d, o_dd;
  logic          n_valid;
  data_t         n_y;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_d <= 1'b0; first_d <= 1'b0; last_d <= 1'b0; o_d <= '0; o_dd <= '0;
    end else begin
      v_d     <= run;
      first_d <= run && i == 0;
      last_d  <= run && i == N_IN - 1;
      o_d     <= UW'(o);
      if (v_d && last_d) o_dd <= o_d;
    end
  end

  nn_neuron u_mac (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (v_d),
    .in_first  (first_d),
    .in_last   (last_d),
    .x         (in_data),
    .w         (w_q),
    .bias      (bias_q[o_d]),
    .relu      (RELU),
    .y         (n_y),
    .out_valid (n_valid)
  );

  // results land in y one cycle after the neuron's out_valid; done follows them
  logic fin_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y     <= '0;
      fin_q <= 1'b0;
    end else begin
      fin_q <= n_valid && !(run || v_d);
      if (n_valid) y[o_dd] <= n_y;
    end
  end

  assign busy = run || v_d || n_valid || fin_q;
  assign done = fin_q;
endmodule
