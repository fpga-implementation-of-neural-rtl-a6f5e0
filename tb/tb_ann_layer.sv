// tb_ann_layer: checks one fully connected layer (20 inputs, 5 ReLU neurons).
// Loads weights and biases through the load port, models the source memory with
// one cycle of read latency, runs four passes with different inputs (one of them
// started again right after the previous 'done') and compares every output with
// the integer model. Also checks the pass length: done on the (N_IN+2)-th rising
// edge after the one that accepts start.
module tb_ann_layer;
  import nn_pkg::*;
  import tb_nn_ref::*;

  localparam int NI = 20, NO = 5;
  logic clk = 0, rst_n = 0, start = 0, busy, done, x_rd;
  logic [$clog2(NI)-1:0] x_addr;
  data_t x_data;
  data_t [NO-1:0] y;
  logic wt_we = 0, b_we = 0;
  logic [$clog2(NO)-1:0] wt_unit = 0;
  logic [$clog2(NI)-1:0] wt_index = 0;
  data_t wt_data = 0;
  int src[NI];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ann_layer #(.N_IN(NI), .N_OUT(NO), .RELU(1'b1)) dut (.*);

  always_ff @(posedge clk) if (x_rd) x_data <= data_t'(src[x_addr]);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pass(int img);
    int in[], exp_y[];
    int cyc = 0;
    in = new[NI];
    for (int i = 0; i < NI; i++) begin
      in[i] = pgen(img, i) - 128;
      src[i] = in[i];
    end
    dense(in, NI, NO, 1, 8, 1'b1, exp_y);
    @(posedge clk) start <= 1;
    @(posedge clk) start <= 0;
    cyc = 1;
    forever begin
      #1;
      if (done) break;
      @(posedge clk);
      cyc++;
    end
    checks++;
    if (cyc != NI + 2) begin failures++; $display("pass took %0d cycles, expected %0d", cyc, NI + 2); end
    for (int n = 0; n < NO; n++) begin
      checks++;
      if (int'(y[n]) != exp_y[n]) begin
        failures++; $display("img %0d neuron %0d: y=%0d expected %0d", img, n, y[n], exp_y[n]);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < NO; n++) begin
      for (int i = 0; i < NI; i++) begin
        @(posedge clk);
        wt_we <= 1; wt_unit <= n[$clog2(NO)-1:0]; wt_index <= i[$clog2(NI)-1:0];
        wt_data <= data_t'(wgen(1, n, i));
      end
      @(posedge clk);
      wt_we <= 0; b_we <= 1; wt_data <= data_t'(wgen(8, n, 0));
      @(posedge clk);
      b_we <= 0;
    end
    for (int img = 0; img < 4; img++) pass(img);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
