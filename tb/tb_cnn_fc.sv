// tb_cnn_fc: checks the full-connection layer with ReLU at a reduced size
// (48 features, 10 outputs) against the integer model, with the layer time
// N_OUT*N_IN + 3 cycles, and that ReLU clipped at least one output.
module tb_cnn_fc;
  import nn_pkg::*;
  import tb_nn_ref::*;

  localparam int NI = 48, NO = 10;
  logic clk = 0, rst_n = 0, start = 0, busy, done, in_rd;
  logic [$clog2(NI)-1:0] in_addr;
  data_t in_data;
  data_t [NO-1:0] y;
  logic wt_we = 0, b_we = 0;
  logic [$clog2(NO)-1:0] wt_unit = 0;
  logic [$clog2(NI)-1:0] wt_index = 0;
  data_t wt_data = 0;
  int imem[NI];
  int checks = 0, failures = 0, clips = 0;

  always #5 clk = ~clk;

  cnn_fc #(.N_IN(NI), .N_OUT(NO), .RELU(1'b1)) dut (.*);

  always_ff @(posedge clk) if (in_rd) in_data <= data_t'(imem[in_addr]);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int o = 0; o < NO; o++) begin
      for (int i = 0; i < NI; i++) begin
        @(posedge clk);
        wt_we <= 1; wt_unit <= o[$clog2(NO)-1:0]; wt_index <= i[$clog2(NI)-1:0];
        wt_data <= data_t'(wgen(4, o, i));
      end
      @(posedge clk);
      wt_we <= 0; b_we <= 1; wt_data <= data_t'(wgen(11, o, 0));
      @(posedge clk) b_we <= 0;
    end
    for (int img = 0; img < 3; img++) begin
      int in[], e[];
      int cyc;
      in = new[NI];
      foreach (in[i]) begin in[i] = pgen(img, i) * 16 - 2048; imem[i] = in[i]; end
      dense(in, NI, NO, 4, 11, 1'b1, e);
      @(posedge clk) start <= 1;
      @(posedge clk) start <= 0;
      cyc = 1;
      forever begin #1; if (done) break; @(posedge clk); cyc++; end
      checks++;
      if (cyc != NO * NI + 3) begin failures++; $display("fc took %0d cycles", cyc); end
      for (int o = 0; o < NO; o++) begin
        checks++;
        if (e[o] == 0) clips++;
        if (int'(y[o]) != e[o]) begin failures++; $display("y[%0d]=%0d expected %0d", o, int'(y[o]), e[o]); end
      end
    end
    $display("mechanisms: relu_clips=%0d", clips);
    checks++;
    if (clips == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
