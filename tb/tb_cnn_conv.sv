// tb_cnn_conv: checks the convolution layer at a reduced size (6x6 maps, 2 input
// and 3 output maps, 5x5 kernel, 2-pixel padding). Loads weights and biases,
// models the input and output map memories, runs two images and compares every
// output pixel with the integer model, checks the layer time
// (COUT*H*W*CIN*K*K + 2 cycles) and that padding taps and ReLU clipping occurred.
module tb_cnn_conv;
  import nn_pkg::*;
  import tb_nn_ref::*;

  localparam int H = 6, W = 6, CI = 2, CO = 3, K = 5, PAD = 2;
  localparam int IAW = $clog2(CI * H * W), OAW = $clog2(CO * H * W);
  logic clk = 0, rst_n = 0, start = 0, busy, done, in_rd, out_we;
  logic [IAW-1:0] in_addr;
  logic [OAW-1:0] out_addr;
  data_t in_data, out_data;
  logic wt_we = 0, b_we = 0;
  logic [$clog2(CO)-1:0] wt_unit = 0;
  logic [$clog2(CI*K*K)-1:0] wt_index = 0;
  data_t wt_data = 0;
  int imem[CI*H*W], omem[CO*H*W];
  int checks = 0, failures = 0, writes = 0;

  always #5 clk = ~clk;

  cnn_conv #(.H(H), .W(W), .CIN(CI), .COUT(CO), .K(K), .PAD(PAD)) dut (.*);

  always_ff @(posedge clk) begin
    if (in_rd) in_data <= data_t'(imem[in_addr]);
    if (out_we) begin omem[out_addr] <= int'(out_data); writes <= writes + 1; end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static longint pads = 0;
    static int clips = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int co = 0; co < CO; co++) begin
      for (int i = 0; i < CI * K * K; i++) begin
        @(posedge clk);
        wt_we <= 1; wt_unit <= co[$clog2(CO)-1:0]; wt_index <= i[$clog2(CI*K*K)-1:0];
        wt_data <= data_t'(wgen(1, co, i) * 4);
      end
      @(posedge clk);
      wt_we <= 0; b_we <= 1; wt_data <= data_t'(wgen(8, co, 0) * 8);
      @(posedge clk) b_we <= 0;
    end
    for (int img = 0; img < 2; img++) begin
      int in[], exp_o[];
      int cyc;
      in = new[CI * H * W];
      foreach (in[i]) begin in[i] = pgen(img, i) * 4; imem[i] = in[i]; end
      // model with the scaled weights: out = conv(in, 4*w) with bias 8*b
      exp_o = new[CO * H * W];
      for (int co = 0; co < CO; co++)
        for (int oy = 0; oy < H; oy++)
          for (int ox = 0; ox < W; ox++) begin
            automatic longint acc = 0;
            for (int ci = 0; ci < CI; ci++)
              for (int ky = 0; ky < K; ky++)
                for (int kx = 0; kx < K; kx++) begin
                  automatic int iy = oy + ky - PAD, ix = ox + kx - PAD;
                  if (iy < 0 || iy >= H || ix < 0 || ix >= W) pads++;
                  else acc += longint'(in[(ci * H + iy) * W + ix]) * (wgen(1, co, (ci * K + ky) * K + kx) * 4);
                end
            exp_o[(co * H + oy) * W + ox] = rq(acc, wgen(8, co, 0) * 8, 1'b1);
            if (exp_o[(co * H + oy) * W + ox] == 0) clips++;
          end
      writes = 0;
      @(posedge clk) start <= 1;
      @(posedge clk) start <= 0;
      cyc = 1;
      forever begin #1; if (done) break; @(posedge clk); cyc++; end
      @(posedge clk); #1;
      checks++;
      if (cyc != CO * H * W * CI * K * K + 2) begin
        failures++; $display("layer took %0d cycles, expected %0d", cyc, CO * H * W * CI * K * K + 2);
      end
      checks++;
      if (writes != CO * H * W) begin failures++; $display("%0d writes", writes); end
      foreach (exp_o[i]) begin
        checks++;
        if (omem[i] != exp_o[i]) begin
          failures++; $display("img %0d out[%0d]=%0d expected %0d", img, i, omem[i], exp_o[i]);
        end
      end
    end
    $display("mechanisms: padding_taps=%0d relu_clips=%0d", pads, clips);
    checks++;
    if (pads == 0 || clips == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
