// tb_cnn_pool: checks 2x2 max pooling and average pooling (two instances,
// 3 maps of 8x6) on signed random maps against the integer model, and the
// layer time (C*(H/2)*(W/2)*4 + 2 cycles).
module tb_cnn_pool;
  import nn_pkg::*;
  import tb_nn_ref::*;

  localparam int H = 8, W = 6, C = 3;
  localparam int IAW = $clog2(C * H * W), OAW = $clog2(C * (H / 2) * (W / 2));
  localparam int NO = C * (H / 2) * (W / 2);
  logic clk = 0, rst_n = 0, start = 0;
  logic busy_m, done_m, rd_m, we_m, busy_a, done_a, rd_a, we_a;
  logic [IAW-1:0] ra_m, ra_a;
  logic [OAW-1:0] wa_m, wa_a;
  data_t rdat_m, rdat_a, wd_m, wd_a;
  int imem[C*H*W], om_m[NO], om_a[NO];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cnn_pool #(.H(H), .W(W), .C(C), .AVG(1'b0)) u_max (
    .clk, .rst_n, .start, .busy(busy_m), .done(done_m), .in_rd(rd_m), .in_addr(ra_m),
    .in_data(rdat_m), .out_we(we_m), .out_addr(wa_m), .out_data(wd_m));
  cnn_pool #(.H(H), .W(W), .C(C), .AVG(1'b1)) u_avg (
    .clk, .rst_n, .start, .busy(busy_a), .done(done_a), .in_rd(rd_a), .in_addr(ra_a),
    .in_data(rdat_a), .out_we(we_a), .out_addr(wa_a), .out_data(wd_a));

  always_ff @(posedge clk) begin
    if (rd_m) rdat_m <= data_t'(imem[ra_m]);
    if (rd_a) rdat_a <= data_t'(imem[ra_a]);
    if (we_m) om_m[wa_m] <= int'(wd_m);
    if (we_a) om_a[wa_a] <= int'(wd_a);
  end

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
    for (int img = 0; img < 3; img++) begin
      int in[], e_m[], e_a[];
      int cyc;
      in = new[C * H * W];
      foreach (in[i]) begin in[i] = int'($urandom_range(0, 65535)) - 32768; imem[i] = in[i]; end
      pool(in, H, W, C, 1'b0, e_m);
      pool(in, H, W, C, 1'b1, e_a);
      @(posedge clk) start <= 1;
      @(posedge clk) start <= 0;
      cyc = 1;
      forever begin #1; if (done_m) break; @(posedge clk); cyc++; end
      checks++;
      if (cyc != NO * 4 + 2 || !done_a) begin
        failures++; $display("pooling took %0d cycles, expected %0d", cyc, NO * 4 + 2);
      end
      @(posedge clk); #1;
      for (int i = 0; i < NO; i++) begin
        checks += 2;
        if (om_m[i] != e_m[i]) begin failures++; $display("max[%0d]=%0d expected %0d", i, om_m[i], e_m[i]); end
        if (om_a[i] != e_a[i]) begin failures++; $display("avg[%0d]=%0d expected %0d", i, om_a[i], e_a[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
