// cnn_pool: 2x2 pooling with stride 2, maximum or average.
//
// Reduces C maps of H x W to C maps of H/2 x W/2. For each output pixel the four
// input pixels are read one per cycle (one cycle of read latency, as from block
// RAM); AVG = 0 keeps the largest, AVG = 1 their sum shifted right by two
// (rounding toward minus infinity). The result is written through out_we/out_addr/
// out_data. A layer takes C*(H/2)*(W/2)*4 + 2 cycles from start to 'done'. Map
// layout as in cnn_conv: word (c*H + y)*W + x.
// The document has a max-pooling stage that takes 32x32 maps to 16x16, and
// average-pooling stages; the 2x2 window and the sequential schedule are this
// design's choices.
module cnn_pool
  import nn_pkg::*;
#(
  parameter int unsigned H   = 32,
  parameter int unsigned W   = 32,
  parameter int unsigned C   = 32,
  parameter bit          AVG = 1'b0,
  localparam int unsigned IAW = $clog2(C * H * W),
  localparam int unsigned OAW = $clog2(C * (H / 2) * (W / 2))
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  output logic           busy,
  output logic           done,
  output logic           in_rd,
  output logic [IAW-1:0] in_addr,
  input  data_t          in_data,
  output logic           out_we,
  output logic [OAW-1:0] out_addr,
  output data_t          out_data
);
  localparam int unsigned HO = H / 2;
  localparam int unsigned WO = W / 2;

  int unsigned d, ox, oy, c;   // d = window position 0..3
  logic run, last_all;

  assign last_all = (d == 3) && (ox == WO - 1) && (oy == HO - 1) && (c == C - 1);
  assign in_rd    = run;
  assign in_addr  = IAW'((c * H + 2 * oy + d / 2) * W + 2 * ox + d % 2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0;
      {d, ox, oy, c} <= '0;
    end else if (start && !busy) begin
      run <= 1'b1;
      {d, ox, oy, c} <= '0;
    end else if (run) begin
      if (last_all) run <= 1'b0;
      if (d != 3) d <= d + 1;
      else begin
        d <= 0;
        if (ox != WO - 1) ox <= ox + 1;
        else begin
          ox <= 0;
          if (oy != HO - 1) oy <= oy + 1;
          else begin
            oy <= 0;
            c  <= c + 1;
          end
        end
      end
    end
  end

  logic                   v_d, first_d, last_d, fin_d;
  logic [OAW-1:0]         oaddr_d;
  logic signed [DATA_W+1:0] acc, nxt;

  always_comb begin
    if (first_d)  nxt = (DATA_W+2)'(in_data);
    else if (AVG) nxt = acc + (DATA_W+2)'(in_data);
    else          nxt = ((DATA_W+2)'(in_data) > acc) ? (DATA_W+2)'(in_data) : acc;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_d <= 1'b0; first_d <= 1'b0; last_d <= 1'b0; fin_d <= 1'b0;
      oaddr_d <= '0; acc <= '0;
      out_we <= 1'b0; out_addr <= '0; out_data <= '0;
    end else begin
      v_d     <= run;
      first_d <= run && d == 0;
      last_d  <= run && d == 3;
      fin_d   <= run && last_all;
      oaddr_d <= OAW'((c * HO + oy) * WO + ox);
      out_we  <= v_d && last_d;
      if (v_d) acc <= nxt;
      if (v_d && last_d) begin
        out_addr <= oaddr_d;
        out_data <= AVG ? data_t'(nxt >>> 2) : data_t'(nxt);
      end
    end
  end

  logic fin_dd;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) fin_dd <= 1'b0;
    else        fin_dd <= v_d && fin_d;
  end

  assign busy = run || v_d;
  assign done = fin_dd;
endmodule
