// cnn_conv: KxK convolution layer with zero padding, bias and ReLU.
//
// Computes COUT output maps of H x W from CIN input maps of H x W (stride 1, PAD
// zero pixels on every side, so the size is kept when PAD = (K-1)/2). One neuron
// (multiplier plus accumulator) walks the output maps pixel by pixel; for each
// output pixel it sums CIN*K*K products, one per cycle, adds the map's bias and
// applies ReLU. Input pixels that fall into the padding are not read and count as
// zero. A whole layer takes COUT*H*W*CIN*K*K + 2 cycles from start to 'done'.
//
// Memory layout, shared by all CNN blocks: map c, row y, column x sits at word
// (c*H + y)*W + x. The input map memory is outside and read with one cycle of
// latency (in_rd/in_addr, data back on in_data the next cycle); results are written
// out through out_we/out_addr/out_data. Weights sit in an internal block RAM:
// wt_we writes weight (ci*K + ky)*K + kx (wt_index) of output map wt_unit; b_we
// writes the bias of map wt_unit.
// The kernel size, padding and first-layer sizes follow the document; the
// single-MAC schedule and memory layout are this design's choices.
module cnn_conv
  import nn_pkg::*;
#(
  parameter int unsigned H    = 32,
  parameter int unsigned W    = 32,
  parameter int unsigned CIN  = 3,
  parameter int unsigned COUT = 32,
  parameter int unsigned K    = 5,
  parameter int unsigned PAD  = 2,
  localparam int unsigned CKK = CIN * K * K,
  localparam int unsigned IAW = $clog2(CIN * H * W),
  localparam int unsigned OAW = $clog2(COUT * H * W),
  localparam int unsigned WAW = $clog2(COUT * CKK),
  localparam int unsigned UW  = (COUT > 1) ? $clog2(COUT) : 1,
  localparam int unsigned XW  = (CKK > 1) ? $clog2(CKK) : 1
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
  output data_t          out_data,
  input  logic           wt_we,
  input  logic           b_we,
  input  logic [UW-1:0]  wt_unit,
  input  logic [XW-1:0]  wt_index,
  input  data_t          wt_data
);
  // loop counters, innermost first: kx, ky, ci, ox, oy, co
  int unsigned kx, ky, ci, ox, oy, co;
  logic run;
  int   iy, ix;
  logic inb, last_k, last_all;

  always_comb begin
    iy       = int'(oy + ky) - int'(PAD);
    ix       = int'(ox + kx) - int'(PAD);
    inb      = (iy >= 0) && (iy < int'(H)) && (ix >= 0) && (ix < int'(W));
    last_k   = (kx == K - 1) && (ky == K - 1) && (ci == CIN - 1);
    last_all = last_k && (ox == W - 1) && (oy == H - 1) && (co == COUT - 1);
  end

  assign in_rd   = run && inb;
  assign in_addr = IAW'((ci * H + unsigned'(iy)) * W + unsigned'(ix));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0;
      {kx, ky, ci, ox, oy, co} <= '0;
    end else if (start && !busy) begin
      run <= 1'b1;
      {kx, ky, ci, ox, oy, co} <= '0;
    end else if (run) begin
      if (last_all) run <= 1'b0;
      if (kx != K - 1) kx <= kx + 1;
      else begin
        kx <= 0;
        if (ky != K - 1) ky <= ky + 1;
        else begin
          ky <= 0;
          if (ci != CIN - 1) ci <= ci + 1;
          else begin
            ci <= 0;
            if (ox != W - 1) ox <= ox + 1;
            else begin
              ox <= 0;
              if (oy != H - 1) oy <= oy + 1;
              else begin
                oy <= 0;
                co <= co + 1;
              end
            end
          end
        end
      end
    end
  end

  // weights: one block RAM, word co*CKK + (ci*K + ky)*K + kx
  data_t w_q;
  nn_ram #(.WIDTH(DATA_W), .DEPTH(COUT * CKK)) u_wmem (
    .clk     (clk),
    .wr_en   (wt_we),
    .wr_addr (WAW'(wt_unit * CKK + wt_index)),
    .wr_data (wt_data),
    .rd_en   (run),
    .rd_addr (WAW'(co * CKK + (ci * K + ky) * K + kx)),
    .rd_data (w_q)
  );

  data_t bias_q [COUT];
  always_ff @(posedge clk) if (b_we) bias_q[wt_unit] <= wt_data;

  // stage 1: operands valid
  logic           v_d, first_d, last_d, pad_d;
  logic [UW-1:0]  co_d;
  logic [OAW-1:0] oaddr_d, oaddr_dd;
  logic           n_valid;
  data_t          n_y;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_d      <= 1'b0;
      first_d  <= 1'b0;
      last_d   <= 1'b0;
      pad_d    <= 1'b0;
      co_d     <= '0;
      oaddr_d  <= '0;
      oaddr_dd <= '0;
    end else begin
      v_d     <= run;
      first_d <= run && kx == 0 && ky == 0 && ci == 0;
      last_d  <= run && last_k;
      pad_d   <= !inb;
      co_d    <= UW'(co);
      oaddr_d <= OAW'((co * H + oy) * W + ox);
      if (v_d && last_d) oaddr_dd <= oaddr_d;
    end
  end

  nn_neuron u_mac (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (v_d),
    .in_first  (first_d),
    .in_last   (last_d),
    .x         (pad_d ? data_t'(0) : in_data),
    .w         (w_q),
    .bias      (bias_q[co_d]),
    .relu      (1'b1),
    .y         (n_y),
    .out_valid (n_valid)
  );

  assign out_we   = n_valid;
  assign out_addr = oaddr_dd;
  assign out_data = n_y;
  assign busy     = run || v_d;
  assign done     = n_valid && !busy;
endmodule
