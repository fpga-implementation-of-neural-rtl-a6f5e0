// nn_ram: simple dual-port memory used for weights, input vectors and feature maps.
//
// One synchronous write port and one synchronous read port: rd_data holds the word
// at the rd_addr presented on the previous rising edge when rd_en was high. It maps
// onto FPGA block RAM. Reading and writing the same address in one cycle returns
// the old word. The document stores weights and feature maps in block RAM; the
// port arrangement is this design's choice. The contents are not reset.
module nn_ram #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end
endmodule
