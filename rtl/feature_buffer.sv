// feature_buffer: on-chip store for the input feature tile.
//
// One word is T_IN 8-bit PE lanes, i.e. all channels of one channel group at
// one pixel (T_IN, 2*T_IN or 4*T_IN channels at 8, 4 or 2 bits). The DMA
// fills it through the write port; the PE array or the pooling module reads
// it through the read port. The word at address
//   g*IN_ROWS*IN_W + row*IN_W + col
// holds channel group g of the held row and column (layout chosen by the
// controller). Simple dual-port: one write and one read per cycle, read data
// registered (1-cycle latency). The depth is a choice of this implementation.
module feature_buffer
  import acc_pkg::*;
#(
  parameter int unsigned T_IN  = 32,
  parameter int unsigned DEPTH = 4096,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned WW   = T_IN * LANE_W
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [WW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [WW-1:0] rdata
);

  logic [WW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
