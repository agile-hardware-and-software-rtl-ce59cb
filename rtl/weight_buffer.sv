// weight_buffer: per-row weight stores of the PE array.
//
// There is one bank per PE row (output channel). A word of bank r holds the
// T_IN weight lanes that row r multiplies with one feature word. All banks are
// read at the same address, so one read returns the weights of all T_OUT rows
// for one (channel group, kernel y, kernel x) step. The DMA writes one bank at
// a time, selected by wrow. Read data is registered (1-cycle latency).
// Bank count follows the figure (one weight buffer per row); depth is a
// choice of this implementation.
module weight_buffer
  import acc_pkg::*;
#(
  parameter int unsigned T_IN  = 32,
  parameter int unsigned T_OUT = 32,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned RW   = (T_OUT > 1) ? $clog2(T_OUT) : 1,
  localparam int unsigned WW   = T_IN * LANE_W
) (
  input  logic                       clk,
  input  logic                       we,
  input  logic [RW-1:0]              wrow,
  input  logic [AW-1:0]              waddr,
  input  logic [WW-1:0]              wdata,
  input  logic [AW-1:0]              raddr,
  output logic [T_OUT-1:0][WW-1:0]   rdata
);

  for (genvar r = 0; r < T_OUT; r++) begin : g_bank
    logic [WW-1:0] mem [DEPTH];
    always_ff @(posedge clk) begin
      if (we && wrow == RW'(r)) mem[waddr] <= wdata;
      rdata[r] <= mem[raddr];
    end
  end

endmodule
