// pe_array: grid of multi-bit-width PEs with one adder tree per row.
//
// Row r of T_OUT rows computes output channel r; column c of T_IN columns
// takes feature lane c. The feature word is broadcast down all rows, and
// each row has its own weight word (from its weight buffer) whose lane c
// feeds the PE in column c. The T_IN PE results of a row are summed, so
// each cycle the array delivers T_OUT partial sums, each over T_IN lanes
// (T_IN, 2*T_IN or 4*T_IN operands at 8, 4 or 2 bits).
// Timing: two register stages. Stage 1 holds the PE products, stage 2 the
// row sums, so psum/out_valid follow in_valid by 2 cycles; the sideband
// tag travels alongside. One new input every cycle.
// The grid and per-row adders follow the architecture figure; the register
// placement is a choice of this implementation.
module pe_array
  import acc_pkg::*;
#(
  parameter int unsigned T_IN   = 32,
  parameter int unsigned T_OUT  = 32,
  parameter int unsigned TAG_W  = 3,
  localparam int unsigned ROW_W = PE_OUT_W + $clog2(T_IN) + 1
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  prec_e                                  prec,
  input  logic                                   in_valid,
  input  logic [TAG_W-1:0]                       in_tag,
  input  logic [T_IN*LANE_W-1:0]                 feat,
  input  logic [T_OUT-1:0][T_IN*LANE_W-1:0]      wgt,
  output logic                                   out_valid,
  output logic [TAG_W-1:0]                       out_tag,
  output logic [T_OUT-1:0][ROW_W-1:0]            psum
);

  logic signed [PE_OUT_W-1:0] pe_out [T_OUT][T_IN];
  logic signed [PE_OUT_W-1:0] pe_q   [T_OUT][T_IN];
  logic                       v1;
  logic [TAG_W-1:0]           tag1;

  for (genvar r = 0; r < T_OUT; r++) begin : g_row
    for (genvar c = 0; c < T_IN; c++) begin : g_col
      bsc_pe u_pe (
        .prec (prec),
        .feat (feat[c*LANE_W +: LANE_W]),
        .wgt  (wgt[r][c*LANE_W +: LANE_W]),
        .psum (pe_out[r][c])
      );
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      tag1      <= '0;
      out_valid <= 1'b0;
      out_tag   <= '0;
    end else begin
      v1        <= in_valid;
      tag1      <= in_tag;
      out_valid <= v1;
      out_tag   <= tag1;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) pe_q <= pe_out;
  end

  // row adder trees
  always_ff @(posedge clk) begin
    if (v1) begin
      for (int r = 0; r < T_OUT; r++) begin
        logic signed [ROW_W-1:0] s;
        s = '0;
        for (int c = 0; c < T_IN; c++) s = s + ROW_W'(pe_q[r][c]);
        psum[r] <= s;
      end
    end
  end

endmodule
