// accum_unit: temporary data buffers and accumulation of PE-array row sums.
//
// Each of the T_OUT rows owns a partial-sum register (its temporary data
// buffer). An output pixel takes G*K*K array cycles (channel groups times
// kernel positions); the first cycle loads the row sum, later cycles add to
// it, and on the last cycle the completed sums are copied to the output
// register with out_valid for one cycle. A new pixel can start in the cycle
// after the last one of the previous pixel, so there is no bubble.
// Sideband tag bits ride along from the last input cycle to the output.
// Latency: out_valid one cycle after the input marked last.
// Accumulator width is a choice of this implementation.
module accum_unit
  import acc_pkg::*;
#(
  parameter int unsigned T_OUT = 32,
  parameter int unsigned IN_W  = 23,
  parameter int unsigned TAG_W = 1
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              in_valid,
  input  logic                              in_first,
  input  logic                              in_last,
  input  logic [TAG_W-1:0]                  in_tag,
  input  logic [T_OUT-1:0][IN_W-1:0]        in_psum,
  output logic                              out_valid,
  output logic [TAG_W-1:0]                  out_tag,
  output logic [T_OUT-1:0][ACC_W-1:0]       out_acc
);

  logic [T_OUT-1:0][ACC_W-1:0] tmp_buf;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_tag   <= '0;
    end else begin
      out_valid <= in_valid && in_last;
      if (in_valid && in_last) out_tag <= in_tag;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      for (int r = 0; r < T_OUT; r++) begin
        logic signed [ACC_W-1:0] base, sum;
        base = in_first ? '0 : $signed(tmp_buf[r]);
        sum  = base + ACC_W'($signed(in_psum[r]));
        tmp_buf[r] <= sum;
        if (in_last) out_acc[r] <= sum;
      end
    end
  end

endmodule
