// activation: ReLU and requantization of accumulated sums.
//
// For each of the T_OUT channels: optional ReLU (max(x,0)), then division by
// the power-of-two scale 2^shift with round-half-up, x_int = round(x / 2^shift),
// then clamping to the signed range of the run's precision,
// x_Q = clamp(-2^(b-1), 2^(b-1)-1, x_int), b = 8, 4 or 2. The b-bit result
// is returned sign-extended in an 8-bit field. Rounding and clamping follow
// the design's quantization rule; a power-of-two scale and round-half-up are
// choices of this implementation.
// Timing: one register stage, out_valid one cycle after in_valid.
module activation
  import acc_pkg::*;
#(
  parameter int unsigned T_OUT = 32,
  parameter int unsigned TAG_W = 1
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  prec_e                             prec,
  input  logic                              relu,
  input  logic [4:0]                        shift,
  input  logic                              in_valid,
  input  logic [TAG_W-1:0]                  in_tag,
  input  logic [T_OUT-1:0][ACC_W-1:0]       in_acc,
  output logic                              out_valid,
  output logic [TAG_W-1:0]                  out_tag,
  output logic [T_OUT-1:0][LANE_W-1:0]      out_q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_tag   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_tag <= in_tag;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      for (int r = 0; r < T_OUT; r++) begin
        logic signed [ACC_W:0] x, qmax, qmin;
        x = (ACC_W+1)'($signed(in_acc[r]));
        if (relu && x < 0) x = '0;
        if (shift != 0) x = (x + ((ACC_W+1)'(1) <<< (shift - 1))) >>> shift;
        qmax = ((ACC_W+1)'(1) <<< (prec_bits(prec) - 1)) - 1;
        qmin = -qmax - 1;
        if (x > qmax) x = qmax;
        if (x < qmin) x = qmin;
        out_q[r] <= x[LANE_W-1:0];
      end
    end
  end

endmodule
