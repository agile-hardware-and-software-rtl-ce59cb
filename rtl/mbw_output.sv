// mbw_output: multi-bit-width output packer.
//
// Takes one output pixel per valid cycle: T_OUT quantized values, each held
// sign-extended in 8 bits. Only the low b bits of each value are kept
// (b = 8, 4 or 2), so a pixel occupies T_OUT*b bits, and L = 8/b pixels are
// packed into one output word of T_OUT*8 bits: pixel slot k at bits
// [k*T_OUT*b +: T_OUT*b], channel c of that pixel at bit c*b within the slot.
// In DRAM the output is therefore [H][W][T_OUT] of b-bit values, contiguous.
// A word is emitted when L pixels are collected, or early (unused slots zero)
// when a pixel arrives flagged as the last of the run.
// Timing: word_valid one cycle after the pixel that completes the word.
// The packing order is a choice of this implementation.
module mbw_output
  import acc_pkg::*;
#(
  parameter int unsigned T_OUT = 32,
  localparam int unsigned WW   = T_OUT * LANE_W
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  prec_e                          prec,
  input  logic                           in_valid,
  input  logic                           in_last,
  input  logic [T_OUT-1:0][LANE_W-1:0]   in_q,
  output logic                           word_valid,
  output logic [WW-1:0]                  word
);

  logic [1:0]    slot;
  logic [WW-1:0] pack_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot       <= '0;
      pack_q     <= '0;
      word_valid <= 1'b0;
      word       <= '0;
    end else begin
      word_valid <= 1'b0;
      if (in_valid) begin
        logic [WW-1:0] nxt;
        int unsigned b;
        b   = prec_bits(prec);
        nxt = (slot == 0) ? '0 : pack_q;
        for (int c = 0; c < T_OUT; c++) begin
          for (int i = 0; i < LANE_W; i++) begin
            if (i < b) nxt[int'(slot) * T_OUT * b + c * b + i] = in_q[c][i];
          end
        end
        if (in_last || (32'(slot) == prec_lanes(prec) - 1)) begin
          word_valid <= 1'b1;
          word       <= nxt;
          slot       <= '0;
        end else begin
          slot       <= slot + 1'b1;
        end
        pack_q <= nxt;
      end
    end
  end

endmodule
