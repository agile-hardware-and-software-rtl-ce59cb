// pooling: max pooling on packed multi-precision feature words.
//
// A word from the feature buffer holds T_IN*8/b signed operands of b bits
// (b = 8, 4 or 2). Over the K*K words of one pooling window (in_first on the
// first, in_last on the last) the unit keeps the element-wise signed maximum;
// on the last word it outputs the window maximum with out_valid. The output
// word has the same packing as the input, so pooled features can be read
// back as the next layer's input.
// Timing: out_valid one cycle after the in_last word; one word per cycle.
module pooling
  import acc_pkg::*;
#(
  parameter int unsigned T_IN = 32,
  localparam int unsigned WW  = T_IN * LANE_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  prec_e         prec,
  input  logic          in_valid,
  input  logic          in_first,
  input  logic          in_last,
  input  logic [WW-1:0] in_word,
  output logic          out_valid,
  output logic [WW-1:0] out_word
);

  logic [WW-1:0] run_max;

  // element-wise signed maximum of two packed words
  function automatic logic [WW-1:0] pmax(logic [WW-1:0] x, logic [WW-1:0] y, prec_e p);
    logic [WW-1:0] r;
    r = '0;
    for (int e = 0; e < WW / 2; e++) begin
      case (p)
        PREC_8: if (e < WW / 8) r[e*8 +: 8] = ($signed(x[e*8 +: 8]) > $signed(y[e*8 +: 8])) ? x[e*8 +: 8] : y[e*8 +: 8];
        PREC_4: if (e < WW / 4) r[e*4 +: 4] = ($signed(x[e*4 +: 4]) > $signed(y[e*4 +: 4])) ? x[e*4 +: 4] : y[e*4 +: 4];
        default: r[e*2 +: 2] = ($signed(x[e*2 +: 2]) > $signed(y[e*2 +: 2])) ? x[e*2 +: 2] : y[e*2 +: 2];
      endcase
    end
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_max   <= '0;
      out_valid <= 1'b0;
      out_word  <= '0;
    end else begin
      out_valid <= in_valid && in_last;
      if (in_valid) begin
        logic [WW-1:0] m;
        m = in_first ? in_word : pmax(run_max, in_word, prec);
        run_max <= m;
        if (in_last) out_word <= m;
      end
    end
  end

endmodule
