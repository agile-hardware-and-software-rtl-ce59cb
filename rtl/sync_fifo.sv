// sync_fifo: single-clock FIFO with occupancy count.
//
// Holds up to DEPTH words of W bits. Push when push is high (the writer must
// check that the FIFO is not full), pop with valid/ready on the read side.
// The head word is shown combinationally (first-word fall-through).
// Used between the output path and the DMA write channel.
module sync_fifo #(
  parameter int unsigned W     = 256,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push,
  input  logic [W-1:0]  din,
  output logic          out_valid,
  input  logic          out_ready,
  output logic [W-1:0]  dout,
  output logic [AW:0]   count
);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          pop;

  assign out_valid = (count != 0);
  assign pop       = out_valid && out_ready;
  assign dout      = mem[rp];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (push) wp <= wp + 1'b1;
      if (pop)  rp <= rp + 1'b1;
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wp] <= din;
  end

  // the writer must respect the capacity
  property p_no_overflow;
    @(posedge clk) disable iff (!rst_n) push |-> (32'(count) < DEPTH || pop);
  endproperty
  assert property (p_no_overflow) else $error("sync_fifo overflow");

endmodule
