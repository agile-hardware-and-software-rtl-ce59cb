// axi_mem_model: behavioural AXI4 slave memory standing in for DRAM in the
// testbenches. It is not part of the design. Word-addressed storage of DW
// bits starting at byte address BASE; INCR bursts, one read and one write
// burst at a time, ready signals stalled at random when RAND_STALL is set.
// It counts protocol problems in `violations`: a burst that crosses a 4 KiB
// boundary, an address outside the memory, or a WLAST in the wrong place.
module axi_mem_model #(
  parameter int unsigned DW         = 256,
  parameter int unsigned WORDS      = 4096,
  parameter logic [31:0] BASE       = 32'h4000_0000,
  parameter bit          RAND_STALL = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             arvalid,
  output logic             arready,
  input  logic [31:0]      araddr,
  input  logic [7:0]       arlen,
  input  logic [2:0]       arsize,
  input  logic [1:0]       arburst,
  output logic             rvalid,
  input  logic             rready,
  output logic [DW-1:0]    rdata,
  output logic [1:0]       rresp,
  output logic             rlast,
  input  logic             awvalid,
  output logic             awready,
  input  logic [31:0]      awaddr,
  input  logic [7:0]       awlen,
  input  logic [2:0]       awsize,
  input  logic [1:0]       awburst,
  input  logic             wvalid,
  output logic             wready,
  input  logic [DW-1:0]    wdata,
  input  logic [DW/8-1:0]  wstrb,
  input  logic             wlast,
  output logic             bvalid,
  input  logic             bready,
  output logic [1:0]       bresp,
  output int               violations,
  output int               bursts
);
  localparam int unsigned BY = DW / 8;
  localparam int unsigned SH = $clog2(BY);

  logic [DW-1:0] mem [WORDS];

  // read side
  logic        r_act;
  logic [31:0] r_idx;
  logic [7:0]  r_left;
  logic        stall_r, stall_a, stall_w;

  always_ff @(posedge clk) begin
    stall_r <= RAND_STALL && ($urandom_range(0, 3) == 0);
    stall_a <= RAND_STALL && ($urandom_range(0, 3) == 0);
    stall_w <= RAND_STALL && ($urandom_range(0, 3) == 0);
  end

  assign arready = !r_act && !stall_a;
  assign rvalid  = r_act && !stall_r;
  assign rdata   = mem[r_idx % WORDS];
  assign rresp   = 2'b00;
  assign rlast   = (r_left == 0);

  function automatic bit crosses(logic [31:0] a, logic [7:0] len);
    return ((a & 32'hFFF) + (32'(len) + 1) * BY) > 32'h1000;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_act <= 1'b0; r_idx <= '0; r_left <= '0;
      violations <= 0; bursts <= 0;
    end else begin
      if (arvalid && arready) begin
        r_act  <= 1'b1;
        r_idx  <= (araddr - BASE) >> SH;
        r_left <= arlen;
        bursts <= bursts + 1;
        if (crosses(araddr, arlen) || ((araddr - BASE) >> SH) + arlen >= WORDS || arsize != SH || arburst != 2'b01)
          violations <= violations + 1;
      end
      if (rvalid && rready) begin
        r_idx  <= r_idx + 1;
        r_left <= r_left - 1;
        if (rlast) r_act <= 1'b0;
      end
      if (awvalid && awready) begin
        bursts <= bursts + 1;
        if (crosses(awaddr, awlen) || ((awaddr - BASE) >> SH) + awlen >= WORDS || awsize != SH || awburst != 2'b01)
          violations <= violations + 1;
      end
      if (wvalid && wready && (wlast != (w_left == 0)))
        violations <= violations + 1;
    end
  end

  // write side
  logic        w_act;
  logic [31:0] w_idx;
  logic [7:0]  w_left;
  assign awready = !w_act && !bvalid && !stall_a;
  assign wready  = w_act && !stall_w;
  assign bresp   = 2'b00;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_act <= 1'b0; w_idx <= '0; w_left <= '0; bvalid <= 1'b0;
    end else begin
      if (awvalid && awready) begin
        w_act  <= 1'b1;
        w_idx  <= (awaddr - BASE) >> SH;
        w_left <= awlen;
      end
      if (wvalid && wready) begin
        w_idx  <= w_idx + 1;
        w_left <= w_left - 1;
        if (wlast) begin
          w_act  <= 1'b0;
          bvalid <= 1'b1;
        end
      end
      if (bvalid && bready) bvalid <= 1'b0;
    end
  end

  // storage written with a blocking assignment so that testbenches may also
  // load and inspect it directly through the hierarchy
  always @(posedge clk) begin
    if (rst_n && wvalid && wready) begin
      logic [DW-1:0] merged;
      merged = mem[w_idx % WORDS];
      for (int b = 0; b < BY; b++)
        if (wstrb[b]) merged[b*8 +: 8] = wdata[b*8 +: 8];
      mem[w_idx % WORDS] = merged;
    end
  end

endmodule
