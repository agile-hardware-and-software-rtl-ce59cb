// ctrl_regs: accelerator control and status registers behind an AXI-Lite slave.
//
// The registers sit in the 64 KiB window at 0x5000_0000 of the processor's
// address map; only the low 16 address bits are decoded here (offsets in
// acc_pkg). A write to CTRL with bit 0 set raises `start` for one cycle and
// records the operation in bit 1. STATUS reads {done, busy}; done is set when
// the controller finishes and cleared by the next start. A write to CLEAR
// returns every register to zero. Writes while busy change the stored values
// but the running operation keeps the configuration captured at its start.
// AXI-Lite handling: a write is accepted when AW and W are both valid and no
// response is pending; the response follows one cycle later. A read is
// accepted when no read response is pending; data follows one cycle later.
// Accesses to unmapped offsets read zero and are ignored on write (OKAY).
// The register map is a choice of this implementation.
module ctrl_regs
  import acc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // AXI-Lite slave
  input  logic        s_awvalid,
  output logic        s_awready,
  input  logic [31:0] s_awaddr,
  input  logic        s_wvalid,
  output logic        s_wready,
  input  logic [31:0] s_wdata,
  input  logic [3:0]  s_wstrb,
  output logic        s_bvalid,
  input  logic        s_bready,
  output logic [1:0]  s_bresp,
  input  logic        s_arvalid,
  output logic        s_arready,
  input  logic [31:0] s_araddr,
  output logic        s_rvalid,
  input  logic        s_rready,
  output logic [31:0] s_rdata,
  output logic [1:0]  s_rresp,
  // to and from the controller
  output acc_cfg_t    cfg,
  output logic        start,
  input  logic        busy,
  input  logic        done
);

  localparam int unsigned IW = $clog2(NUM_REGS);

  logic [31:0] regs [NUM_REGS];
  logic        done_flag;
  logic        wr_fire, rd_fire;
  logic [IW-1:0] widx, ridx;

  assign s_awready = s_awvalid && s_wvalid && !s_bvalid;
  assign s_wready  = s_awready;
  assign wr_fire   = s_awready;
  assign s_arready = !s_rvalid;
  assign rd_fire   = s_arvalid && s_arready;
  assign s_bresp   = 2'b00;
  assign s_rresp   = 2'b00;
  assign widx      = s_awaddr[IW+1:2];
  assign ridx      = s_araddr[IW+1:2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_REGS; i++) regs[i] <= '0;
      s_bvalid  <= 1'b0;
      s_rvalid  <= 1'b0;
      s_rdata   <= '0;
      start     <= 1'b0;
      done_flag <= 1'b0;
    end else begin
      start <= 1'b0;
      if (done) done_flag <= 1'b1;
      if (s_bvalid && s_bready) s_bvalid <= 1'b0;
      if (s_rvalid && s_rready) s_rvalid <= 1'b0;
      if (wr_fire) begin
        s_bvalid <= 1'b1;
        if (s_awaddr[15:0] == REG_CLEAR) begin
          for (int i = 0; i < NUM_REGS; i++) regs[i] <= '0;
          done_flag <= 1'b0;
        end else if (s_awaddr[15:IW+2] == '0) begin
          for (int b = 0; b < 4; b++)
            if (s_wstrb[b]) regs[widx][b*8 +: 8] <= s_wdata[b*8 +: 8];
          if (s_awaddr[15:0] == REG_CTRL && s_wstrb[0] && s_wdata[0] && !busy) begin
            start     <= 1'b1;
            done_flag <= 1'b0;
          end
        end
      end
      if (rd_fire) begin
        s_rvalid <= 1'b1;
        if (s_araddr[15:0] == REG_STATUS)
          s_rdata <= {30'd0, done_flag, busy};
        else if (s_araddr[15:IW+2] == '0)
          s_rdata <= regs[ridx];
        else
          s_rdata <= '0;
      end
    end
  end

  always_comb begin
    cfg            = '0;
    cfg.op         = op_e'(regs[REG_CTRL[IW+1:2]][1]);
    cfg.prec       = prec_e'(regs[REG_CFG[IW+1:2]][1:0]);
    cfg.relu       = regs[REG_CFG[IW+1:2]][2];
    cfg.shift      = regs[REG_CFG[IW+1:2]][12:8];
    cfg.in_addr    = regs[REG_IN_ADDR[IW+1:2]];
    cfg.w_addr     = regs[REG_W_ADDR[IW+1:2]];
    cfg.out_addr   = regs[REG_OUT_ADDR[IW+1:2]];
    cfg.in_w       = regs[REG_IN_W[IW+1:2]][15:0];
    cfg.in_rows    = regs[REG_IN_ROWS[IW+1:2]][15:0];
    cfg.in_row0    = regs[REG_IN_ROW0[IW+1:2]][15:0];
    cfg.in_groups  = regs[REG_IN_GROUPS[IW+1:2]][15:0];
    cfg.in_gstride = regs[REG_IN_GSTR[IW+1:2]];
    cfg.out_w      = regs[REG_OUT_W[IW+1:2]][15:0];
    cfg.out_rows   = regs[REG_OUT_ROWS[IW+1:2]][15:0];
    cfg.out_row0   = regs[REG_OUT_ROW0[IW+1:2]][15:0];
    cfg.ksize      = regs[REG_KSIZE[IW+1:2]][3:0];
    cfg.stride     = regs[REG_STRIDE[IW+1:2]][3:0];
    cfg.pad        = regs[REG_PAD[IW+1:2]][3:0];
  end

endmodule
