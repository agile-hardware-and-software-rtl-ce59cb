// mp_accel: the multi-precision CNN accelerator.
//
// A T_OUT x T_IN array of multi-bit-width (BSC) PEs computes convolution and
// dense layers with 8-, 4- or 2-bit signed operands; narrower operands are
// packed into the same 8-bit PE lanes, so the array does 1, 2 or 4 times as
// many multiply-accumulates per cycle. Data path, in order:
//   DRAM --AXI4--> mbw_dma --> feature_buffer (input tile)
//                          \-> weight_buffer  (one bank per PE row)
//   feature word (broadcast to all rows) + per-row weight word
//     --> pe_array (per-row adder tree) --> accum_unit (temporary data
//     buffers, accumulate over channel groups and kernel positions)
//     --> activation (ReLU, requantize, clamp) --> mbw_output (pack b-bit
//     results) --> output FIFO --> mbw_dma --AXI4--> DRAM
//   feature_buffer --> pooling (max pool) --> output FIFO   (pool runs)
// The control_module sequences a run; ctrl_regs is its AXI-Lite register
// interface. A run covers one tile of output rows and T_OUT output channels
// (software loops over row tiles and output channel groups).
// Pipeline from issue to output FIFO: buffer read 1, PE array 2,
// accumulation 1, activation 1, packing 1 cycle; pooling path 1+1 cycles.
// Steady state: one array step per cycle; an output pixel takes G*K*K cycles.
// `stall_o` shows the cycles in which the controller waits for FIFO room.
// T_IN must equal T_OUT: results are written back in the same word format
// that is later read as input.
module mp_accel
  import acc_pkg::*;
#(
  parameter int unsigned T_IN       = 32,
  parameter int unsigned T_OUT      = 32,
  parameter int unsigned FB_DEPTH   = 4096,
  parameter int unsigned WB_DEPTH   = 1024,
  parameter int unsigned FIFO_DEPTH = 16,
  localparam int unsigned DW        = T_IN * LANE_W
) (
  input  logic             clk,
  input  logic             rst_n,
  // AXI-Lite slave: control registers
  input  logic             s_awvalid,
  output logic             s_awready,
  input  logic [31:0]      s_awaddr,
  input  logic             s_wvalid,
  output logic             s_wready,
  input  logic [31:0]      s_wdata,
  input  logic [3:0]       s_wstrb,
  output logic             s_bvalid,
  input  logic             s_bready,
  output logic [1:0]       s_bresp,
  input  logic             s_arvalid,
  output logic             s_arready,
  input  logic [31:0]      s_araddr,
  output logic             s_rvalid,
  input  logic             s_rready,
  output logic [31:0]      s_rdata,
  output logic [1:0]       s_rresp,
  // AXI4 master: DRAM
  output logic             m_arvalid,
  input  logic             m_arready,
  output logic [31:0]      m_araddr,
  output logic [7:0]       m_arlen,
  output logic [2:0]       m_arsize,
  output logic [1:0]       m_arburst,
  input  logic             m_rvalid,
  output logic             m_rready,
  input  logic [DW-1:0]    m_rdata,
  input  logic [1:0]       m_rresp,
  input  logic             m_rlast,
  output logic             m_awvalid,
  input  logic             m_awready,
  output logic [31:0]      m_awaddr,
  output logic [7:0]       m_awlen,
  output logic [2:0]       m_awsize,
  output logic [1:0]       m_awburst,
  output logic             m_wvalid,
  input  logic             m_wready,
  output logic [DW-1:0]    m_wdata,
  output logic [DW/8-1:0]  m_wstrb,
  output logic             m_wlast,
  input  logic             m_bvalid,
  output logic             m_bready,
  input  logic [1:0]       m_bresp,
  // status
  output logic             busy_o,
  output logic             done_o,
  output logic             stall_o,
  output logic             dma_err_o
);

  if (T_IN != T_OUT) begin : g_bad_size
    $error("mp_accel needs T_IN == T_OUT");
  end

  localparam int unsigned FBA   = $clog2(FB_DEPTH);
  localparam int unsigned WBA   = $clog2(WB_DEPTH);
  localparam int unsigned RW    = (T_OUT > 1) ? $clog2(T_OUT) : 1;
  localparam int unsigned FCW   = $clog2(FIFO_DEPTH) + 1;
  localparam int unsigned ROW_W = PE_OUT_W + $clog2(T_IN) + 1;

  acc_cfg_t cfg, run_cfg;
  logic     start, busy, done;

  ctrl_regs u_regs (
    .clk, .rst_n,
    .s_awvalid, .s_awready, .s_awaddr, .s_wvalid, .s_wready, .s_wdata, .s_wstrb,
    .s_bvalid, .s_bready, .s_bresp, .s_arvalid, .s_arready, .s_araddr,
    .s_rvalid, .s_rready, .s_rdata, .s_rresp,
    .cfg, .start, .busy, .done
  );

  // DMA <-> controller
  logic             rd_cmd_valid, rd_cmd_ready, rd_data_valid, rd_done;
  logic [31:0]      rd_cmd_addr, wr_cmd_addr;
  logic [23:0]      rd_cmd_words, wr_cmd_words;
  logic [DW-1:0]    rd_data;
  logic             wr_cmd_valid, wr_cmd_ready, wr_done;
  logic             wr_in_valid, wr_in_ready;
  logic [DW-1:0]    wr_in_data;

  logic             fb_we, wb_we;
  logic [FBA-1:0]   fb_waddr, fb_raddr;
  logic [WBA-1:0]   wb_waddr, wb_raddr;
  logic [RW-1:0]    wb_wrow;
  logic             iss_valid, iss_first, iss_last, iss_pix_last, iss_zero;
  logic [FCW-1:0]   fifo_count;

  control_module #(
    .T_OUT(T_OUT), .FB_DEPTH(FB_DEPTH), .WB_DEPTH(WB_DEPTH), .FIFO_DEPTH(FIFO_DEPTH)
  ) u_ctl (
    .clk, .rst_n, .start, .cfg, .busy, .done, .run_cfg,
    .rd_cmd_valid, .rd_cmd_ready, .rd_cmd_addr, .rd_cmd_words, .rd_data_valid, .rd_done,
    .wr_cmd_valid, .wr_cmd_ready, .wr_cmd_addr, .wr_cmd_words, .wr_done,
    .fb_we, .fb_waddr, .wb_we, .wb_wrow, .wb_waddr,
    .iss_valid, .iss_first, .iss_last, .iss_pix_last, .iss_zero,
    .fb_raddr, .wb_raddr, .fifo_count, .stall(stall_o)
  );

  mbw_dma #(.DW(DW)) u_dma (
    .clk, .rst_n,
    .rd_cmd_valid, .rd_cmd_ready, .rd_cmd_addr, .rd_cmd_words, .rd_data_valid, .rd_data, .rd_done,
    .wr_cmd_valid, .wr_cmd_ready, .wr_cmd_addr, .wr_cmd_words,
    .wr_in_valid, .wr_in_ready, .wr_in_data, .wr_done, .err(dma_err_o),
    .m_arvalid, .m_arready, .m_araddr, .m_arlen, .m_arsize, .m_arburst,
    .m_rvalid, .m_rready, .m_rdata, .m_rresp, .m_rlast,
    .m_awvalid, .m_awready, .m_awaddr, .m_awlen, .m_awsize, .m_awburst,
    .m_wvalid, .m_wready, .m_wdata, .m_wstrb, .m_wlast,
    .m_bvalid, .m_bready, .m_bresp
  );

  // ---------------- buffers ----------------
  logic [DW-1:0]             fb_rdata;
  logic [T_OUT-1:0][DW-1:0]  wb_rdata;

  feature_buffer #(.T_IN(T_IN), .DEPTH(FB_DEPTH)) u_fbuf (
    .clk, .we(fb_we), .waddr(fb_waddr), .wdata(rd_data), .raddr(fb_raddr), .rdata(fb_rdata)
  );

  weight_buffer #(.T_IN(T_IN), .T_OUT(T_OUT), .DEPTH(WB_DEPTH)) u_wbuf (
    .clk, .we(wb_we), .wrow(wb_wrow), .waddr(wb_waddr), .wdata(rd_data),
    .raddr(wb_raddr), .rdata(wb_rdata)
  );

  // issue sideband aligned with the buffer read data
  logic          v1, first1, last1, pixlast1, zero1;
  logic [DW-1:0] feat1;
  logic          pool_run;
  assign pool_run = (run_cfg.op == OP_POOL);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1       <= 1'b0;
      first1   <= 1'b0;
      last1    <= 1'b0;
      pixlast1 <= 1'b0;
      zero1    <= 1'b0;
    end else begin
      v1       <= iss_valid;
      first1   <= iss_first;
      last1    <= iss_last;
      pixlast1 <= iss_pix_last;
      zero1    <= iss_zero;
    end
  end
  assign feat1 = zero1 ? '0 : fb_rdata;

  // ---------------- convolution path ----------------
  logic                         pa_valid;
  logic [2:0]                   pa_tag;
  logic [T_OUT-1:0][ROW_W-1:0]  pa_psum;
  logic                         ac_valid, ac_tag;
  logic [T_OUT-1:0][ACC_W-1:0]  ac_acc;
  logic                         at_valid, at_tag;
  logic [T_OUT-1:0][LANE_W-1:0] at_q;
  logic                         pk_valid;
  logic [DW-1:0]                pk_word;

  pe_array #(.T_IN(T_IN), .T_OUT(T_OUT), .TAG_W(3)) u_array (
    .clk, .rst_n, .prec(run_cfg.prec),
    .in_valid(v1 && !pool_run), .in_tag({pixlast1, last1, first1}),
    .feat(feat1), .wgt(wb_rdata),
    .out_valid(pa_valid), .out_tag(pa_tag), .psum(pa_psum)
  );

  accum_unit #(.T_OUT(T_OUT), .IN_W(ROW_W), .TAG_W(1)) u_acc (
    .clk, .rst_n,
    .in_valid(pa_valid), .in_first(pa_tag[0]), .in_last(pa_tag[1]), .in_tag(pa_tag[2]),
    .in_psum(pa_psum), .out_valid(ac_valid), .out_tag(ac_tag), .out_acc(ac_acc)
  );

  activation #(.T_OUT(T_OUT), .TAG_W(1)) u_act (
    .clk, .rst_n, .prec(run_cfg.prec), .relu(run_cfg.relu), .shift(run_cfg.shift),
    .in_valid(ac_valid), .in_tag(ac_tag), .in_acc(ac_acc),
    .out_valid(at_valid), .out_tag(at_tag), .out_q(at_q)
  );

  mbw_output #(.T_OUT(T_OUT)) u_out (
    .clk, .rst_n, .prec(run_cfg.prec),
    .in_valid(at_valid), .in_last(at_tag), .in_q(at_q),
    .word_valid(pk_valid), .word(pk_word)
  );

  // ---------------- pooling path ----------------
  logic          pl_valid;
  logic [DW-1:0] pl_word;

  pooling #(.T_IN(T_IN)) u_pool (
    .clk, .rst_n, .prec(run_cfg.prec),
    .in_valid(v1 && pool_run), .in_first(first1), .in_last(last1), .in_word(feat1),
    .out_valid(pl_valid), .out_word(pl_word)
  );

  // ---------------- output FIFO to the DMA ----------------
  sync_fifo #(.W(DW), .DEPTH(FIFO_DEPTH)) u_ofifo (
    .clk, .rst_n,
    .push(pk_valid || pl_valid), .din(pl_valid ? pl_word : pk_word),
    .out_valid(wr_in_valid), .out_ready(wr_in_ready), .dout(wr_in_data),
    .count(fifo_count)
  );

  assign busy_o = busy;
  assign done_o = done;

endmodule
