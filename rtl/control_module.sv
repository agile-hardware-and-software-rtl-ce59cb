// control_module: sequencer of one accelerator run.
//
// One run (started by `start`, configuration `cfg` captured then) does:
//  1. conv only: load weights. G*K*K*T_OUT words are read from cfg.w_addr;
//     word i goes to weight bank i mod T_OUT at address i div T_OUT, matching
//     the DRAM weight layout [in group][ky][kx][out ch][in lanes].
//  2. load the input tile: for each channel group g, IN_ROWS*IN_W words from
//     in_addr + g*in_gstride into the feature buffer, groups back to back.
//  3. give the DMA the write command for all output words of the run.
//  4. issue one buffer read per cycle. conv: for each output pixel (row-major)
//     the G*K*K steps (group, ky, kx); pool: for each group and output pixel
//     the K*K window positions. Positions outside the held rows or outside
//     0..IN_W-1 are flagged `iss_zero` (zero padding).
//  5. wait for the DMA to report the last output word written, pulse done.
// Stall: a new output pixel is not started while the output FIFO has fewer
// than PIPE_SLOTS free entries, which covers every word still in flight in
// the pipeline; `stall` is high in such a cycle.
// Issue timing: iss_* and the read addresses are valid in the same cycle; the
// buffers answer one cycle later.
// The loop order follows the tiled mapping of the design (one run = one output
// row tile and one output channel group); the exact sequence and the stall
// rule are choices of this implementation.
module control_module
  import acc_pkg::*;
#(
  parameter int unsigned T_OUT      = 32,
  parameter int unsigned FB_DEPTH   = 4096,
  parameter int unsigned WB_DEPTH   = 1024,
  parameter int unsigned FIFO_DEPTH = 16,
  parameter int unsigned PIPE_SLOTS = 8,
  localparam int unsigned FBA = $clog2(FB_DEPTH),
  localparam int unsigned WBA = $clog2(WB_DEPTH),
  localparam int unsigned RW  = (T_OUT > 1) ? $clog2(T_OUT) : 1,
  localparam int unsigned FCW = $clog2(FIFO_DEPTH) + 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  acc_cfg_t         cfg,
  output logic             busy,
  output logic             done,
  output acc_cfg_t         run_cfg,
  // DMA
  output logic             rd_cmd_valid,
  input  logic             rd_cmd_ready,
  output logic [31:0]      rd_cmd_addr,
  output logic [23:0]      rd_cmd_words,
  input  logic             rd_data_valid,
  input  logic             rd_done,
  output logic             wr_cmd_valid,
  input  logic             wr_cmd_ready,
  output logic [31:0]      wr_cmd_addr,
  output logic [23:0]      wr_cmd_words,
  input  logic             wr_done,
  // buffer writes (data comes straight from the DMA)
  output logic             fb_we,
  output logic [FBA-1:0]   fb_waddr,
  output logic             wb_we,
  output logic [RW-1:0]    wb_wrow,
  output logic [WBA-1:0]   wb_waddr,
  // compute issue
  output logic             iss_valid,
  output logic             iss_first,
  output logic             iss_last,
  output logic             iss_pix_last,
  output logic             iss_zero,
  output logic [FBA-1:0]   fb_raddr,
  output logic [WBA-1:0]   wb_raddr,
  input  logic [FCW-1:0]   fifo_count,
  output logic             stall
);

  typedef enum logic [2:0] {C_IDLE, C_LDW, C_LDW_WAIT, C_LDF, C_LDF_WAIT, C_WRCMD, C_RUN, C_DRAIN} ctl_state_e;

  ctl_state_e st;
  acc_cfg_t   c;
  logic [15:0] g, oh, ow;
  logic [3:0]  ky, kx;
  logic [FBA-1:0] fb_wcnt;
  logic [RW-1:0]  wrow;
  logic [WBA-1:0] wrow_addr;

  assign run_cfg = c;
  assign busy    = (st != C_IDLE);

  // ---- loop bounds ----
  logic is_pool;
  logic last_kx, last_ky, last_g, last_ow, last_oh, last_win, last_all;
  assign is_pool = (c.op == OP_POOL);
  assign last_kx = (kx == c.ksize - 1'b1);
  assign last_ky = (ky == c.ksize - 1'b1);
  assign last_g  = (g  == c.in_groups - 1'b1);
  assign last_ow = (ow == c.out_w - 1'b1);
  assign last_oh = (oh == c.out_rows - 1'b1);
  assign last_win = last_kx && last_ky;
  assign last_all = last_win && last_g && last_ow && last_oh;

  // ---- read address generation ----
  logic signed [31:0] ih, iw, rel;
  logic               in_tile;
  always_comb begin
    logic signed [31:0] padv;
    padv   = is_pool ? 32'sd0 : 32'(c.pad);
    ih     = 32'(c.out_row0 + oh) * 32'(c.stride) + 32'(ky) - padv;
    iw     = 32'(ow) * 32'(c.stride) + 32'(kx) - padv;
    rel    = ih - 32'(c.in_row0);
    in_tile = (rel >= 0) && (rel < 32'(c.in_rows)) && (iw >= 0) && (iw < 32'(c.in_w));
    fb_raddr = FBA'((32'(g) * 32'(c.in_rows) + rel) * 32'(c.in_w) + iw);
    wb_raddr = WBA'((32'(g) * 32'(c.ksize) + 32'(ky)) * 32'(c.ksize) + 32'(kx));
  end

  logic pix_start;
  assign pix_start = (kx == 0) && (ky == 0) && (is_pool || g == 0);
  assign stall     = (st == C_RUN) && pix_start && (32'(FIFO_DEPTH) - 32'(fifo_count) < 32'(PIPE_SLOTS));

  assign iss_valid    = (st == C_RUN) && !stall;
  assign iss_first    = pix_start;
  assign iss_last     = is_pool ? last_win : (last_win && last_g);
  assign iss_pix_last = last_all;
  assign iss_zero     = !in_tile;

  // ---- DMA commands ----
  logic [31:0] out_words;
  always_comb begin
    logic [31:0] npix;
    npix = 32'(c.out_rows) * 32'(c.out_w);
    if (is_pool)
      out_words = npix * 32'(c.in_groups);
    else
      case (c.prec)
        PREC_4:  out_words = (npix + 1) >> 1;
        PREC_2:  out_words = (npix + 3) >> 2;
        default: out_words = npix;
      endcase
  end

  assign rd_cmd_valid = (st == C_LDW) || (st == C_LDF);
  assign rd_cmd_addr  = (st == C_LDW) ? c.w_addr : c.in_addr + 32'(g) * c.in_gstride;
  assign rd_cmd_words = (st == C_LDW)
                      ? 24'(32'(c.in_groups) * 32'(c.ksize) * 32'(c.ksize) * 32'(T_OUT))
                      : 24'(32'(c.in_rows) * 32'(c.in_w));
  assign wr_cmd_valid = (st == C_WRCMD);
  assign wr_cmd_addr  = c.out_addr;
  assign wr_cmd_words = 24'(out_words);

  assign fb_we    = (st == C_LDF_WAIT) && rd_data_valid;
  assign fb_waddr = fb_wcnt;
  assign wb_we    = (st == C_LDW_WAIT) && rd_data_valid;
  assign wb_wrow  = wrow;
  assign wb_waddr = wrow_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= C_IDLE;
      c         <= '0;
      g         <= '0;
      oh        <= '0;
      ow        <= '0;
      ky        <= '0;
      kx        <= '0;
      fb_wcnt   <= '0;
      wrow      <= '0;
      wrow_addr <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      case (st)
        C_IDLE: if (start) begin
          c         <= cfg;
          g         <= '0;
          fb_wcnt   <= '0;
          wrow      <= '0;
          wrow_addr <= '0;
          st        <= (cfg.op == OP_POOL) ? C_LDF : C_LDW;
        end
        C_LDW: if (rd_cmd_ready) st <= C_LDW_WAIT;
        C_LDW_WAIT: begin
          if (rd_data_valid) begin
            if (32'(wrow) == T_OUT - 1) begin
              wrow      <= '0;
              wrow_addr <= wrow_addr + 1'b1;
            end else begin
              wrow <= wrow + 1'b1;
            end
          end
          if (rd_done) st <= C_LDF;
        end
        C_LDF: if (rd_cmd_ready) st <= C_LDF_WAIT;
        C_LDF_WAIT: begin
          if (rd_data_valid) fb_wcnt <= fb_wcnt + 1'b1;
          if (rd_done) begin
            if (last_g) begin
              g  <= '0;
              oh <= '0;
              ow <= '0;
              ky <= '0;
              kx <= '0;
              st <= C_WRCMD;
            end else begin
              g  <= g + 1'b1;
              st <= C_LDF;
            end
          end
        end
        C_WRCMD: if (wr_cmd_ready) st <= C_RUN;
        C_RUN: if (!stall) begin
          if (last_all) begin
            st <= C_DRAIN;
          end else if (!last_kx) begin
            kx <= kx + 1'b1;
          end else begin
            kx <= '0;
            if (!last_ky) begin
              ky <= ky + 1'b1;
            end else begin
              ky <= '0;
              if (is_pool) begin
                // pool order: group, row, column, window
                if (!last_ow) ow <= ow + 1'b1;
                else begin
                  ow <= '0;
                  if (!last_oh) oh <= oh + 1'b1;
                  else begin
                    oh <= '0;
                    g  <= g + 1'b1;
                  end
                end
              end else begin
                // conv order: row, column, group, window
                if (!last_g) g <= g + 1'b1;
                else begin
                  g <= '0;
                  if (!last_ow) ow <= ow + 1'b1;
                  else begin
                    ow <= '0;
                    oh <= oh + 1'b1;
                  end
                end
              end
            end
          end
        end
        C_DRAIN: if (wr_done) begin
          st   <= C_IDLE;
          done <= 1'b1;
        end
        default: st <= C_IDLE;
      endcase
    end
  end

endmodule
