// mbw_dma: multi-bit-width DMA, an AXI4 (AXI-Full) master to DRAM.
//
// It moves whole words of DW bits; a word is a row of 8-bit PE lanes, so the
// same transfers serve 8-, 4- and 2-bit data (the precision only changes how
// many operands a word holds). Two independent engines:
//   read : a command (byte address, word count) becomes INCR bursts of at
//          most MAX_BURST beats that never cross a 4 KiB boundary; every
//          received beat appears on rd_data/rd_data_valid (the buffers always
//          accept, so there is no back-pressure) and rd_done pulses after the
//          last beat.
//   write: a command (byte address, word count) becomes INCR bursts; beat
//          data is taken from the wr_in valid/ready stream, which may stall
//          the burst; wr_done pulses after the last write response.
// One burst is outstanding per engine. Addresses must be DW/8-byte aligned.
// Any SLVERR/DECERR response sets the sticky err output until the next command.
// Burst size and splitting policy are choices of this implementation.
module mbw_dma #(
  parameter int unsigned DW        = 256,
  parameter int unsigned MAX_BURST = 16,
  parameter int unsigned CNT_W     = 24
) (
  input  logic             clk,
  input  logic             rst_n,
  // read command and data
  input  logic             rd_cmd_valid,
  output logic             rd_cmd_ready,
  input  logic [31:0]      rd_cmd_addr,
  input  logic [CNT_W-1:0] rd_cmd_words,
  output logic             rd_data_valid,
  output logic [DW-1:0]    rd_data,
  output logic             rd_done,
  // write command and data
  input  logic             wr_cmd_valid,
  output logic             wr_cmd_ready,
  input  logic [31:0]      wr_cmd_addr,
  input  logic [CNT_W-1:0] wr_cmd_words,
  input  logic             wr_in_valid,
  output logic             wr_in_ready,
  input  logic [DW-1:0]    wr_in_data,
  output logic             wr_done,
  output logic             err,
  // AXI4 master
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
  input  logic [1:0]       m_bresp
);

  localparam int unsigned BYTES  = DW / 8;
  localparam int unsigned BSHIFT = $clog2(BYTES);

  typedef enum logic [1:0] {S_IDLE, S_ADDR, S_DATA, S_RESP} dma_state_e;

  // beats of the next burst: limited by MAX_BURST, the words left and the
  // distance to the next 4 KiB boundary
  function automatic logic [CNT_W-1:0] burst_beats(logic [31:0] a, logic [CNT_W-1:0] left);
    logic [CNT_W-1:0] room, n;
    room = CNT_W'((32'h1000 - 32'(a[11:0])) >> BSHIFT);
    n    = left;
    if (n > CNT_W'(MAX_BURST)) n = CNT_W'(MAX_BURST);
    if (n > room) n = room;
    return n;
  endfunction

  assign m_arsize  = 3'(BSHIFT);
  assign m_arburst = 2'b01;
  assign m_awsize  = 3'(BSHIFT);
  assign m_awburst = 2'b01;
  assign m_wstrb   = '1;

  // ---------------- read engine ----------------
  dma_state_e       rs;
  logic [31:0]      r_addr;
  logic [CNT_W-1:0] r_left, r_n;
  logic             r_err, w_err;

  assign rd_cmd_ready  = (rs == S_IDLE);
  assign m_arvalid     = (rs == S_ADDR);
  assign m_araddr      = r_addr;
  assign m_arlen       = 8'(r_n - 1'b1);
  assign m_rready      = (rs == S_DATA);
  assign rd_data_valid = m_rvalid && m_rready;
  assign rd_data       = m_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rs      <= S_IDLE;
      r_addr  <= '0;
      r_left  <= '0;
      r_n     <= '0;
      rd_done <= 1'b0;
      r_err   <= 1'b0;
    end else begin
      rd_done <= 1'b0;
      case (rs)
        S_IDLE: if (rd_cmd_valid) begin
          r_err <= 1'b0;
          if (rd_cmd_words == 0) begin
            rd_done <= 1'b1;
          end else begin
            r_addr <= rd_cmd_addr;
            r_left <= rd_cmd_words;
            r_n    <= burst_beats(rd_cmd_addr, rd_cmd_words);
            rs     <= S_ADDR;
          end
        end
        S_ADDR: if (m_arready) rs <= S_DATA;
        S_DATA: if (m_rvalid) begin
          if (m_rresp[1]) r_err <= 1'b1;
          if (m_rlast) begin
            logic [31:0]      na;
            logic [CNT_W-1:0] nl;
            na = r_addr + (32'(r_n) << BSHIFT);
            nl = r_left - r_n;
            r_addr <= na;
            r_left <= nl;
            if (nl == 0) begin
              rs      <= S_IDLE;
              rd_done <= 1'b1;
            end else begin
              r_n <= burst_beats(na, nl);
              rs  <= S_ADDR;
            end
          end
        end
        default: rs <= S_IDLE;
      endcase
    end
  end

  // ---------------- write engine ----------------
  dma_state_e       ws;
  logic [31:0]      w_addr;
  logic [CNT_W-1:0] w_left, w_n, w_beat;

  assign wr_cmd_ready = (ws == S_IDLE);
  assign m_awvalid    = (ws == S_ADDR);
  assign m_awaddr     = w_addr;
  assign m_awlen      = 8'(w_n - 1'b1);
  assign m_wvalid     = (ws == S_DATA) && wr_in_valid;
  assign wr_in_ready  = (ws == S_DATA) && m_wready;
  assign m_wdata      = wr_in_data;
  assign m_wlast      = (w_beat == w_n - 1'b1);
  assign m_bready     = (ws == S_RESP);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ws      <= S_IDLE;
      w_addr  <= '0;
      w_left  <= '0;
      w_n     <= '0;
      w_beat  <= '0;
      wr_done <= 1'b0;
      w_err   <= 1'b0;
    end else begin
      wr_done <= 1'b0;
      case (ws)
        S_IDLE: if (wr_cmd_valid) begin
          w_err <= 1'b0;
          if (wr_cmd_words == 0) begin
            wr_done <= 1'b1;
          end else begin
            w_addr <= wr_cmd_addr;
            w_left <= wr_cmd_words;
            w_n    <= burst_beats(wr_cmd_addr, wr_cmd_words);
            ws     <= S_ADDR;
          end
        end
        S_ADDR: if (m_awready) begin
          w_beat <= '0;
          ws     <= S_DATA;
        end
        S_DATA: if (m_wvalid && m_wready) begin
          w_beat <= w_beat + 1'b1;
          if (m_wlast) ws <= S_RESP;
        end
        S_RESP: if (m_bvalid) begin
          logic [31:0]      na;
          logic [CNT_W-1:0] nl;
          if (m_bresp[1]) w_err <= 1'b1;
          na = w_addr + (32'(w_n) << BSHIFT);
          nl = w_left - w_n;
          w_addr <= na;
          w_left <= nl;
          if (nl == 0) begin
            ws      <= S_IDLE;
            wr_done <= 1'b1;
          end else begin
            w_n <= burst_beats(na, nl);
            ws  <= S_ADDR;
          end
        end
        default: ws <= S_IDLE;
      endcase
    end
  end

  assign err = r_err || w_err;

  // AXI rule: address and data stay stable while valid waits for ready
  property p_ar_stable;
    @(posedge clk) disable iff (!rst_n) m_arvalid && !m_arready |=> m_arvalid && $stable(m_araddr) && $stable(m_arlen);
  endproperty
  assert property (p_ar_stable) else $error("AR changed while waiting");
  property p_aw_stable;
    @(posedge clk) disable iff (!rst_n) m_awvalid && !m_awready |=> m_awvalid && $stable(m_awaddr) && $stable(m_awlen);
  endproperty
  assert property (p_aw_stable) else $error("AW changed while waiting");

endmodule
