// tb_mbw_dma: read and write commands against the AXI memory model with
// random ready stalls. A read that starts just below a 4 KiB boundary and a
// long write must be split into legal bursts (at most 16 beats, none crossing
// 4 KiB); every read beat must carry the right word in order, and every word
// fed to the write stream must land at the right address.
module tb_mbw_dma;
  localparam int DW = 64, WORDS = 2048;
  logic clk = 0, rst_n = 0;
  logic rd_cmd_valid, rd_cmd_ready, rd_data_valid, rd_done;
  logic [31:0] rd_cmd_addr, wr_cmd_addr;
  logic [23:0] rd_cmd_words, wr_cmd_words;
  logic [DW-1:0] rd_data, wr_in_data;
  logic wr_cmd_valid, wr_cmd_ready, wr_in_valid, wr_in_ready, wr_done, err;
  logic m_arvalid, m_arready, m_rvalid, m_rready, m_rlast;
  logic [31:0] m_araddr, m_awaddr;
  logic [7:0] m_arlen, m_awlen;
  logic [2:0] m_arsize, m_awsize;
  logic [1:0] m_arburst, m_awburst, m_rresp, m_bresp;
  logic [DW-1:0] m_rdata, m_wdata;
  logic m_awvalid, m_awready, m_wvalid, m_wready, m_wlast, m_bvalid, m_bready;
  logic [DW/8-1:0] m_wstrb;
  int violations, bursts;
  int checks = 0, failures = 0;

  mbw_dma #(.DW(DW)) dut (.*);

  axi_mem_model #(.DW(DW), .WORDS(WORDS)) mem (
    .clk, .rst_n,
    .arvalid(m_arvalid), .arready(m_arready), .araddr(m_araddr), .arlen(m_arlen),
    .arsize(m_arsize), .arburst(m_arburst),
    .rvalid(m_rvalid), .rready(m_rready), .rdata(m_rdata), .rresp(m_rresp), .rlast(m_rlast),
    .awvalid(m_awvalid), .awready(m_awready), .awaddr(m_awaddr), .awlen(m_awlen),
    .awsize(m_awsize), .awburst(m_awburst),
    .wvalid(m_wvalid), .wready(m_wready), .wdata(m_wdata), .wstrb(m_wstrb), .wlast(m_wlast),
    .bvalid(m_bvalid), .bready(m_bready), .bresp(m_bresp),
    .violations, .bursts
  );

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int rd_idx = 0, rd_base;
  always @(posedge clk) if (rst_n && rd_data_valid) begin
    checks++;
    if (rd_data !== mem.mem[rd_base + rd_idx]) begin
      failures++;
      if (failures < 10) $display("FAIL read beat %0d", rd_idx);
    end
    rd_idx++;
  end

  initial begin
    rd_cmd_valid = 0; wr_cmd_valid = 0; wr_in_valid = 0;
    rd_cmd_addr = 0; rd_cmd_words = 0; wr_cmd_addr = 0; wr_cmd_words = 0; wr_in_data = 0;
    for (int i = 0; i < WORDS; i++) mem.mem[i] = {$urandom, $urandom};
    repeat (2) @(negedge clk);
    rst_n = 1;
    // read 100 words starting 24 words below the 4 KiB boundary (8-byte words):
    // bursts of 16, 8 (up to the boundary), 16, 16, 16, 16, 12 = 7 bursts
    rd_base = 512 - 24;
    @(negedge clk);
    rd_cmd_valid = 1; rd_cmd_addr = 32'h4000_0000 + 32'(rd_base * 8); rd_cmd_words = 100;
    do @(posedge clk); while (!rd_cmd_ready);
    @(negedge clk) rd_cmd_valid = 0;
    while (!rd_done) @(negedge clk);
    checks++; if (rd_idx != 100) begin failures++; $display("FAIL read count %0d", rd_idx); end
    checks++; if (bursts != 7) begin failures++; $display("FAIL bursts %0d", bursts); end
    // write 70 words at word 1000 from a stream with gaps
    @(negedge clk);
    wr_cmd_valid = 1; wr_cmd_addr = 32'h4000_0000 + 32'(1000 * 8); wr_cmd_words = 70;
    do @(posedge clk); while (!wr_cmd_ready);
    @(negedge clk) wr_cmd_valid = 0;
    for (int i = 0; i < 70; i++) begin
      wr_in_valid = ($urandom_range(0, 3) != 0);
      while (!wr_in_valid) begin @(negedge clk); wr_in_valid = 1; end
      wr_in_data = {32'(i), 32'hC0DE_0000 + 32'(i)};
      do @(posedge clk); while (!wr_in_ready);
      @(negedge clk) wr_in_valid = 0;
    end
    while (!wr_done) @(negedge clk);
    for (int i = 0; i < 70; i++) begin
      checks++;
      if (mem.mem[1000 + i] !== {32'(i), 32'hC0DE_0000 + 32'(i)}) begin
        failures++;
        if (failures < 10) $display("FAIL write word %0d", i);
      end
    end
    checks++; if (violations != 0) begin failures++; $display("FAIL AXI violations %0d", violations); end
    checks++; if (err) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
