// tb_control_module: the controller alone, with the DMA and output FIFO
// played by the testbench. For a conv and a pool configuration it checks the
// DMA commands (addresses, word counts), the buffer write addresses during
// loading, and the whole issue sequence (feature and weight read addresses,
// first/last/pixel-last flags, zero-padding flag) against a loop nest
// written out in the testbench. The FIFO count is held high for a while to
// check that no new pixel starts (stall) and that nothing is lost.
module tb_control_module;
  import acc_pkg::*;
  localparam int TO = 4, FBD = 256, WBD = 64, FD = 16;
  logic clk = 0, rst_n = 0;
  logic start, busy, done;
  acc_cfg_t cfg, run_cfg;
  logic rd_cmd_valid, rd_cmd_ready, rd_data_valid, rd_done;
  logic [31:0] rd_cmd_addr, wr_cmd_addr;
  logic [23:0] rd_cmd_words, wr_cmd_words;
  logic wr_cmd_valid, wr_cmd_ready, wr_done;
  logic fb_we, wb_we;
  logic [7:0] fb_waddr, fb_raddr;
  logic [1:0] wb_wrow;
  logic [5:0] wb_waddr, wb_raddr;
  logic iss_valid, iss_first, iss_last, iss_pix_last, iss_zero;
  logic [4:0] fifo_count;
  logic stall;
  int checks = 0, failures = 0, stalls = 0;

  control_module #(.T_OUT(TO), .FB_DEPTH(FBD), .WB_DEPTH(WBD), .FIFO_DEPTH(FD)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(posedge clk) if (rst_n && stall) stalls++;

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; if (failures < 15) $display("FAIL %s got %0d exp %0d", what, got, exp); end
  endtask

  // DMA read command: expect address/count, then deliver the beats
  task automatic serve_read(int addr, int words, bit weights);
    while (!rd_cmd_valid) @(negedge clk);
    chk("rd addr", int'(rd_cmd_addr), addr);
    chk("rd words", int'(rd_cmd_words), words);
    rd_cmd_ready = 1;
    @(negedge clk) rd_cmd_ready = 0;
    for (int i = 0; i < words; i++) begin
      rd_data_valid = 1;
      #1;
      if (weights) begin
        chk("wb_we", int'(wb_we), 1);
        chk("wb row", int'(wb_wrow), i % TO);
        chk("wb addr", int'(wb_waddr), i / TO);
      end else begin
        chk("fb_we", int'(fb_we), 1);
      end
      @(negedge clk);
    end
    rd_data_valid = 0;
    rd_done = 1;
    @(negedge clk) rd_done = 0;
  endtask

  // expected issue stream, written as the plain loop nest
  typedef struct packed { logic [7:0] fa; logic [5:0] wa; logic first, last, plast, zero; } iss_t;
  iss_t exp_q [$];
  task automatic build(bit pool, int g_n, int oh_n, int ow_n, int k, int s, int pad, int orow0, int irow0, int irows, int iw_n);
    exp_q.delete();
    if (!pool) begin
      for (int oh = 0; oh < oh_n; oh++) for (int ow = 0; ow < ow_n; ow++)
        for (int g = 0; g < g_n; g++) for (int ky = 0; ky < k; ky++) for (int kx = 0; kx < k; kx++) begin
          iss_t e; int ih, iw;
          ih = (orow0 + oh) * s + ky - pad; iw = ow * s + kx - pad;
          e.zero = !(ih >= irow0 && ih < irow0 + irows && iw >= 0 && iw < iw_n);
          e.fa = 8'((g * irows + ih - irow0) * iw_n + iw);
          e.wa = 6'((g * k + ky) * k + kx);
          e.first = (g == 0 && ky == 0 && kx == 0);
          e.last = (g == g_n - 1 && ky == k - 1 && kx == k - 1);
          e.plast = e.last && oh == oh_n - 1 && ow == ow_n - 1;
          exp_q.push_back(e);
        end
    end else begin
      for (int g = 0; g < g_n; g++) for (int oh = 0; oh < oh_n; oh++) for (int ow = 0; ow < ow_n; ow++)
        for (int ky = 0; ky < k; ky++) for (int kx = 0; kx < k; kx++) begin
          iss_t e; int ih, iw;
          ih = (orow0 + oh) * s + ky; iw = ow * s + kx;
          e.zero = !(ih >= irow0 && ih < irow0 + irows && iw >= 0 && iw < iw_n);
          e.fa = 8'((g * irows + ih - irow0) * iw_n + iw);
          e.wa = 6'((g * k + ky) * k + kx);
          e.first = (ky == 0 && kx == 0);
          e.last = (ky == k - 1 && kx == k - 1);
          e.plast = e.last && g == g_n - 1 && oh == oh_n - 1 && ow == ow_n - 1;
          exp_q.push_back(e);
        end
    end
  endtask

  task automatic run(bit pool, int prec, int g_n, int oh_n, int ow_n, int k, int s, int pad, int orow0, int irow0, int irows, int iw_n);
    int n, words, l;
    cfg = '0;
    cfg.op = pool ? OP_POOL : OP_CONV; cfg.prec = prec_e'(prec);
    cfg.in_addr = 32'h4000_1000; cfg.w_addr = 32'h4000_8000; cfg.out_addr = 32'h4001_0000;
    cfg.in_w = 16'(iw_n); cfg.in_rows = 16'(irows); cfg.in_row0 = 16'(irow0); cfg.in_groups = 16'(g_n);
    cfg.in_gstride = 32'h200; cfg.out_w = 16'(ow_n); cfg.out_rows = 16'(oh_n); cfg.out_row0 = 16'(orow0);
    cfg.ksize = 4'(k); cfg.stride = 4'(s); cfg.pad = 4'(pad);
    build(pool, g_n, oh_n, ow_n, k, s, pad, orow0, irow0, irows, iw_n);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    chk("busy", int'(busy), 1);
    if (!pool) serve_read(32'h4000_8000, g_n * k * k * TO, 1);
    for (int g = 0; g < g_n; g++) serve_read(32'h4000_1000 + g * 32'h200, irows * iw_n, 0);
    while (!wr_cmd_valid) @(negedge clk);
    l = (prec == 0) ? 1 : (prec == 1) ? 2 : 4;
    words = pool ? g_n * oh_n * ow_n : (oh_n * ow_n + l - 1) / l;
    chk("wr addr", int'(wr_cmd_addr), 32'h4001_0000);
    chk("wr words", int'(wr_cmd_words), words);
    wr_cmd_ready = 1;
    @(negedge clk) wr_cmd_ready = 0;
    n = 0;
    while (exp_q.size() > 0) begin
      // block the FIFO for a while in the middle of the run
      fifo_count = (n > 10 && n < 30) ? 5'(FD - 4) : 5'd0;
      #1;
      if (iss_valid) begin
        iss_t e;
        e = exp_q.pop_front();
        chk("zero", int'(iss_zero), int'(e.zero));
        if (!e.zero) chk("fb raddr", int'(fb_raddr), int'(e.fa));
        if (!pool) chk("wb raddr", int'(wb_raddr), int'(e.wa));
        chk("first", int'(iss_first), int'(e.first));
        chk("last", int'(iss_last), int'(e.last));
        chk("pix last", int'(iss_pix_last), int'(e.plast));
      end else if (!stall) begin
        failures++; $display("FAIL idle without stall");
      end
      n++;
      @(negedge clk);
    end
    fifo_count = 0;
    chk("no extra issue", int'(iss_valid), 0);
    repeat (3) @(negedge clk);
    chk("busy until write done", int'(busy), 1);
    wr_done = 1;
    #1 chk("done pulse", int'(done), 0);
    @(negedge clk) wr_done = 0;
    chk("done", int'(done), 1);
    chk("idle", int'(busy), 0);
  endtask

  initial begin
    start = 0; cfg = '0; rd_cmd_ready = 0; rd_data_valid = 0; rd_done = 0;
    wr_cmd_ready = 0; wr_done = 0; fifo_count = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(0, 0, 2, 2, 3, 3, 1, 1, 1, 0, 4, 3);   // conv 3x3, pad, 2 groups, row tile
    run(0, 1, 1, 2, 2, 3, 2, 1, 0, 0, 3, 4);   // conv stride 2, 4 bit
    run(1, 2, 2, 2, 2, 2, 2, 0, 0, 0, 4, 4);   // pool 2x2/2, 2 groups
    chk("stalled", int'(stalls > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
