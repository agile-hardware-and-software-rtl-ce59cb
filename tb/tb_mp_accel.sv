// tb_mp_accel: end-to-end runs of the accelerator with a 4x4 PE array against
// the AXI memory model. Each run fills DRAM with random packed inputs and
// weights, programs the registers over AXI-Lite, starts the run, waits for
// done and compares every output word with the reference. Runs cover
// 8/4/2-bit convolution with zero padding, stride 2, a row tile that starts
// inside the tensor, several channel groups, a dense (1x1) layer, max pooling
// at two precisions, partial last words and output back-pressure (stalls).
// It also checks the issue rate: one array step per cycle when not stalled.
module tb_mp_accel;
  import acc_pkg::*;
  import tb_ref_pkg::*;

  localparam int T = 4, DW = T * 8, BY = DW / 8, WORDS = 4096;
  localparam logic [31:0] MBASE = 32'h4000_0000;

  logic clk = 0, rst_n = 0;
  logic s_awvalid, s_awready, s_wvalid, s_wready, s_bvalid, s_bready;
  logic s_arvalid, s_arready, s_rvalid, s_rready;
  logic [31:0] s_awaddr, s_wdata, s_araddr, s_rdata;
  logic [3:0] s_wstrb;
  logic [1:0] s_bresp, s_rresp;
  logic m_arvalid, m_arready, m_rvalid, m_rready, m_rlast;
  logic [31:0] m_araddr, m_awaddr;
  logic [7:0] m_arlen, m_awlen;
  logic [2:0] m_arsize, m_awsize;
  logic [1:0] m_arburst, m_awburst, m_rresp, m_bresp;
  logic [DW-1:0] m_rdata, m_wdata;
  logic m_awvalid, m_awready, m_wvalid, m_wready, m_wlast, m_bvalid, m_bready;
  logic [DW/8-1:0] m_wstrb;
  logic busy_o, done_o, stall_o, dma_err_o;
  int violations, bursts;
  int checks = 0, failures = 0;

  mp_accel #(.T_IN(T), .T_OUT(T), .FB_DEPTH(256), .WB_DEPTH(64)) dut (.*);

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
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_stall = 0, n_pad = 0, n_issue = 0, n_prec [3] = '{0, 0, 0}, n_pool = 0;
  int n_partial = 0, n_tile = 0, n_groups = 0, n_dense = 0;
  always @(posedge clk) if (rst_n) begin
    if (stall_o) n_stall++;
    if (dut.iss_valid) n_issue++;
    if (dut.iss_valid && dut.iss_zero && dut.run_cfg.op == OP_CONV) n_pad++;
  end

  task automatic wr(logic [15:0] a, logic [31:0] d);
    @(negedge clk);
    s_awvalid = 1; s_wvalid = 1; s_awaddr = 32'h5000_0000 | 32'(a); s_wdata = d; s_wstrb = 4'hF;
    do @(posedge clk); while (!s_awready);
    @(negedge clk);
    s_awvalid = 0; s_wvalid = 0; s_bready = 1;
    while (!s_bvalid) @(negedge clk);
    @(negedge clk) s_bready = 0;
  endtask

  task automatic do_run(run_t r);
    logic [255:0] snap [];
    logic [255:0] exp [$];
    int nin, issues0, stalls0, steps;
    // random inputs and weights, poisoned output area
    nin = r.groups * r.h * r.w;
    for (int i = 0; i < nin; i++) mem.mem[r.in_word + i] = DW'({$urandom, $urandom});
    for (int i = 0; i < r.groups * r.k * r.k * r.t; i++) mem.mem[r.w_word + i] = DW'({$urandom, $urandom});
    for (int i = 0; i < 128; i++) mem.mem[r.out_word + i] = '1;
    snap = new [WORDS];
    for (int i = 0; i < WORDS; i++) snap[i] = 256'(mem.mem[i]);
    expect_run(r, snap, exp);
    wr(REG_CFG, 32'(r.prec) | (32'(r.relu) << 2) | (32'(r.shift) << 8));
    wr(REG_IN_ADDR, MBASE + 32'((r.in_word + r.in_row0 * r.w) * BY));
    wr(REG_IN_GSTR, 32'(r.h * r.w * BY));
    wr(REG_W_ADDR, MBASE + 32'(r.w_word * BY));
    wr(REG_OUT_ADDR, MBASE + 32'(r.out_word * BY));
    wr(REG_IN_W, 32'(r.w));
    wr(REG_IN_ROWS, 32'(r.in_rows));
    wr(REG_IN_ROW0, 32'(r.in_row0));
    wr(REG_IN_GROUPS, 32'(r.groups));
    wr(REG_OUT_W, 32'(r.out_w));
    wr(REG_OUT_ROWS, 32'(r.out_rows));
    wr(REG_OUT_ROW0, 32'(r.out_row0));
    wr(REG_KSIZE, 32'(r.k));
    wr(REG_STRIDE, 32'(r.s));
    wr(REG_PAD, 32'(r.pad));
    issues0 = n_issue; stalls0 = n_stall;
    wr(REG_CTRL, 32'h1 | (32'(r.op) << 1));
    while (!done_o) @(negedge clk);
    @(negedge clk);
    // rate: every issued cycle is one array step, no extra cycles
    steps = (r.op == 0) ? r.out_rows * r.out_w * r.groups * r.k * r.k
                        : r.groups * r.out_rows * r.out_w * r.k * r.k;
    checks++;
    if (n_issue - issues0 != steps) begin
      failures++; $display("FAIL issue count %0d exp %0d", n_issue - issues0, steps);
    end
    checks++;
    if (exp.size() != out_words(r)) failures++;
    foreach (exp[i]) begin
      checks++;
      if (mem.mem[r.out_word + i] !== exp[i][DW-1:0]) begin
        failures++;
        if (failures < 12) $display("FAIL op=%0d prec=%0d word %0d got %h exp %h", r.op, r.prec, i,
                                    mem.mem[r.out_word + i], exp[i][DW-1:0]);
      end
    end
    checks++;
    if (mem.mem[r.out_word + exp.size()] !== '1) begin failures++; $display("FAIL wrote past the end: %h %h %h", mem.mem[r.out_word], mem.mem[r.out_word+1], exp[0]); end
    if (r.op == 1) n_pool++; else n_prec[r.prec]++;
    if (r.op == 0 && (r.out_rows * r.out_w) % (8 / bits_of(r.prec)) != 0) n_partial++;
    if (r.in_row0 > 0) n_tile++;
    if (r.groups > 1) n_groups++;
    if (r.op == 0 && r.h == 1 && r.w == 1) n_dense++;
    $display("run op=%0d prec=%0d: %0d words, %0d stall cycles", r.op, r.prec, exp.size(), n_stall - stalls0);
  endtask

  function automatic run_t mk(int op, int prec, int relu, int shift, int h, int w, int g,
                              int k, int s, int pad, int orow0, int orows, int ow,
                              int irow0, int irows);
    run_t r;
    r.op = op; r.prec = prec; r.relu = relu; r.shift = shift; r.t = T;
    r.h = h; r.w = w; r.groups = g; r.k = k; r.s = s; r.pad = pad;
    r.out_row0 = orow0; r.out_rows = orows; r.out_w = ow;
    r.in_row0 = irow0; r.in_rows = irows;
    r.in_word = 0; r.w_word = 1024; r.out_word = 2048;
    return r;
  endfunction

  initial begin
    s_awvalid = 0; s_wvalid = 0; s_bready = 0; s_arvalid = 0; s_rready = 0;
    s_awaddr = 0; s_wdata = 0; s_wstrb = 0; s_araddr = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    //          op prec relu sh  h  w  g  k  s pad or0 orows ow ir0 irows
    do_run(mk(0, 0, 1, 7,  5, 6, 2, 3, 1, 1, 0, 5, 6, 0, 5));   // 8-bit 3x3, pad
    do_run(mk(0, 1, 0, 5,  7, 7, 1, 3, 2, 1, 2, 2, 4, 3, 4));   // 4-bit, stride 2, row tile
    do_run(mk(0, 2, 1, 3,  1, 1, 3, 1, 1, 0, 0, 1, 1, 0, 1));   // 2-bit dense, 3 groups
    do_run(mk(0, 0, 0, 4,  8, 8, 1, 1, 1, 0, 0, 8, 8, 0, 8));   // 8-bit 1x1: back-pressure
    do_run(mk(1, 0, 0, 0,  6, 6, 2, 2, 2, 0, 0, 3, 3, 0, 6));   // 8-bit 2x2 max pool
    do_run(mk(1, 1, 0, 0,  7, 7, 1, 3, 2, 0, 0, 3, 3, 0, 7));   // 4-bit 3x3/2 max pool
    do_run(mk(0, 2, 0, 2,  4, 5, 2, 3, 1, 1, 0, 4, 5, 0, 4));   // 2-bit 3x3, pad
    do_run(mk(0, 1, 1, 4,  4, 5, 1, 3, 1, 0, 0, 2, 3, 0, 4));   // 4-bit 3x3, no pad
    do_run(mk(1, 2, 0, 0,  4, 4, 1, 2, 2, 0, 0, 2, 2, 0, 4));   // 2-bit pool
    checks++; if (violations != 0) begin failures++; $display("FAIL AXI violations"); end
    checks++; if (dma_err_o) failures++;
    // every mechanism must have happened
    foreach (n_prec[i]) begin checks++; if (n_prec[i] == 0) begin failures++; $display("FAIL no prec %0d run", i); end end
    checks++; if (n_stall == 0)   begin failures++; $display("FAIL no stall"); end
    checks++; if (n_pad == 0)     begin failures++; $display("FAIL no padding"); end
    checks++; if (n_pool == 0)    begin failures++; $display("FAIL no pool"); end
    checks++; if (n_partial == 0) begin failures++; $display("FAIL no partial word"); end
    checks++; if (n_tile == 0)    begin failures++; $display("FAIL no row tile"); end
    checks++; if (n_groups == 0)  begin failures++; $display("FAIL no multi-group"); end
    checks++; if (n_dense == 0)   begin failures++; $display("FAIL no dense"); end
    $display("mechanisms: stall=%0d pad=%0d prec8=%0d prec4=%0d prec2=%0d pool=%0d partial=%0d tile=%0d groups=%0d dense=%0d",
             n_stall, n_pad, n_prec[0], n_prec[1], n_prec[2], n_pool, n_partial, n_tile, n_groups, n_dense);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
