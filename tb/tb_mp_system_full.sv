// tb_mp_system_full: the same software-driven layer sequence as
// tb_mp_system (conv2d+relu -> max pool -> conv2d+relu -> 1x1 conv -> 3x3
// conv -> dense, 8/4/2 bit) on the design at its default size: a 32x32 PE
// array, 256-bit words, 4096-word feature buffer and 1024-word weight banks.
// Everything is programmed through CL_RG / ST_RG / LD_RG and every output
// word is compared with the reference.
module tb_mp_system_full;
  import acc_pkg::*;
  import tb_ref_pkg::*;

  localparam int T = 32, DW = T * 8, BY = DW / 8, WORDS = 4096;
  localparam logic [31:0] MBASE = 32'h4000_0000;

  logic clk = 0, rst_n = 0;
  logic req_valid, req_ready, rsp_valid, rsp_ready, rsp_err;
  logic [31:0] req_insn, req_rs1, req_rs2, rsp_rdata;
  logic m_arvalid, m_arready, m_rvalid, m_rready, m_rlast;
  logic [31:0] m_araddr, m_awaddr;
  logic [7:0] m_arlen, m_awlen;
  logic [2:0] m_arsize, m_awsize;
  logic [1:0] m_arburst, m_awburst, m_rresp, m_bresp;
  logic [DW-1:0] m_rdata, m_wdata;
  logic m_awvalid, m_awready, m_wvalid, m_wready, m_wlast, m_bvalid, m_bready;
  logic [DW/8-1:0] m_wstrb;
  logic busy, done, stall, dma_err;
  int violations, bursts;
  int checks = 0, failures = 0;

  mp_system dut (.*);

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
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_cl = 0, n_ld = 0, n_st = 0, n_stall = 0, n_pad = 0, n_pool = 0, n_partial = 0;
  int n_prec [3] = '{0, 0, 0};
  always @(posedge clk) if (rst_n) begin
    if (stall) n_stall++;
    if (dut.u_accel.iss_valid && dut.u_accel.iss_zero) n_pad++;
  end

  task automatic exec(logic [31:0] insn, logic [31:0] a, logic [31:0] b, output logic [31:0] r);
    @(negedge clk);
    req_valid = 1; req_insn = insn; req_rs1 = a; req_rs2 = b;
    do @(posedge clk); while (!req_ready);
    @(negedge clk) req_valid = 0;
    rsp_ready = 1;
    while (!rsp_valid) @(negedge clk);
    r = rsp_rdata;
    checks++;
    if (rsp_err) begin failures++; $display("FAIL instruction error"); end
    @(negedge clk) rsp_ready = 0;
  endtask

  // CUSTOM-0 R-type: {func7, rs2, rs1, xd, xs1, xs2, rd, opcode}
  task automatic cl_rg();
    logic [31:0] r;
    exec({7'd0, 5'd0, 5'd0, 3'b000, 5'd0, 7'b0001011}, 0, 0, r);
    n_cl++;
  endtask
  task automatic st_rg(logic [15:0] off, logic [31:0] v);
    logic [31:0] r;
    exec({7'd0, 5'd11, 5'd10, 3'b011, 5'd0, 7'b0001011}, 32'(off >> 2), v, r);
    n_st++;
  endtask
  task automatic ld_rg(logic [15:0] off, output logic [31:0] v);
    exec({7'd0, 5'd0, 5'd10, 3'b110, 5'd12, 7'b0001011}, 32'(off >> 2), 0, v);
    n_ld++;
  endtask

  task automatic layer(run_t r, bit fill_in);
    logic [255:0] snap [];
    logic [255:0] exp [$];
    logic [31:0] st;
    if (fill_in)
      for (int i = 0; i < r.groups * r.h * r.w; i++) mem.mem[r.in_word + i] = DW'({$urandom, $urandom});
    if (r.op == 0)
      for (int i = 0; i < r.groups * r.k * r.k * r.t; i++) mem.mem[r.w_word + i] = DW'({$urandom, $urandom});
    snap = new [WORDS];
    for (int i = 0; i < WORDS; i++) snap[i] = 256'(mem.mem[i]);
    expect_run(r, snap, exp);
    cl_rg();
    st_rg(REG_CFG, 32'(r.prec) | (32'(r.relu) << 2) | (32'(r.shift) << 8));
    st_rg(REG_IN_ADDR, MBASE + 32'((r.in_word + r.in_row0 * r.w) * BY));
    st_rg(REG_IN_GSTR, 32'(r.h * r.w * BY));
    st_rg(REG_W_ADDR, MBASE + 32'(r.w_word * BY));
    st_rg(REG_OUT_ADDR, MBASE + 32'(r.out_word * BY));
    st_rg(REG_IN_W, 32'(r.w));
    st_rg(REG_IN_ROWS, 32'(r.in_rows));
    st_rg(REG_IN_ROW0, 32'(r.in_row0));
    st_rg(REG_IN_GROUPS, 32'(r.groups));
    st_rg(REG_OUT_W, 32'(r.out_w));
    st_rg(REG_OUT_ROWS, 32'(r.out_rows));
    st_rg(REG_OUT_ROW0, 32'(r.out_row0));
    st_rg(REG_KSIZE, 32'(r.k));
    st_rg(REG_STRIDE, 32'(r.s));
    st_rg(REG_PAD, 32'(r.pad));
    st_rg(REG_CTRL, 32'h1 | (32'(r.op) << 1));
    do ld_rg(REG_STATUS, st); while (st[1] != 1'b1);
    foreach (exp[i]) begin
      checks++;
      if (mem.mem[r.out_word + i] !== exp[i][DW-1:0]) begin
        failures++;
        if (failures < 12) $display("FAIL layer op=%0d word %0d got %h exp %h", r.op, i, mem.mem[r.out_word + i], exp[i][DW-1:0]);
      end
    end
    if (r.op == 1) n_pool++; else n_prec[r.prec]++;
    if (r.op == 0 && (r.out_rows * r.out_w) % (8 / bits_of(r.prec)) != 0) n_partial++;
    $display("layer op=%0d prec=%0d: %0d words checked", r.op, r.prec, exp.size());
  endtask

  function automatic run_t mk(int op, int prec, int relu, int shift, int h, int w, int g,
                              int k, int s, int pad, int oh, int ow, int in_word, int w_word, int out_word);
    run_t r;
    r.op = op; r.prec = prec; r.relu = relu; r.shift = shift; r.t = T;
    r.h = h; r.w = w; r.groups = g; r.k = k; r.s = s; r.pad = pad;
    r.out_row0 = 0; r.out_rows = oh; r.out_w = ow; r.in_row0 = 0; r.in_rows = h;
    r.in_word = in_word; r.w_word = w_word; r.out_word = out_word;
    return r;
  endfunction

  initial begin
    logic [31:0] v;
    req_valid = 0; req_insn = 0; req_rs1 = 0; req_rs2 = 0; rsp_ready = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // conv2d+relu, 8 bit, 6x6, 2 groups, 3x3 pad 1 -> 6x6 (words at 1000)
    layer(mk(0, 0, 1, 7, 6, 6, 2, 3, 1, 1, 6, 6, 0, 3000, 1000), 1);
    // max pool 2x2/2 of that output, 8 bit -> 3x3 (words at 1100)
    layer(mk(1, 0, 0, 0, 6, 6, 1, 2, 2, 0, 3, 3, 1000, 0, 1100), 0);
    // conv2d+relu on the pooled map, 3x3 pad 1 -> 3x3, 8-bit input
    layer(mk(0, 0, 1, 6, 3, 3, 1, 3, 1, 1, 3, 3, 1100, 3200, 1200), 0);
    // 8-bit conv 1x1 over an 8x8 map: one output word per cycle (back-pressure)
    layer(mk(0, 0, 0, 3, 8, 8, 1, 1, 1, 0, 8, 8, 0, 3300, 1300), 1);
    // 4-bit conv 3x3 pad 1 over 4x5, 2 groups
    layer(mk(0, 1, 1, 5, 4, 5, 2, 3, 1, 1, 4, 5, 0, 3500, 1500), 1);
    // dense, 2 bit, 3 groups -> one partial word
    layer(mk(0, 2, 1, 2, 1, 1, 3, 1, 1, 0, 1, 1, 0, 3400, 1400), 1);
    // LD_RG of a plain register returns what ST_RG wrote
    st_rg(REG_OUT_W, 32'h1234);
    ld_rg(REG_OUT_W, v);
    checks++; if (v != 32'h1234) failures++;
    checks++; if (violations != 0 || dma_err) failures++;
    checks++; if (n_cl == 0 || n_ld == 0 || n_st == 0) begin failures++; $display("FAIL instruction kinds"); end
    foreach (n_prec[i]) begin checks++; if (n_prec[i] == 0) begin failures++; $display("FAIL no prec %0d", i); end end
    checks++; if (n_stall == 0)   begin failures++; $display("FAIL no stall"); end
    checks++; if (n_pad == 0)     begin failures++; $display("FAIL no padding"); end
    checks++; if (n_pool == 0)    begin failures++; $display("FAIL no pool"); end
    checks++; if (n_partial == 0) begin failures++; $display("FAIL no partial word"); end
    $display("mechanisms: CL_RG=%0d LD_RG=%0d ST_RG=%0d stall=%0d pad=%0d pool=%0d partial=%0d prec8=%0d prec4=%0d prec2=%0d",
             n_cl, n_ld, n_st, n_stall, n_pad, n_pool, n_partial, n_prec[0], n_prec[1], n_prec[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
