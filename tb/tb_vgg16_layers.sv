// tb_vgg16_layers: VGG16-sized layers on the design at its default size
// (32x32 PE array, 4096-word feature buffer, 1024-word weight banks),
// programmed through CL_RG / ST_RG / LD_RG like software would:
//   - the first dense layer of VGG16 (25088 inputs = 784 channel groups at
//     8 bit) for one group of 32 outputs, and the same layer at 4 bit
//     (392 groups) as in the mixed-precision network;
//   - a 14x14, 512-channel 3x3 conv (the last VGG16 stage) at 8 bit, split
//     into two row bands: the top one with padding rows and a middle one
//     whose neighbour rows come from DRAM;
//   - a 56-wide, 256-channel 3x3 conv at 2 bit and 4 bit on a 4-row map.
// Every output word is compared with the reference. For the conv layers the
// compute phase is timed from the first to the last buffer read: at 214 MHz
// it must reach at least 95 % of the array's peak (1024/2048/4096 MAC per
// cycle at 8/4/2 bit), which is above the 429/810/1633 GOPS measured for
// single conv operators on the original FPGA system.
module tb_vgg16_layers;
  import acc_pkg::*;
  import tb_ref_pkg::*;

  localparam int T = 32, DW = T * 8, BY = DW / 8, WORDS = 32768;
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
  int n_cl = 0, n_ld = 0, n_st = 0;

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
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
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

  int first_iss, last_iss, n_iss, cyc;
  bit timing;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (timing && dut.u_accel.iss_valid) begin
      if (n_iss == 0) first_iss = cyc;
      last_iss = cyc;
      n_iss++;
    end
  end

  task automatic layer(string name, run_t r, bit check_rate);
    logic [255:0] snap [];
    logic [255:0] exp [$];
    logic [31:0] st;
    real macs, gops, peak;
    for (int i = 0; i < r.groups * r.h * r.w; i++) mem.mem[r.in_word + i] = DW'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
    for (int i = 0; i < r.groups * r.k * r.k * r.t; i++) mem.mem[r.w_word + i] = DW'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
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
    n_iss = 0; timing = 1;
    st_rg(REG_CTRL, 32'h1);
    do ld_rg(REG_STATUS, st); while (st[1] != 1'b1);
    timing = 0;
    foreach (exp[i]) begin
      checks++;
      if (mem.mem[r.out_word + i] !== exp[i][DW-1:0]) begin
        failures++;
        if (failures < 12) $display("FAIL %s word %0d got %h exp %h", name, i, mem.mem[r.out_word + i], exp[i][DW-1:0]);
      end
    end
    // issued steps: every (pixel, group, ky, kx); each is T*T*(8/b) MACs
    checks++;
    if (n_iss != r.out_rows * r.out_w * r.groups * r.k * r.k) begin
      failures++; $display("FAIL %s issued %0d steps", name, n_iss);
    end
    macs = real'(n_iss) * T * T * (8 / bits_of(r.prec));
    gops = 2.0 * macs / real'(last_iss - first_iss + 1) * 0.214;
    peak = 2.0 * T * T * (8 / bits_of(r.prec)) * 0.214;
    $display("%s: %0d words checked, %0d steps in %0d cycles, %0.1f GOPS at 214 MHz (peak %0.1f)",
             name, exp.size(), n_iss, last_iss - first_iss + 1, gops, peak);
    if (check_rate) begin
      checks++;
      if (gops < 0.95 * peak) begin failures++; $display("FAIL %s below 95%% of peak", name); end
    end
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
    req_valid = 0; req_insn = 0; req_rs1 = 0; req_rs2 = 0; rsp_ready = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // fc6, 8 bit: 25088 inputs (784 groups), 32 outputs; weights at word 0
    layer("fc6 8-bit", mk(0, 0, 1, 9, 1, 1, 784, 1, 1, 0, 1, 1, 26000, 0, 31000), 0);
    // fc6, 4 bit: 392 groups
    layer("fc6 4-bit", mk(0, 1, 1, 8, 1, 1, 392, 1, 1, 0, 1, 1, 26000, 0, 31000), 0);
    // 3x3 conv, 512 channels (16 groups), 14x14, 8 bit: output rows 0-3
    // from input rows 0-4 (row -1 is padding)
    begin
      run_t r;
      r = mk(0, 0, 1, 9, 14, 14, 16, 3, 1, 1, 4, 14, 26000, 0, 31000);
      r.in_rows = 5;
      layer("conv5 8-bit rows 0-3", r, 1);
      // output rows 5-8 from input rows 4-9, all real rows
      r.out_row0 = 5; r.in_row0 = 4; r.in_rows = 6; r.out_word = 31100;
      layer("conv5 8-bit rows 5-8", r, 1);
    end
    // 3x3 conv, 256 channels at 2 bit (2 groups) and 4 bit (4 groups), 4x56
    layer("conv 2-bit 56 wide", mk(0, 2, 1, 7, 4, 56, 2, 3, 1, 1, 4, 56, 26000, 0, 31000), 1);
    layer("conv 4-bit 56 wide", mk(0, 1, 1, 8, 4, 56, 4, 3, 1, 1, 4, 56, 26000, 0, 31000), 1);
    checks++; if (violations != 0 || dma_err) begin failures++; $display("FAIL bus errors"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
