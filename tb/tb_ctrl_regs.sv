// tb_ctrl_regs: AXI-Lite writes and reads of every register, byte strobes,
// the one-cycle start pulse from CTRL, the STATUS busy/done bits, the CLEAR
// register and the configuration fields decoded from the registers.
module tb_ctrl_regs;
  import acc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic s_awvalid, s_awready, s_wvalid, s_wready, s_bvalid, s_bready;
  logic s_arvalid, s_arready, s_rvalid, s_rready;
  logic [31:0] s_awaddr, s_wdata, s_araddr, s_rdata;
  logic [3:0]  s_wstrb;
  logic [1:0]  s_bresp, s_rresp;
  acc_cfg_t cfg;
  logic start, busy, done;
  int checks = 0, failures = 0, starts = 0;

  ctrl_regs dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && start) starts++;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(logic [15:0] a, logic [31:0] d, logic [3:0] strb = 4'hF);
    @(negedge clk);
    s_awvalid = 1; s_wvalid = 1; s_awaddr = 32'h5000_0000 | 32'(a); s_wdata = d; s_wstrb = strb;
    do @(posedge clk); while (!s_awready);
    @(negedge clk);
    s_awvalid = 0; s_wvalid = 0;
    s_bready = 1;
    while (!s_bvalid) @(negedge clk);
    @(negedge clk) s_bready = 0;
  endtask

  task automatic rd(logic [15:0] a, output logic [31:0] d);
    @(negedge clk);
    s_arvalid = 1; s_araddr = 32'h5000_0000 | 32'(a);
    do @(posedge clk); while (!s_arready);
    @(negedge clk);
    s_arvalid = 0; s_rready = 1;
    while (!s_rvalid) @(negedge clk);
    d = s_rdata;
    @(negedge clk) s_rready = 0;
  endtask

  task automatic expect_eq(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  logic [31:0] d, vals [18];
  initial begin
    s_awvalid = 0; s_wvalid = 0; s_bready = 0; s_arvalid = 0; s_rready = 0;
    s_awaddr = 0; s_wdata = 0; s_wstrb = 0; s_araddr = 0; busy = 0; done = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 2; i < 17; i++) begin
      vals[i] = $urandom;
      wr(16'(i * 4), vals[i]);
    end
    for (int i = 2; i < 17; i++) begin
      rd(16'(i * 4), d);
      expect_eq("readback", d, vals[i]);
    end
    expect_eq("in_addr", cfg.in_addr, vals[3]);
    expect_eq("out_addr", cfg.out_addr, vals[5]);
    expect_eq("prec", 32'(cfg.prec), 32'(vals[2][1:0]));
    expect_eq("shift", 32'(cfg.shift), 32'(vals[2][12:8]));
    expect_eq("ksize", 32'(cfg.ksize), 32'(vals[14][3:0]));
    expect_eq("pad", 32'(cfg.pad), 32'(vals[16][3:0]));
    // byte strobe
    wr(REG_OUT_W, 32'hAABBCCDD, 4'b0010);
    rd(REG_OUT_W, d);
    expect_eq("strobe", d, {vals[11][31:16], 8'hCC, vals[11][7:0]});
    // start pulse and status
    expect_eq("starts0", 32'(starts), 0);
    wr(REG_CTRL, 32'h3);
    expect_eq("start pulse", 32'(starts), 1);
    expect_eq("op", 32'(cfg.op), 32'(OP_POOL));
    busy = 1;
    rd(REG_STATUS, d);
    expect_eq("busy", d, 32'h1);
    wr(REG_CTRL, 32'h1);
    expect_eq("no start while busy", 32'(starts), 1);
    @(negedge clk) begin busy = 0; done = 1; end
    @(negedge clk) done = 0;
    rd(REG_STATUS, d);
    expect_eq("done", d, 32'h2);
    // clear
    wr(REG_CLEAR, 32'h1);
    rd(REG_IN_ADDR, d);
    expect_eq("cleared", d, 0);
    rd(REG_STATUS, d);
    expect_eq("done cleared", d, 0);
    expect_eq("cfg cleared", 32'(cfg.in_w), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
