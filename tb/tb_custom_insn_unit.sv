// tb_custom_insn_unit: issues ST_RG, LD_RG and CL_RG instructions (CUSTOM-0,
// xd/xs1/xs2 set as for each instruction) and a bad opcode; a small AXI-Lite
// register slave in the testbench answers with random delays. Checks the
// bus address (0x5000_0000 + 4*rs1), the written data, the loaded rd value,
// the clear and the error response.
module tb_custom_insn_unit;
  logic clk = 0, rst_n = 0;
  logic req_valid, req_ready, rsp_valid, rsp_ready, rsp_err;
  logic [31:0] req_insn, req_rs1, req_rs2, rsp_rdata;
  logic m_awvalid, m_awready, m_wvalid, m_wready, m_bvalid, m_bready;
  logic m_arvalid, m_arready, m_rvalid, m_rready;
  logic [31:0] m_awaddr, m_wdata, m_araddr, m_rdata;
  logic [3:0]  m_wstrb;
  logic [1:0]  m_bresp, m_rresp;
  int checks = 0, failures = 0;

  custom_insn_unit dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // AXI-Lite slave: 32 registers at 0x5000_0000, offset 0x7C clears all
  logic [31:0] regs [32];
  logic        aw_seen, w_seen;
  logic [31:0] aw_q, w_q;
  int          bad_addr = 0;
  assign m_awready = !aw_seen && ($urandom_range(0, 2) != 0);
  assign m_wready  = !w_seen && ($urandom_range(0, 2) != 0);
  assign m_arready = !m_rvalid;
  assign m_bresp = 2'b00;
  assign m_rresp = 2'b00;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aw_seen <= 0; w_seen <= 0; m_bvalid <= 0; m_rvalid <= 0; m_rdata <= 0;
      for (int i = 0; i < 32; i++) regs[i] <= 32'(i) * 32'h0101_0101;
    end else begin
      if (m_awvalid && m_awready) begin aw_seen <= 1; aw_q <= m_awaddr; end
      if (m_wvalid && m_wready)   begin w_seen <= 1;  w_q <= m_wdata; end
      if (aw_seen && w_seen && !m_bvalid) begin
        if (aw_q[31:16] != 16'h5000) bad_addr++;
        if (aw_q[15:0] == 16'h007C) for (int i = 0; i < 32; i++) regs[i] <= 0;
        else regs[aw_q[6:2]] <= w_q;
        m_bvalid <= 1; aw_seen <= 0; w_seen <= 0;
      end
      if (m_bvalid && m_bready) m_bvalid <= 0;
      if (m_arvalid && m_arready) begin
        if (m_araddr[31:16] != 16'h5000) bad_addr++;
        m_rvalid <= 1; m_rdata <= regs[m_araddr[6:2]];
      end
      if (m_rvalid && m_rready) m_rvalid <= 0;
    end
  end

  function automatic logic [31:0] insn(logic xd, logic xs1, logic xs2, logic [4:0] rd, logic [4:0] rs1, logic [4:0] rs2);
    return {7'd0, rs2, rs1, xd, xs1, xs2, rd, 7'b0001011};
  endfunction

  task automatic exec(logic [31:0] i, logic [31:0] a, logic [31:0] b, output logic [31:0] r, output logic e);
    @(negedge clk);
    req_valid = 1; req_insn = i; req_rs1 = a; req_rs2 = b;
    do @(posedge clk); while (!req_ready);
    @(negedge clk) req_valid = 0;
    rsp_ready = 1;
    while (!rsp_valid) @(negedge clk);
    r = rsp_rdata; e = rsp_err;
    @(negedge clk) rsp_ready = 0;
  endtask

  logic [31:0] r, shadow [32];
  logic e;
  initial begin
    req_valid = 0; req_insn = 0; req_rs1 = 0; req_rs2 = 0; rsp_ready = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 31; i++) shadow[i] = 32'(i) * 32'h0101_0101;
    for (int k = 0; k < 40; k++) begin
      int n;
      logic [31:0] v;
      n = $urandom_range(0, 30); v = $urandom;
      exec(insn(0, 1, 1, 0, 10, 11), 32'(n), v, r, e);   // ST_RG
      shadow[n] = v;
      checks++; if (e) failures++;
      checks++; if (regs[n] !== v) begin failures++; $display("FAIL st %0d", n); end
      n = $urandom_range(0, 30);
      exec(insn(1, 1, 0, 5, 10, 0), 32'(n), 0, r, e);    // LD_RG
      checks++; if (r !== shadow[n]) begin failures++; $display("FAIL ld %0d got %h exp %h", n, r, shadow[n]); end
    end
    exec(insn(0, 0, 0, 0, 0, 0), 0, 0, r, e);              // CL_RG
    for (int n = 0; n < 31; n++) begin
      checks++; if (regs[n] !== 0) failures++;
    end
    exec(32'h0000_0033, 0, 0, r, e);                       // not CUSTOM-0
    checks++; if (!e) failures++;
    exec(insn(1, 0, 1, 0, 0, 0), 0, 0, r, e);              // undefined xd/xs pattern
    checks++; if (!e) failures++;
    checks++; if (bad_addr != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
