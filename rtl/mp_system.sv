// mp_system: accelerator side of the RISC-V multi-precision microprocessor.
//
// The RISC-V core (outside this module) issues the custom instructions
// CL_RG / LD_RG / ST_RG; custom_insn_unit turns each into an AXI-Lite access
// to the accelerator's control registers at 0x5000_0000, and the accelerator
// (mp_accel) reads and writes DRAM (0x4000_0000..0x4FFF_FFFF) by itself over
// its AXI4 (AXI-Full) master, which is brought out here to the memory system.
// Ports: the core's custom-instruction request/response, the AXI4 master to
// DRAM, and run status (busy, done pulse, stall, DMA error).
// Parameters are those of mp_accel; the 32x32 array is sized from the
// reported peak throughput.
module mp_system
  import acc_pkg::*;
#(
  parameter int unsigned T_IN       = 32,
  parameter int unsigned T_OUT      = 32,
  parameter int unsigned FB_DEPTH   = 4096,
  parameter int unsigned WB_DEPTH   = 1024,
  parameter logic [31:0] ACC_BASE   = 32'h5000_0000,
  localparam int unsigned DW        = T_IN * LANE_W
) (
  input  logic             clk,
  input  logic             rst_n,
  // custom instruction port from the core
  input  logic             req_valid,
  output logic             req_ready,
  input  logic [31:0]      req_insn,
  input  logic [31:0]      req_rs1,
  input  logic [31:0]      req_rs2,
  output logic             rsp_valid,
  input  logic             rsp_ready,
  output logic [31:0]      rsp_rdata,
  output logic             rsp_err,
  // AXI4 master to DRAM
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
  output logic             busy,
  output logic             done,
  output logic             stall,
  output logic             dma_err
);

  logic        l_awvalid, l_awready, l_wvalid, l_wready, l_bvalid, l_bready;
  logic        l_arvalid, l_arready, l_rvalid, l_rready;
  logic [31:0] l_awaddr, l_wdata, l_araddr, l_rdata;
  logic [3:0]  l_wstrb;
  logic [1:0]  l_bresp, l_rresp;

  custom_insn_unit #(.BASE(ACC_BASE)) u_insn (
    .clk, .rst_n,
    .req_valid, .req_ready, .req_insn, .req_rs1, .req_rs2,
    .rsp_valid, .rsp_ready, .rsp_rdata, .rsp_err,
    .m_awvalid(l_awvalid), .m_awready(l_awready), .m_awaddr(l_awaddr),
    .m_wvalid(l_wvalid), .m_wready(l_wready), .m_wdata(l_wdata), .m_wstrb(l_wstrb),
    .m_bvalid(l_bvalid), .m_bready(l_bready), .m_bresp(l_bresp),
    .m_arvalid(l_arvalid), .m_arready(l_arready), .m_araddr(l_araddr),
    .m_rvalid(l_rvalid), .m_rready(l_rready), .m_rdata(l_rdata), .m_rresp(l_rresp)
  );

  mp_accel #(.T_IN(T_IN), .T_OUT(T_OUT), .FB_DEPTH(FB_DEPTH), .WB_DEPTH(WB_DEPTH)) u_accel (
    .clk, .rst_n,
    .s_awvalid(l_awvalid), .s_awready(l_awready), .s_awaddr(l_awaddr),
    .s_wvalid(l_wvalid), .s_wready(l_wready), .s_wdata(l_wdata), .s_wstrb(l_wstrb),
    .s_bvalid(l_bvalid), .s_bready(l_bready), .s_bresp(l_bresp),
    .s_arvalid(l_arvalid), .s_arready(l_arready), .s_araddr(l_araddr),
    .s_rvalid(l_rvalid), .s_rready(l_rready), .s_rdata(l_rdata), .s_rresp(l_rresp),
    .m_arvalid, .m_arready, .m_araddr, .m_arlen, .m_arsize, .m_arburst,
    .m_rvalid, .m_rready, .m_rdata, .m_rresp, .m_rlast,
    .m_awvalid, .m_awready, .m_awaddr, .m_awlen, .m_awsize, .m_awburst,
    .m_wvalid, .m_wready, .m_wdata, .m_wstrb, .m_wlast,
    .m_bvalid, .m_bready, .m_bresp,
    .busy_o(busy), .done_o(done), .stall_o(stall), .dma_err_o(dma_err)
  );

endmodule
