// custom_insn_unit: executes the accelerator's custom RISC-V instructions.
//
// The core hands over an R-type instruction of the CUSTOM-0 opcode (0001011)
// together with the values of rs1 and rs2. Bits 14, 13 and 12 (xd, xs1, xs2)
// say whether rd is written and rs1/rs2 are read, and identify the operation:
//   CL_RG  xd=0 xs1=0 xs2=0 : clear all accelerator registers
//                             (AXI-Lite write to the CLEAR register)
//   LD_RG  xd=1 xs1=1 xs2=0 : rd <= register number rs1 (AXI-Lite read)
//   ST_RG  xd=0 xs1=1 xs2=1 : register number rs1 <= rs2 (AXI-Lite write)
// Register number n is the 32-bit register at byte address BASE + 4*n.
// Every accepted instruction returns one response (rsp_valid/rsp_ready);
// for LD_RG it carries the data. Other encodings get an error response
// without a bus access. One instruction at a time: req_ready is high only
// when idle.
// The field layout, the three instructions and the base address follow the
// design; the request/response handshake and ignoring func7 are choices of
// this implementation.
module custom_insn_unit
  import acc_pkg::*;
#(
  parameter logic [31:0] BASE = 32'h5000_0000
) (
  input  logic        clk,
  input  logic        rst_n,
  // from the core
  input  logic        req_valid,
  output logic        req_ready,
  input  logic [31:0] req_insn,
  input  logic [31:0] req_rs1,
  input  logic [31:0] req_rs2,
  output logic        rsp_valid,
  input  logic        rsp_ready,
  output logic [31:0] rsp_rdata,
  output logic        rsp_err,
  // AXI-Lite master
  output logic        m_awvalid,
  input  logic        m_awready,
  output logic [31:0] m_awaddr,
  output logic        m_wvalid,
  input  logic        m_wready,
  output logic [31:0] m_wdata,
  output logic [3:0]  m_wstrb,
  input  logic        m_bvalid,
  output logic        m_bready,
  input  logic [1:0]  m_bresp,
  output logic        m_arvalid,
  input  logic        m_arready,
  output logic [31:0] m_araddr,
  input  logic        m_rvalid,
  output logic        m_rready,
  input  logic [31:0] m_rdata,
  input  logic [1:0]  m_rresp
);

  localparam logic [6:0] OPC_CUSTOM0 = 7'b0001011;

  typedef enum logic [2:0] {I_IDLE, I_WRITE, I_BRESP, I_READ, I_RRESP, I_RSP} insn_state_e;
  typedef enum logic [1:0] {K_CL, K_LD, K_ST, K_BAD} insn_kind_e;

  insn_state_e st;
  logic        aw_done, w_done;
  insn_kind_e  kind;

  always_comb begin
    kind = K_BAD;
    if (req_insn[6:0] == OPC_CUSTOM0) begin
      case (req_insn[14:12])
        3'b000:  kind = K_CL;
        3'b110:  kind = K_LD;
        3'b011:  kind = K_ST;
        default: kind = K_BAD;
      endcase
    end
  end

  assign req_ready = (st == I_IDLE);
  assign m_awvalid = (st == I_WRITE) && !aw_done;
  assign m_wvalid  = (st == I_WRITE) && !w_done;
  assign m_wstrb   = 4'hF;
  assign m_bready  = (st == I_BRESP);
  assign m_arvalid = (st == I_READ);
  assign m_rready  = (st == I_RRESP);
  assign rsp_valid = (st == I_RSP);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= I_IDLE;
      aw_done   <= 1'b0;
      w_done    <= 1'b0;
      m_awaddr  <= '0;
      m_wdata   <= '0;
      m_araddr  <= '0;
      rsp_rdata <= '0;
      rsp_err   <= 1'b0;
    end else begin
      case (st)
        I_IDLE: if (req_valid) begin
          rsp_rdata <= '0;
          rsp_err   <= 1'b0;
          aw_done   <= 1'b0;
          w_done    <= 1'b0;
          case (kind)
            K_CL: begin
              m_awaddr <= BASE + 32'(REG_CLEAR);
              m_wdata  <= 32'd1;
              st       <= I_WRITE;
            end
            K_ST: begin
              m_awaddr <= BASE + {16'd0, req_rs1[13:0], 2'b00};
              m_wdata  <= req_rs2;
              st       <= I_WRITE;
            end
            K_LD: begin
              m_araddr <= BASE + {16'd0, req_rs1[13:0], 2'b00};
              st       <= I_READ;
            end
            default: begin
              rsp_err <= 1'b1;
              st      <= I_RSP;
            end
          endcase
        end
        I_WRITE: begin
          if (m_awvalid && m_awready) aw_done <= 1'b1;
          if (m_wvalid && m_wready)   w_done  <= 1'b1;
          if ((aw_done || m_awready) && (w_done || m_wready)) st <= I_BRESP;
        end
        I_BRESP: if (m_bvalid) begin
          rsp_err <= m_bresp[1];
          st      <= I_RSP;
        end
        I_READ: if (m_arready) st <= I_RRESP;
        I_RRESP: if (m_rvalid) begin
          rsp_rdata <= m_rdata;
          rsp_err   <= m_rresp[1];
          st        <= I_RSP;
        end
        I_RSP: if (rsp_ready) st <= I_IDLE;
        default: st <= I_IDLE;
      endcase
    end
  end

endmodule
