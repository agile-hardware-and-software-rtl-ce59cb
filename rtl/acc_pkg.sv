// acc_pkg: types and constants shared by the multi-precision accelerator.
//
// The accelerator computes with signed fixed-point operands of 8, 4 or 2 bits.
// Every datapath word is a row of 8-bit "PE lanes"; in 4-bit mode a lane holds
// two operands and in 2-bit mode four, packed little-endian (operand 0 in the
// least significant bits). The three widths are the ones the design supports;
// their encoding, the register map and the widths below are choices of this
// implementation.
package acc_pkg;

  // Operand precision of one accelerator run.
  typedef enum logic [1:0] {
    PREC_8 = 2'd0,
    PREC_4 = 2'd1,
    PREC_2 = 2'd2
  } prec_e;

  // Operation started by the CTRL register.
  typedef enum logic {
    OP_CONV = 1'b0,   // convolution or dense layer (dense = 1x1 conv on a 1x1 map)
    OP_POOL = 1'b1    // max pooling
  } op_e;

  localparam int unsigned LANE_W   = 8;   // bits per PE input lane
  localparam int unsigned SLICE_W  = 2;   // BSC slice width
  localparam int unsigned NSLICE   = LANE_W / SLICE_W;
  localparam int unsigned PE_OUT_W = 17;  // signed result of one PE
  localparam int unsigned ACC_W    = 32;  // accumulator width

  // Byte offsets of the control registers (window of 64 KiB at the
  // accelerator's base address 0x5000_0000).
  localparam logic [15:0] REG_CTRL      = 16'h0000; // W: [0] start, [1] op
  localparam logic [15:0] REG_STATUS    = 16'h0004; // R: [0] busy, [1] done
  localparam logic [15:0] REG_CFG       = 16'h0008; // [1:0] prec, [2] relu, [12:8] shift
  localparam logic [15:0] REG_IN_ADDR   = 16'h000C; // DRAM byte address of input tile
  localparam logic [15:0] REG_W_ADDR    = 16'h0010; // DRAM byte address of weights
  localparam logic [15:0] REG_OUT_ADDR  = 16'h0014; // DRAM byte address of output
  localparam logic [15:0] REG_IN_W      = 16'h0018; // input width (pixels)
  localparam logic [15:0] REG_IN_ROWS   = 16'h001C; // input rows held in the buffer
  localparam logic [15:0] REG_IN_ROW0   = 16'h0020; // global index of first held row
  localparam logic [15:0] REG_IN_GROUPS = 16'h0024; // input channel groups (words/pixel)
  localparam logic [15:0] REG_IN_GSTR   = 16'h0028; // DRAM bytes between channel groups
  localparam logic [15:0] REG_OUT_W     = 16'h002C; // output width
  localparam logic [15:0] REG_OUT_ROWS  = 16'h0030; // output rows of this run
  localparam logic [15:0] REG_OUT_ROW0  = 16'h0034; // global index of first output row
  localparam logic [15:0] REG_KSIZE     = 16'h0038; // kernel / pooling window size
  localparam logic [15:0] REG_STRIDE    = 16'h003C; // stride
  localparam logic [15:0] REG_PAD       = 16'h0040; // zero padding
  localparam logic [15:0] REG_CLEAR     = 16'h007C; // W: clear all registers
  localparam int unsigned NUM_REGS      = 32;

  // Run configuration handed from the register file to the controller.
  typedef struct packed {
    op_e         op;
    prec_e       prec;
    logic        relu;
    logic [4:0]  shift;
    logic [31:0] in_addr;
    logic [31:0] w_addr;
    logic [31:0] out_addr;
    logic [15:0] in_w;
    logic [15:0] in_rows;
    logic [15:0] in_row0;
    logic [15:0] in_groups;
    logic [31:0] in_gstride;
    logic [15:0] out_w;
    logic [15:0] out_rows;
    logic [15:0] out_row0;
    logic [3:0]  ksize;
    logic [3:0]  stride;
    logic [3:0]  pad;
  } acc_cfg_t;

  // Operand bits for a precision.
  function automatic int unsigned prec_bits(prec_e p);
    case (p)
      PREC_4:  return 4;
      PREC_2:  return 2;
      default: return 8;
    endcase
  endfunction

  // Operands per 8-bit PE lane.
  function automatic int unsigned prec_lanes(prec_e p);
    case (p)
      PREC_4:  return 2;
      PREC_2:  return 4;
      default: return 1;
    endcase
  endfunction

endpackage
