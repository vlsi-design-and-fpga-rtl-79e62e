// apc_pkg: types and constants shared by the buffered audio port design.
//
// Holds the controller's instruction format (four 4-bit fields: OPCODE,
// OPTIONS, REG1, REG2) and its 15 opcodes, the JUMP conditions, the two
// 16-entry operand tables (immediate "values" and logical "masks") that the
// OPTIONS field indexes, the bit layout of the User FPGA Control Register,
// the codec register numbering and the system-bus address map.
//
// Opcode numbers, field order, the register map addresses and the control
// register bit positions follow the published design. The contents of the
// value and mask tables, the JUMP condition codes, the bit positions inside
// the controller's own control register and the DSP interrupt-acknowledge
// bit (14) are this design's own choices.
package apc_pkg;

  // ---------------------------------------------------------------- ISA
  typedef enum logic [3:0] {
    OP_ADD        = 4'b0000,
    OP_SUB        = 4'b0001,
    OP_AND        = 4'b0010,
    OP_OR         = 4'b0011,
    OP_TESTEQZERO = 4'b0100,
    OP_MOVE       = 4'b0101,
    OP_MOVE_ADDR  = 4'b0110,
    OP_MOVE_CTRL  = 4'b0111,
    OP_READ       = 4'b1000,
    OP_WRITE      = 4'b1001,
    OP_WRITE2CODEC   = 4'b1010,
    OP_READFROMCODEC = 4'b1011,
    OP_JUMP       = 4'b1100,
    OP_CLRCODECIRQ = 4'b1101,
    OP_SENDIRQ2DSP = 4'b1110,
    OP_NOP        = 4'b1111   // unused code: executes as a no-operation
  } opcode_e;

  typedef struct packed {
    opcode_e    opcode;
    logic [3:0] options;
    logic [3:0] reg1;
    logic [3:0] reg2;
  } instr_t;

  // JUMP conditions carried in OPTIONS
  localparam logic [3:0] COND_ANYCASE = 4'h0;
  localparam logic [3:0] COND_IFTRUE  = 4'h1;
  localparam logic [3:0] COND_IFFALSE = 4'h2;

  // Immediate operands of ADD and SUB, selected by OPTIONS.
  localparam int unsigned VAL_ZERO = 0, VAL_ONE = 1, VAL_TWO = 2, VAL_FOUR = 3,
                          VAL_EIGHT = 4, VAL_TWELVE = 5, VAL_SIXTEEN = 6,
                          VAL_TWENTY = 7, VAL_0X100 = 10, VAL_COUNT1 = 11;
  function automatic logic [31:0] value_of(input logic [3:0] idx);
    case (idx)
      4'd0:  return 32'd0;
      4'd1:  return 32'd1;
      4'd2:  return 32'd2;
      4'd3:  return 32'd4;
      4'd4:  return 32'd8;
      4'd5:  return 32'd12;
      4'd6:  return 32'd16;
      4'd7:  return 32'd20;
      4'd8:  return 32'd24;
      4'd9:  return 32'd32;
      4'd10: return 32'h0000_0100;
      4'd11: return 32'h0001_0000;   // one unit of a descriptor's count field
      4'd12: return 32'd64;
      4'd13: return 32'd128;
      4'd14: return 32'd256 * 4;
      default: return 32'hFFFF_FFFF;
    endcase
  endfunction

  // Masks of AND and OR, selected by OPTIONS. Names refer to the buffer
  // descriptor status word: count[31:16], act[4], rdy[3], lst[2], lEn[1], rEn[0].
  localparam int unsigned MSK_REN = 0, MSK_LEN = 1, MSK_RLEN = 2, MSK_LST = 3,
                          MSK_RDY = 4, MSK_ACT = 5, MSK_COUNT = 6,
                          MSK_RDY_CLR = 7;
  function automatic logic [31:0] mask_of(input logic [3:0] idx);
    case (idx)
      4'd0:  return 32'h0000_0001;
      4'd1:  return 32'h0000_0002;
      4'd2:  return 32'h0000_0003;
      4'd3:  return 32'h0000_0004;
      4'd4:  return 32'h0000_0008;
      4'd5:  return 32'h0000_0010;
      4'd6:  return 32'hFFFF_0000;
      4'd7:  return 32'hFFFF_FFF7;
      4'd8:  return 32'h0000_FFFF;
      4'd9:  return 32'h0000_00FF;
      4'd10: return 32'hFFFF_FFFC;
      4'd11: return 32'hFFFF_FFEF;
      4'd12: return 32'h0000_FF00;
      4'd13: return 32'hFF00_0000;
      4'd14: return 32'h7FFF_FFFF;
      default: return 32'hFFFF_FFFF;
    endcase
  endfunction

  // ----------------------------------------------- codec register numbers
  // Index = (system-bus address - 0xD0000010) / 4
  localparam logic [2:0] CREG_TX_L = 3'd0, CREG_TX_R = 3'd1, CREG_TX_CMH = 3'd2,
                         CREG_TX_CML = 3'd3, CREG_RX_L = 3'd4, CREG_RX_R = 3'd5,
                         CREG_RX_CMH = 3'd6, CREG_RX_CML = 3'd7;

  // ------------------------------------------- User FPGA Control Register
  typedef struct packed {
    logic [16:0] unused31_15;
    logic        dma_int_ack;      // 14: DSP acknowledges the controller IRQ (self-clearing)
    logic        dma_int_enable;   // 13
    logic        dma_enable;       // 12
    logic        loopback;         // 11
    logic        master_slave;     // 10: 1 = interface drives SCLK/FSYNC
    logic        codec_dc;         // 9 : 1 = data mode, 0 = control mode
    logic        endianness;       // 8 : 1 = big endian
    logic [3:0]  dip_switches;     // 7..4: SCLK divider in control mode
    logic        unused3;
    logic        codec_int_reset_n;// 2 : drives the codec RESET pin
    logic        codec_int_enable; // 1
    logic        codec_int_ack;    // 0 : acknowledge codec IRQ (self-clearing)
  } fpga_ctrl_t;

  // Bits of the controller's own control register (dma_control)
  localparam int DMACTL_MEM_WE    = 0;  // program memory writable from the bus
  localparam int DMACTL_DEBUG_EN  = 1;  // debug mode: stop before each instruction
  localparam int DMACTL_DEBUG_STEP = 2; // rising edge: run one instruction

  // --------------------------------------------------- system bus map
  localparam logic [31:0] FPGA_BASE    = 32'hD000_0000;
  localparam logic [11:0] A_FPGA_CTRL  = 12'h000;
  localparam logic [11:0] A_DMA_CTRL   = 12'h004;
  localparam logic [11:0] A_DMA_ADDR   = 12'h008;
  localparam logic [11:0] A_DMA_STATUS = 12'h00C;
  localparam logic [11:0] A_CODEC_BASE = 12'h010;   // eight registers, 0x10..0x2C
  localparam logic [15:0] A_PROG_BASE  = 16'h1000;  // 256 x 16 bit, two bytes each

  // AHB encodings
  localparam logic [1:0] HTRANS_IDLE = 2'b00, HTRANS_NONSEQ = 2'b10;
  localparam logic [2:0] HSIZE_BYTE = 3'b000, HSIZE_HALF = 3'b001, HSIZE_WORD = 3'b010;
  localparam logic [1:0] HRESP_OKAY = 2'b00;

  // size code of the controller-to-ODB-master interface
  localparam logic [1:0] SZ_BYTE = 2'b00, SZ_HALF = 2'b01, SZ_WORD = 2'b10;

endpackage
