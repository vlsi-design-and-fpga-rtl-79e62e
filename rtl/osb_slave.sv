// osb_slave: AHB slave and address decoder for the Off-Chip System Bus.
//
// Gives the DSP access to the User FPGA's part of the memory map
// (base 0xD0000000, offsets below):
//   0x000 FPGA Control Register     32 bit  RW  (fpga_ctrl_reg, outside)
//   0x004 controller control        32 bit  RW  (held here, dma_control)
//   0x008 controller address        32 bit  RW  (held here, dma_address)
//   0x00C controller status         32 bit  R
//   0x010..0x01C codec TX L/R/CmdH/CmdL   16 bit RW (read-only while
//                                                    DmaEnable is set)
//   0x020..0x02C codec RX L/R/CmdH/CmdL   16 bit R
//   0x1000..0x11FE controller program memory, 256 x 16 bit, 2 bytes each
// Anything else reads as 0 and ignores writes.
//
// AHB timing: the address phase is registered; registers are written and
// read in the following data phase with no wait state. Program-memory
// reads take one wait state (HREADYOUT low for one cycle) because the RAM
// answers one clock after its address. HRESP is always OKAY.
//
// Endianness: a 32-bit access uses bits [15:0] for a 16-bit register. A
// 16-bit write takes its halfword from the byte lanes that the bus
// endianness (endianness = 1: big endian) assigns to address bit 1.
// Reads of 16-bit locations return the halfword on both halves of HRDATA,
// which is right for either endianness.
// Published: the map, register widths and access rights, AHB compliance
// and the endianness handling. This design's: the wait state, the
// replicated read data and the behaviour of unmapped addresses.
module osb_slave
  import apc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // AHB slave
  input  logic        hsel,
  input  logic [31:0] haddr,
  input  logic [1:0]  htrans,
  input  logic        hwrite,
  input  logic [2:0]  hsize,
  input  logic [31:0] hwdata,
  input  logic        hready,
  output logic [31:0] hrdata,
  output logic        hreadyout,
  output logic [1:0]  hresp,
  // configuration
  input  logic        endianness,
  input  logic        dma_enable,
  // FPGA control register
  output logic        ctrl_we,
  output logic [31:0] ctrl_wdata,
  input  logic [31:0] ctrl_rdata,
  // controller registers
  output logic [31:0] dma_control,
  output logic [31:0] dma_address,
  input  logic [31:0] dma_status,
  // codec registers
  output logic [2:0]  codec_sel,
  output logic        codec_we,
  output logic [15:0] codec_wdata,
  input  logic [15:0] codec_rdata,
  // program memory
  output logic [7:0]  rom_address,
  output logic        rom_we,
  output logic [15:0] rom_data,
  input  logic [15:0] rom_rdata
);
  typedef enum logic [1:0] {S_IDLE, S_DATA, S_ROM_WAIT} state_e;
  state_e      state;
  logic [15:0] a_q;      // offset inside the FPGA window
  logic        write_q;
  logic [2:0]  size_q;

  logic take;
  assign take = hsel && hready && htrans[1];

  // a ROM read needs one more cycle
  logic rom_q, rom_read_now;
  assign rom_q        = (a_q[15:12] == A_PROG_BASE[15:12]);
  assign rom_read_now = (state == S_DATA) && rom_q && !write_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      a_q     <= '0;
      write_q <= 1'b0;
      size_q  <= HSIZE_WORD;
    end else begin
      if (state == S_DATA && rom_read_now) begin
        state <= S_ROM_WAIT;
      end else if (hreadyout || state == S_IDLE) begin
        if (take) begin
          state   <= S_DATA;
          a_q     <= haddr[15:0];
          write_q <= hwrite;
          size_q  <= hsize;
        end else begin
          state <= S_IDLE;
        end
      end
    end
  end

  assign hreadyout = !rom_read_now;
  assign hresp     = HRESP_OKAY;

  // halfword written on the bus
  logic [15:0] wr16;
  always_comb begin
    if (size_q != HSIZE_HALF)           wr16 = hwdata[15:0];
    else if (a_q[1] ^ endianness)       wr16 = hwdata[31:16];
    else                                wr16 = hwdata[15:0];
  end

  logic data_write;
  assign data_write = (state == S_DATA) && write_q;

  logic is_reg, is_codec;
  assign is_reg   = (a_q[15:12] == 4'h0) && (a_q[11:6] == 6'd0);
  assign is_codec = is_reg && (a_q[5:2] >= 4'd4) && (a_q[5:2] <= 4'd11);

  assign ctrl_we    = data_write && is_reg && (a_q[5:2] == 4'd0);
  assign ctrl_wdata = hwdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dma_control <= '0;
      dma_address <= '0;
    end else if (data_write && is_reg) begin
      if (a_q[5:2] == 4'd1) dma_control <= hwdata;
      if (a_q[5:2] == 4'd2) dma_address <= hwdata;
    end
  end

  assign codec_sel   = 3'(a_q[5:2] - 4'd4);
  assign codec_we    = data_write && is_codec && !a_q[5] && !dma_enable;
  assign codec_wdata = wr16;

  assign rom_address = a_q[8:1];
  assign rom_we      = data_write && rom_q;
  assign rom_data    = wr16;

  always_comb begin
    hrdata = '0;
    if (state == S_ROM_WAIT)
      hrdata = {rom_rdata, rom_rdata};
    else if (state == S_DATA && !write_q && is_reg) begin
      unique case (a_q[5:2])
        4'd0:    hrdata = ctrl_rdata;
        4'd1:    hrdata = dma_control;
        4'd2:    hrdata = dma_address;
        4'd3:    hrdata = dma_status;
        4'd4, 4'd5, 4'd6, 4'd7, 4'd8, 4'd9, 4'd10, 4'd11:
                 hrdata = {codec_rdata, codec_rdata};
        default: hrdata = '0;
      endcase
    end
  end
endmodule
