// fpga_ctrl_reg: the User FPGA Control Register (system-bus address
// 0xD0000000).
//
// A 32-bit register written as a whole by the DSP (we, wdata) and read back
// on rdata. Its fields (apc_pkg::fpga_ctrl_t) configure the audio port
// interface (interrupt enable, codec reset, control-mode clock divider,
// control/data mode, master/slave, loopback), the bus endianness and the
// controller (DmaEnable, DmaIntEnable). The two acknowledge bits, bit 0
// CodecIntAck and bit 14 DmaIntAck, are pulses: they read as 1 for the one
// cycle after the write and then clear themselves, so a single write
// acknowledges a single interrupt.
// Bit positions 0-13 follow the published register table; bit 14, the
// self-clearing behaviour and the all-zero reset value (codec held in
// reset, control mode, controller off) are this design's choices.
module fpga_ctrl_reg
  import apc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        we,
  input  logic [31:0] wdata,
  output fpga_ctrl_t  ctrl,
  output logic [31:0] rdata
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl <= '0;
    end else if (we) begin
      ctrl <= fpga_ctrl_t'(wdata);
      ctrl.unused31_15 <= '0;
      ctrl.unused3     <= 1'b0;
    end else begin
      ctrl.codec_int_ack <= 1'b0;
      ctrl.dma_int_ack   <= 1'b0;
    end
  end
  assign rdata = 32'(ctrl);
endmodule
