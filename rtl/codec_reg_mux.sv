// codec_reg_mux: access multiplexer in front of the audio port interface
// registers, and the interrupt routing that goes with it.
//
// DmaEnable low (direct mode): the system bus owns the TX registers and
//   the codec interrupt goes straight to the DSP (dsp_codec_irq); the DSP
//   acknowledges it with the CodecIntAck bit of the control register.
// DmaEnable high (controller mode): the TX registers are written only by
//   the controller's WRITE2CODEC (the halfword read by the DMA-bus master);
//   the system bus can only read them. The codec interrupt goes to the
//   controller, and the controller's ClearCodecIrq acknowledges it.
// In both modes READFROMCODEC (codec_to_odb) replaces the DMA-bus write
// data by the selected codec register, zero-extended; the system bus and
// the controller read through separate ports, so neither waits.
// The mode rules follow the published control-register description; the
// zero extension and the separate read ports are this design's choices.
module codec_reg_mux (
  input  logic        dma_enable,
  // system bus side
  input  logic        bus_we,
  input  logic [2:0]  bus_sel,
  input  logic [15:0] bus_wdata,
  output logic [15:0] bus_rdata,
  // controller / DMA-bus master side
  input  logic        ctrl_we,
  input  logic [2:0]  ctrl_sel,
  input  logic        codec_to_odb,
  input  logic [31:0] ctrl_wdata,
  input  logic [31:0] odb_rdata,
  output logic [31:0] odb_wdata,
  // audio port interface register ports
  output logic        if_we,
  output logic [1:0]  if_wsel,
  output logic [15:0] if_wdata,
  output logic [2:0]  if_rsel_a,
  input  logic [15:0] if_rdata_a,
  output logic [2:0]  if_rsel_b,
  input  logic [15:0] if_rdata_b,
  // interrupts
  input  logic        codec_irq,
  input  logic        ctrl_reg_int_ack,
  input  logic        dma2codec_int_ack,
  output logic        codec_int_ack,
  output logic        codec2dma_irq,
  output logic        dsp_codec_irq
);
  always_comb begin
    if (dma_enable) begin
      if_we    = ctrl_we && !ctrl_sel[2];
      if_wsel  = ctrl_sel[1:0];
      if_wdata = odb_rdata[15:0];
    end else begin
      if_we    = bus_we && !bus_sel[2];
      if_wsel  = bus_sel[1:0];
      if_wdata = bus_wdata;
    end
  end

  assign if_rsel_a = bus_sel;
  assign bus_rdata = if_rdata_a;
  assign if_rsel_b = ctrl_sel;
  assign odb_wdata = codec_to_odb ? {16'h0000, if_rdata_b} : ctrl_wdata;

  assign codec2dma_irq = dma_enable && codec_irq;
  assign dsp_codec_irq = !dma_enable && codec_irq;
  assign codec_int_ack = dma_enable ? dma2codec_int_ack : ctrl_reg_int_ack;
endmodule
