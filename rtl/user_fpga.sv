// user_fpga: buffered serial audio port, top level of the User FPGA.
//
// Connects a stereo audio codec's serial port to a DSP so that the DSP is
// interrupted once per frame of samples rather than once per sample:
//
//   codec pins <-> codec_if <-> codec_reg_mux <-> osb_slave <-> system bus (DSP)
//                     |              ^
//                     | irq          | codec data
//                     v              v
//                    apc (controller) <-> odb_master <-> DMA bus (DSP SRAM)
//
// The DSP configures everything over the system bus (AHB slave port osb_*):
// the User FPGA Control Register, the controller's control and address
// registers, the controller program and, in direct mode, the codec TX
// registers. With DmaEnable set, every codec word interrupts the
// controller, which copies the new samples between the codec registers
// and the SRAM buffers over the DMA bus (AHB master port odb_*) and
// raises dsp_dma_irq when a buffer is complete. With DmaEnable clear, the
// codec interrupt goes straight to the DSP on dsp_codec_irq, as in a
// sample-by-sample system.
//
// One clock (the system-bus clock, also used for the DMA bus) and one
// active-low asynchronous reset. The codec's SCLK/FSYNC are sampled with
// this clock. Pads: *_in / *_out / *_oe of SCLK and FSYNC form the two
// bidirectional codec pins; odb_timeout pulses when a DMA-bus request is
// abandoned after the master's time-out.
module user_fpga
  import apc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // Off-Chip System Bus, AHB slave
  input  logic        osb_hsel,
  input  logic [31:0] osb_haddr,
  input  logic [1:0]  osb_htrans,
  input  logic        osb_hwrite,
  input  logic [2:0]  osb_hsize,
  input  logic [31:0] osb_hwdata,
  input  logic        osb_hready,
  output logic [31:0] osb_hrdata,
  output logic        osb_hreadyout,
  output logic [1:0]  osb_hresp,
  // Off-Chip DMA Bus, AHB master
  output logic        odb_hbusreq,
  output logic        odb_hlock,
  input  logic        odb_hgrant,
  output logic [31:0] odb_haddr,
  output logic [1:0]  odb_htrans,
  output logic        odb_hwrite,
  output logic [2:0]  odb_hsize,
  output logic [2:0]  odb_hburst,
  output logic [31:0] odb_hwdata,
  input  logic [31:0] odb_hrdata,
  input  logic        odb_hready,
  input  logic [1:0]  odb_hresp,
  output logic        odb_timeout,
  // codec serial port
  input  logic        codec_sclk_in,
  output logic        codec_sclk_out,
  output logic        codec_sclk_oe,
  input  logic        codec_fsync_in,
  output logic        codec_fsync_out,
  output logic        codec_fsync_oe,
  input  logic        codec_sdtx,
  output logic        codec_sdrx,
  output logic        codec_dc,
  output logic        codec_reset_n,
  // interrupts to the DSP
  output logic        dsp_codec_irq,
  output logic        dsp_dma_irq
);
  fpga_ctrl_t  ctrl;
  logic [31:0] ctrl_rdata, ctrl_wdata;
  logic        ctrl_we;

  logic [31:0] dma_control, dma_address, dma_status;
  logic [2:0]  bus_codec_sel;
  logic        bus_codec_we;
  logic [15:0] bus_codec_wdata, bus_codec_rdata;
  logic [7:0]  rom_address;
  logic        rom_we;
  logic [15:0] rom_data, rom_rdata;

  logic        re, we, ok;
  logic [1:0]  size;
  logic [31:0] odb_address, ctrl_wdata_odb, odb_wdata, odb_rdata;
  logic [2:0]  ctrl_codec_sel;
  logic        ctrl_codec_we, codec_to_odb;
  logic        codec2dma_irq, dma2codec_int_ack;

  logic        if_we;
  logic [1:0]  if_wsel;
  logic [15:0] if_wdata, if_rdata_a, if_rdata_b;
  logic [2:0]  if_rsel_a, if_rsel_b;
  logic        codec_irq, codec_int_ack;

  osb_slave u_osb_slave (
    .clk, .rst_n,
    .hsel(osb_hsel), .haddr(osb_haddr), .htrans(osb_htrans), .hwrite(osb_hwrite),
    .hsize(osb_hsize), .hwdata(osb_hwdata), .hready(osb_hready),
    .hrdata(osb_hrdata), .hreadyout(osb_hreadyout), .hresp(osb_hresp),
    .endianness(ctrl.endianness), .dma_enable(ctrl.dma_enable),
    .ctrl_we, .ctrl_wdata, .ctrl_rdata,
    .dma_control, .dma_address, .dma_status,
    .codec_sel(bus_codec_sel), .codec_we(bus_codec_we),
    .codec_wdata(bus_codec_wdata), .codec_rdata(bus_codec_rdata),
    .rom_address, .rom_we, .rom_data, .rom_rdata
  );

  fpga_ctrl_reg u_ctrl_reg (
    .clk, .rst_n, .we(ctrl_we), .wdata(ctrl_wdata), .ctrl, .rdata(ctrl_rdata)
  );

  apc u_apc (
    .clk, .rst_n,
    .dma_control, .dma_address, .dma_status,
    .rom_address, .rom_we, .rom_data, .rom_rdata,
    .dma_enable    (ctrl.dma_enable),
    .codec_int_en  (ctrl.codec_int_enable),
    .dma_int_enable(ctrl.dma_int_enable),
    .dsp_int_ack   (ctrl.dma_int_ack),
    .dma_irq       (dsp_dma_irq),
    .re, .we, .size, .ok, .odb_address,
    .wdata(ctrl_wdata_odb), .rdata(odb_rdata),
    .codec_reg_sel(ctrl_codec_sel), .codec_reg_we(ctrl_codec_we), .codec_to_odb,
    .codec2dma_irq, .dma2codec_int_ack
  );

  odb_master u_odb_master (
    .clk, .rst_n, .endianness(ctrl.endianness),
    .re, .we, .size, .address(odb_address), .wdata(odb_wdata),
    .ok, .rdata(odb_rdata), .timeout(odb_timeout),
    .hbusreq(odb_hbusreq), .hlock(odb_hlock), .hgrant(odb_hgrant),
    .haddr(odb_haddr), .htrans(odb_htrans), .hwrite(odb_hwrite),
    .hsize(odb_hsize), .hburst(odb_hburst), .hwdata(odb_hwdata),
    .hrdata(odb_hrdata), .hready(odb_hready), .hresp(odb_hresp)
  );

  codec_reg_mux u_codec_mux (
    .dma_enable(ctrl.dma_enable),
    .bus_we(bus_codec_we), .bus_sel(bus_codec_sel),
    .bus_wdata(bus_codec_wdata), .bus_rdata(bus_codec_rdata),
    .ctrl_we(ctrl_codec_we), .ctrl_sel(ctrl_codec_sel), .codec_to_odb,
    .ctrl_wdata(ctrl_wdata_odb), .odb_rdata, .odb_wdata,
    .if_we, .if_wsel, .if_wdata, .if_rsel_a, .if_rdata_a, .if_rsel_b, .if_rdata_b,
    .codec_irq, .ctrl_reg_int_ack(ctrl.codec_int_ack), .dma2codec_int_ack,
    .codec_int_ack, .codec2dma_irq, .dsp_codec_irq
  );

  codec_if u_codec_if (
    .clk, .rst_n,
    .sclk_in(codec_sclk_in), .sclk_out(codec_sclk_out), .sclk_oe(codec_sclk_oe),
    .fsync_in(codec_fsync_in), .fsync_out(codec_fsync_out), .fsync_oe(codec_fsync_oe),
    .sdtx(codec_sdtx), .sdrx(codec_sdrx), .dc(codec_dc), .codec_reset_n,
    .codec_dc(ctrl.codec_dc), .master_slave(ctrl.master_slave),
    .loopback(ctrl.loopback), .dip_switches(ctrl.dip_switches),
    .codec_int_reset_n(ctrl.codec_int_reset_n),
    .codec_int_en(ctrl.codec_int_enable), .codec_int_ack,
    .codec_irq,
    .reg_we(if_we), .reg_wsel(if_wsel), .reg_wdata(if_wdata),
    .rsel_a(if_rsel_a), .rdata_a(if_rdata_a),
    .rsel_b(if_rsel_b), .rdata_b(if_rdata_b)
  );
endmodule
