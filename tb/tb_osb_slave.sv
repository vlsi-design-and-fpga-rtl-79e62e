// tb_osb_slave: an AHB master bus-functional model runs single transfers
// against the system-bus slave, with small models of the control
// register, codec registers and program RAM behind it. Checks every
// register of the map, 16-bit writes on the right byte lanes for both
// endiannesses, read-only RX registers, TX registers locked while the
// controller owns them, program RAM write/read with exactly one wait
// state, and zero wait states for register accesses.
module tb_osb_slave;
  import apc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic        hsel, hwrite, hreadyout, endianness, dma_enable;
  logic [31:0] haddr, hwdata, hrdata;
  logic [1:0]  htrans, hresp;
  logic [2:0]  hsize;
  logic        ctrl_we, codec_we, rom_we;
  logic [31:0] ctrl_wdata, ctrl_q, dma_control, dma_address, dma_status;
  logic [2:0]  codec_sel;
  logic [15:0] codec_wdata, codec_rdata, rom_data, rom_rdata;
  logic [7:0]  rom_address;

  osb_slave dut (.clk, .rst_n, .hsel, .haddr, .htrans, .hwrite, .hsize, .hwdata,
                 .hready(hreadyout), .hrdata, .hreadyout, .hresp, .endianness, .dma_enable,
                 .ctrl_we, .ctrl_wdata, .ctrl_rdata(ctrl_q), .dma_control, .dma_address,
                 .dma_status, .codec_sel, .codec_we, .codec_wdata, .codec_rdata,
                 .rom_address, .rom_we, .rom_data, .rom_rdata);

  // models of what sits behind the slave
  logic [15:0] creg [8];
  logic [15:0] rom  [256];
  always_ff @(posedge clk) begin
    if (ctrl_we)  ctrl_q <= ctrl_wdata;
    if (codec_we) creg[codec_sel] <= codec_wdata;
    if (rom_we)   rom[rom_address] <= rom_data;
    rom_rdata <= rom[rom_address];
  end
  assign codec_rdata = creg[codec_sel];

  task automatic chk(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask

  // one AHB transfer; returns read data and the number of wait states
  task automatic ahb(input bit wr, input logic [31:0] a, input logic [2:0] sz,
                     input logic [31:0] wd, output logic [31:0] rd, output int waits);
    @(negedge clk);
    hsel = 1; haddr = a; htrans = HTRANS_NONSEQ; hwrite = wr; hsize = sz;
    @(posedge clk);
    #1 hsel = 0; htrans = HTRANS_IDLE; hwdata = wd;
    waits = 0;
    @(negedge clk);
    while (!hreadyout) begin waits++; @(negedge clk); end
    rd = hrdata;
    @(posedge clk);
    #1;
  endtask

  logic [31:0] rd;
  int w;

  task automatic wr32(input logic [31:0] a, input logic [31:0] d);
    ahb(1, a, HSIZE_WORD, d, rd, w);
  endtask
  task automatic wr16(input logic [31:0] a, input logic [15:0] d);
    // put the halfword on the lanes that this endianness uses for a[1]
    logic [31:0] bus;
    bus = (a[1] ^ endianness) ? {d, 16'hDEAD} : {16'hBEEF, d};
    ahb(1, a, HSIZE_HALF, bus, rd, w);
  endtask
  task automatic rd32(input logic [31:0] a, output logic [31:0] d, output int waits);
    ahb(0, a, HSIZE_WORD, 32'h0, d, waits);
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v, d;
    logic [15:0] exp_rom [256];
    hsel = 0; haddr = 0; htrans = HTRANS_IDLE; hwrite = 0; hsize = HSIZE_WORD; hwdata = 0;
    endianness = 0; dma_enable = 0; dma_status = 32'hA5A5_0003; ctrl_q = 0;
    for (int i = 0; i < 8; i++) creg[i] = 16'(16'h4000 + i);
    #12 rst_n = 1;
    chk(hresp == HRESP_OKAY, "hresp OKAY");
    // control and controller registers
    for (int n = 0; n < 10; n++) begin
      v = $urandom; wr32(FPGA_BASE + A_FPGA_CTRL, v);  rd32(FPGA_BASE + A_FPGA_CTRL, d, w);
      chk(d == v && w == 0, "control register");
      v = $urandom; wr32(FPGA_BASE + A_DMA_CTRL, v); rd32(FPGA_BASE + A_DMA_CTRL, d, w);
      chk(d == v && dma_control == v && w == 0, "controller control");
      v = $urandom; wr32(FPGA_BASE + A_DMA_ADDR, v); rd32(FPGA_BASE + A_DMA_ADDR, d, w);
      chk(d == v && dma_address == v, "controller address");
    end
    rd32(FPGA_BASE + A_DMA_STATUS, d, w); chk(d == dma_status, "status register");
    // codec registers, both endiannesses, 16- and 32-bit writes
    for (int e = 0; e < 2; e++) begin
      endianness = e[0];
      for (int i = 0; i < 4; i++) begin
        v = $urandom;
        wr16(FPGA_BASE + A_CODEC_BASE + 4 * i, v[15:0]);
        chk(creg[i] == v[15:0], $sformatf("TX%0d halfword write e=%0d", i, e));
        rd32(FPGA_BASE + A_CODEC_BASE + 4 * i, d, w);
        chk(d == {v[15:0], v[15:0]} && w == 0, "TX read-back");
        wr32(FPGA_BASE + A_CODEC_BASE + 4 * i, {16'h0, v[31:16]});
        chk(creg[i] == v[31:16], "TX word write");
      end
    end
    for (int i = 0; i < 4; i++) begin
      wr32(FPGA_BASE + A_CODEC_BASE + 16 + 4 * i, 32'h1234);
      rd32(FPGA_BASE + A_CODEC_BASE + 16 + 4 * i, d, w);
      chk(d == {2{16'(16'h4004 + i)}}, "RX read-only");
    end
    dma_enable = 1; v = {16'h0, creg[0]};
    wr32(FPGA_BASE + A_CODEC_BASE, 32'h7777);
    chk(creg[0] == v[15:0], "TX locked while controller owns it");
    dma_enable = 0;
    // program memory
    for (int e = 0; e < 2; e++) begin
      endianness = e[0];
      for (int i = 0; i < 256; i++) begin
        exp_rom[i] = 16'($urandom);
        wr16(FPGA_BASE + A_PROG_BASE + 2 * i, exp_rom[i]);
      end
      for (int i = 0; i < 256; i += 7) begin
        rd32(FPGA_BASE + A_PROG_BASE + 2 * i, d, w);
        chk(d == {2{exp_rom[i]}}, $sformatf("program word %0d e=%0d", i, e));
        chk(w == 1, "one wait state on program memory read");
      end
    end
    rd32(FPGA_BASE + 32'h0000_0800, d, w); chk(d == 0, "unmapped reads 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
