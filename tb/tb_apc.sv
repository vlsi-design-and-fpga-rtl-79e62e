// tb_apc: the audio port controller running a test program, with the
// DMA-bus master and an SRAM model behind it and a model of the codec
// register file. The program exercises every opcode: ADD, SUB, AND, OR,
// MOVE, MOVE_ADDR, MOVE_CTRL, TESTEQZERO with JUMP taken and not taken for
// each condition, READ, WRITE, WRITE2CODEC, READFROMCODEC, and an
// interrupt routine at 0x0C with ClearCodecIrq and SendIrq2Dsp. Results
// are compared with values worked out by hand from the program. Also
// checked: program memory write protection and read-back, the cycle
// count of an ALU instruction (6 clocks), debug single-step, and that
// clearing DmaEnable stops the controller and resets its program counter.
module tb_apc;
  import apc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic [31:0] dma_control, dma_address, dma_status;
  logic [7:0]  rom_address;
  logic        rom_we;
  logic [15:0] rom_data, rom_rdata;
  logic        dma_enable, dsp_int_ack, dma_irq;
  logic        re, we, ok, tmo, codec_reg_we, codec_to_odb, codec_irq, int_ack;
  logic [1:0]  size;
  logic [31:0] odb_address, apc_wdata, odb_wdata, rdata;
  logic [2:0]  codec_reg_sel;
  logic        hbusreq, hlock, hgrant, hwrite, hready;
  logic [31:0] haddr, hwdata, hrdata;
  logic [1:0]  htrans;
  logic [2:0]  hsize, hburst;
  int          stall;

  apc u_apc (.clk, .rst_n, .dma_control, .dma_address, .dma_status, .rom_address, .rom_we,
             .rom_data, .rom_rdata, .dma_enable, .codec_int_en(1'b1), .dma_int_enable(1'b1),
             .dsp_int_ack, .dma_irq, .re, .we, .size, .ok, .odb_address, .wdata(apc_wdata), .rdata,
             .codec_reg_sel, .codec_reg_we, .codec_to_odb, .codec2dma_irq(codec_irq),
             .dma2codec_int_ack(int_ack));
  odb_master u_odb (.clk, .rst_n, .endianness(1'b0), .re, .we, .size, .address(odb_address),
                    .wdata(odb_wdata), .ok, .rdata, .timeout(tmo), .hbusreq, .hlock, .hgrant, .haddr,
                    .htrans, .hwrite, .hsize, .hburst, .hwdata, .hrdata, .hready, .hresp(2'b00));
  sram_model #(.WORDS(256)) u_sram (.clk, .rst_n, .big(1'b0), .stall, .hbusreq, .hlock, .hgrant,
                                    .haddr, .htrans, .hwrite, .hsize, .hwdata, .hrdata, .hready);

  // codec register file model (TX 0-3 written by WRITE2CODEC, RX 4-7 fixed)
  logic [15:0] creg [8];
  always_ff @(posedge clk) if (codec_reg_we && codec_reg_sel < 4) creg[codec_reg_sel] <= rdata[15:0];
  assign odb_wdata = codec_to_odb ? {16'h0, creg[codec_reg_sel]} : apc_wdata;

  // codec interrupt source: raised by the testbench, cleared by the acknowledge
  int n_ack = 0;
  always_ff @(posedge clk) if (int_ack) begin codec_irq <= 1'b0; n_ack <= n_ack + 1; end

  task automatic chk(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask

  function automatic logic [15:0] enc(input opcode_e op, input int opt, input int r1, input int r2);
    return {op, 4'(opt), 4'(r1), 4'(r2)};
  endfunction

  logic [15:0] prog [256];
  task automatic load_program();
    for (int i = 0; i < 256; i++) prog[i] = enc(OP_JUMP, COND_ANYCASE, 3, 0);   // stray: go idle
    prog[8'h00] = enc(OP_MOVE_ADDR, 0, 0, 0);                 // r0 = 0x100
    prog[8'h01] = enc(OP_MOVE, 0, 0, 1);                      // r1 = r0
    prog[8'h02] = enc(OP_ADD, VAL_FOUR, 1, 2);                // r2 = 0x104
    prog[8'h03] = enc(OP_SUB, VAL_TWO, 2, 3);                 // r3 = 0x102
    prog[8'h04] = enc(OP_AND, MSK_COUNT, 3, 4);               // r4 = 0
    prog[8'h05] = enc(OP_OR, MSK_RDY, 3, 5);                  // r5 = 0x10A
    prog[8'h06] = enc(OP_WRITE, 0, 5, 0);                     // [0x100] = r5
    prog[8'h07] = enc(OP_READ, 0, 6, 2);                      // r6 = [0x104]
    prog[8'h08] = enc(OP_TESTEQZERO, 0, 4, 0);                // TF = 1
    prog[8'h09] = enc(OP_JUMP, COND_IFTRUE, 2, 0);            // -> 0x20
    prog[8'h0A] = enc(OP_ADD, 1, 7, 7);                       // skipped
    prog[8'h0B] = enc(OP_JUMP, COND_ANYCASE, 3, 0);
    prog[8'h0C] = enc(OP_CLRCODECIRQ, 0, 0, 0);               // interrupt routine
    prog[8'h0D] = enc(OP_ADD, 1, 7, 7);                       // r7 counts interrupts
    prog[8'h0E] = enc(OP_SENDIRQ2DSP, 0, 0, 0);
    prog[8'h0F] = enc(OP_JUMP, COND_ANYCASE, 3, 0);           // -> 0x30
    prog[8'h20] = enc(OP_TESTEQZERO, 0, 5, 0);                // TF = 0
    prog[8'h21] = enc(OP_JUMP, COND_IFTRUE, 0, 10);           // not taken
    prog[8'h22] = enc(OP_JUMP, COND_IFFALSE, 2, 4);           // -> 0x24
    prog[8'h23] = enc(OP_ADD, 1, 7, 7);                       // skipped
    prog[8'h24] = enc(OP_WRITE2CODEC, 0, 1, 0);               // TX_R = half [0x100]
    prog[8'h25] = enc(OP_READFROMCODEC, 0, 5, 2);             // half [0x104] = RX_R
    prog[8'h26] = enc(OP_MOVE_CTRL, 0, 0, 3);                 // r3 = dma_control
    prog[8'h27] = enc(OP_NOP, 0, 0, 0);
    prog[8'h28] = enc(OP_JUMP, COND_ANYCASE, 3, 0);           // -> 0x30
    prog[8'h30] = enc(OP_JUMP, COND_ANYCASE, 3, 0);           // idle loop
  endtask

  task automatic rom_write(input int a, input logic [15:0] d);
    @(negedge clk); rom_address = 8'(a); rom_data = d; rom_we = 1;
    @(negedge clk); rom_we = 0;
  endtask
  task automatic rom_read(input int a, output logic [15:0] d);
    @(negedge clk); rom_address = 8'(a);
    @(negedge clk); d = rom_rdata;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] d;
    longint t0;
    int pc0;
    dma_control = 0; dma_address = 32'h100; rom_address = 0; rom_we = 0; rom_data = 0;
    dma_enable = 0; dsp_int_ack = 0; codec_irq = 0; stall = 1;
    for (int i = 0; i < 8; i++) creg[i] = 16'(16'h5550 + i);
    #12 rst_n = 1;
    u_sram.wr32(32'h104, 32'hDEAD_BEEF);
    load_program();
    // write protection, then load
    rom_write(0, 16'h1234); rom_read(0, d);
    chk(d != 16'h1234, "program memory protected while dma_control[0] is 0");
    dma_control = 32'h1;
    for (int i = 0; i < 256; i++) rom_write(i, prog[i]);
    for (int i = 0; i < 256; i += 5) begin rom_read(i, d); chk(d == prog[i], "program read-back"); end
    dma_control = 32'hABC0_0000;
    // run the straight-line part and time one ALU instruction
    dma_enable = 1;
    @(posedge clk iff u_apc.pc == 8'h02); t0 = $time / 10;
    @(posedge clk iff u_apc.pc == 8'h03);
    chk($time / 10 - t0 == 6, $sformatf("ALU instruction takes 6 cycles (%0d)", $time / 10 - t0));
    @(posedge clk iff u_apc.pc == 8'h30);
    repeat (20) @(negedge clk);
    chk(u_apc.u_reg_bank.regs[0] == 32'h100, "MOVE_ADDR");
    chk(u_apc.u_reg_bank.regs[1] == 32'h100, "MOVE");
    chk(u_apc.u_reg_bank.regs[2] == 32'h104, "ADD");
    chk(u_apc.u_reg_bank.regs[3] == 32'hABC0_0000, "MOVE_CTRL");
    chk(u_apc.u_reg_bank.regs[4] == 32'h0, "AND");
    chk(u_apc.u_reg_bank.regs[5] == 32'h10A, "SUB then OR");
    chk(u_apc.u_reg_bank.regs[6] == 32'hDEAD_BEEF, "READ");
    chk(u_apc.u_reg_bank.regs[7] == 32'h0, "skipped instructions not run");
    chk(u_sram.rd32(32'h100) == 32'h10A, "WRITE");
    chk(creg[1] == 16'h010A, "WRITE2CODEC");
    chk(u_sram.rd16(32'h104) == 16'h5555 && u_sram.rd16(32'h106) == 16'hDEAD, "READFROMCODEC halfword");
    chk(dma_status[7:0] == u_apc.pc && dma_status[31:16] == u_apc.ir, "status register");
    // interrupts
    for (int n = 1; n <= 3; n++) begin
      @(negedge clk); codec_irq = 1;
      @(posedge clk iff dma_irq);
      chk(n_ack == n, "ClearCodecIrq acknowledged the codec");
      chk(u_apc.u_reg_bank.regs[7] == 32'(n), "interrupt routine ran");
      repeat (10) @(negedge clk);
      chk(dma_irq && u_apc.pc == 8'h0E && u_apc.spec_busy, "controller waits in SendIrq2Dsp for the DSP");
      dsp_int_ack = 1; @(negedge clk); dsp_int_ack = 0;
      chk(!dma_irq, "DSP acknowledge clears the interrupt");
      @(posedge clk iff u_apc.pc == 8'h30);
    end
    // debug single step
    dma_control = 32'hABC0_0002;
    repeat (40) @(negedge clk);
    pc0 = u_apc.pc;
    repeat (40) @(negedge clk);
    chk(u_apc.pc == 8'(pc0), "debug mode holds");
    for (int n = 0; n < 3; n++) begin
      dma_control = 32'hABC0_0006; repeat (2) @(negedge clk);
      dma_control = 32'hABC0_0002; repeat (40) @(negedge clk);
      chk(u_apc.pc == 8'h30 && u_apc.ir == prog[8'h30], "one step executed");
    end
    codec_irq = 1;
    repeat (40) @(negedge clk);
    chk(u_apc.pc != 8'h0D, "interrupt waits for a step in debug mode");
    for (int n = 0; n < 2; n++) begin
      dma_control = 32'hABC0_0006; repeat (2) @(negedge clk);
      dma_control = 32'hABC0_0002; repeat (40) @(negedge clk);
    end
    chk(u_apc.pc == 8'h0D && n_ack == 4, "stepped into the interrupt routine");
    // stop
    dma_control = 32'hABC0_0000; dma_enable = 0;
    repeat (10) @(negedge clk);
    chk(u_apc.pc == 0, "disable resets the program counter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
