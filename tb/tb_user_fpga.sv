// tb_user_fpga: end-to-end test of the buffered audio port at its default
// parameters.
//
// The testbench plays the DSP: it drives the system bus (AHB master tasks),
// answers the interrupts and edits the buffer descriptors in SRAM through
// the memory model's backdoor, as the frame-level interrupt routine would.
// Phases:
//  1. control mode, direct access: the FPGA generates SCLK/FSYNC, the codec
//     model echoes; TX registers written over the bus come back in the RX
//     registers; the codec interrupt reaches the DSP pin and is acknowledged.
//  2. loopback mode: RX registers return the TX registers.
//  3. program load: the controller program is written into the program
//     memory (a write with the protection bit clear must not land).
//  4. debug mode: one instruction per step.
//  5. data mode with the controller running: NBUF buffers of FRAME stereo
//     samples each way. Received samples must arrive in SRAM in order and
//     without gaps, transmitted samples must reach the codec in order, the
//     descriptors' count and rdy fields must be maintained, and the DSP
//     must be interrupted once per frame.
//  6. DMA-bus time-out: the SRAM stalls one transfer beyond 20 cycles.
//  7. big endian: the controller is stopped, the system (control register
//     and memory model) switched to big-endian byte lanes, the buffers
//     re-armed, and one more frame must move each way intact.
// Every mechanism exercised is counted; one that never happened fails.
module tb_user_fpga;
  import apc_pkg::*;

  localparam int FRAME = 160;   // samples per buffer (20 ms at 8 kHz)
  localparam int NBUF  = 3;     // buffers checked in each direction
  localparam int HALF  = 12;    // codec SCLK half period in clock cycles

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  // ---------------------------------------------------------------- DUT
  logic        osb_hsel = 0, osb_hwrite = 0;
  logic [31:0] osb_haddr = 0, osb_hwdata = 0, osb_hrdata;
  logic [1:0]  osb_htrans = 0, osb_hresp;
  logic [2:0]  osb_hsize = 3'd2;
  logic        osb_hreadyout;

  logic        odb_hbusreq, odb_hlock, odb_hgrant, odb_hwrite, odb_hready, odb_timeout;
  logic [31:0] odb_haddr, odb_hwdata, odb_hrdata;
  logic [1:0]  odb_htrans;
  logic [2:0]  odb_hsize, odb_hburst;

  logic sclk_out, sclk_oe, fsync_out, fsync_oe, sdrx, dc, codec_rst_n;
  logic m_sclk, m_fsync, m_sdtx;
  logic dsp_codec_irq, dsp_dma_irq;

  logic big = 1'b0;
  int   stall = 0;

  user_fpga dut (
    .clk, .rst_n,
    .osb_hsel, .osb_haddr, .osb_htrans, .osb_hwrite, .osb_hsize, .osb_hwdata,
    .osb_hready(osb_hreadyout), .osb_hrdata, .osb_hreadyout, .osb_hresp,
    .odb_hbusreq, .odb_hlock, .odb_hgrant, .odb_haddr, .odb_htrans, .odb_hwrite,
    .odb_hsize, .odb_hburst, .odb_hwdata, .odb_hrdata, .odb_hready,
    .odb_hresp(2'b00), .odb_timeout,
    .codec_sclk_in(m_sclk), .codec_sclk_out(sclk_out), .codec_sclk_oe(sclk_oe),
    .codec_fsync_in(m_fsync), .codec_fsync_out(fsync_out), .codec_fsync_oe(fsync_oe),
    .codec_sdtx(m_sdtx), .codec_sdrx(sdrx), .codec_dc(dc), .codec_reset_n(codec_rst_n),
    .dsp_codec_irq, .dsp_dma_irq
  );

  sram_model #(.WORDS(4096)) u_sram (
    .clk, .rst_n, .big, .stall,
    .hbusreq(odb_hbusreq), .hlock(odb_hlock), .hgrant(odb_hgrant),
    .haddr(odb_haddr), .htrans(odb_htrans), .hwrite(odb_hwrite), .hsize(odb_hsize),
    .hwdata(odb_hwdata), .hrdata(odb_hrdata), .hready(odb_hready)
  );

  codec_model #(.HALF(HALF)) u_codec (
    .clk, .reset_n(codec_rst_n), .dc,
    .sclk_fpga(sclk_out), .fsync_fpga(fsync_out),
    .sclk(m_sclk), .fsync(m_fsync), .sdtx(m_sdtx), .sdrx
  );

  // ------------------------------------------------------- bus master tasks
  task automatic bus_write(input logic [31:0] a, input logic [31:0] d, input logic [2:0] sz = 3'd2);
    @(negedge clk);
    osb_hsel = 1; osb_haddr = a; osb_htrans = HTRANS_NONSEQ; osb_hwrite = 1; osb_hsize = sz;
    @(negedge clk);
    while (!osb_hreadyout) @(negedge clk);
    osb_hsel = 0; osb_htrans = HTRANS_IDLE; osb_hwrite = 0; osb_hwdata = d;
    while (!osb_hreadyout) @(negedge clk);
    @(posedge clk);
  endtask

  task automatic bus_read(input logic [31:0] a, output logic [31:0] d, input logic [2:0] sz = 3'd2);
    @(negedge clk);
    osb_hsel = 1; osb_haddr = a; osb_htrans = HTRANS_NONSEQ; osb_hwrite = 0; osb_hsize = sz;
    @(negedge clk);
    osb_hsel = 0; osb_htrans = HTRANS_IDLE;
    while (!osb_hreadyout) @(negedge clk);
    d = osb_hrdata;
  endtask

  fpga_ctrl_t ctrl_shadow = '0;
  task automatic ack_codec();
    ctrl_shadow.codec_int_ack = 1;
    bus_write(FPGA_BASE, 32'(ctrl_shadow));
    ctrl_shadow.codec_int_ack = 0;
    repeat (2) @(negedge clk);
  endtask

  task automatic set_ctrl();
    fpga_ctrl_t c;
    c = ctrl_shadow;
    c.codec_int_ack = 0; c.dma_int_ack = 0;
    bus_write(FPGA_BASE, 32'(c));
  endtask

  // --------------------------------------------------------- program
  function automatic logic [15:0] enc(input opcode_e op, input int opt, input int r1, input int r2);
    return {op, 4'(opt), 4'(r1), 4'(r2)};
  endfunction

  logic [15:0] prog [256];
  int          plen;
  task automatic emit(input int at, input logic [15:0] w);
    prog[at] = w;
    if (at + 1 > plen) plen = at + 1;
  endtask

  // SRAM layout
  localparam logic [31:0] CD   = 32'h100;            // current-data block
  localparam logic [31:0] TXBD = 32'h200, RXBD = 32'h240;  // 2 descriptors each, 16 bytes apart
  function automatic logic [31:0] txbuf(input int b, input int ch); return 32'h1000 + 32'(b % 2) * 32'h800 + 32'(ch) * 32'h400; endfunction
  function automatic logic [31:0] rxbuf(input int b, input int ch); return 32'h2000 + 32'(b % 2) * 32'h800 + 32'(ch) * 32'h400; endfunction

  task automatic build_program();
    // idle part
    emit(0,  enc(OP_MOVE_ADDR, 0, 0, 0));
    emit(1,  enc(OP_JUMP, COND_ANYCASE, 0, 1));
    // per-sample routine at 0x0C
    emit(12, enc(OP_CLRCODECIRQ, 0, 0, 0));
    emit(13, enc(OP_MOVE, 0, 0, 1));               // R1 = &lTxPtr
    emit(14, enc(OP_ADD, VAL_EIGHT, 1, 2));        // R2 = &curTxBdPtr
    emit(15, enc(OP_READ, 0, 3, 2));               // R3 = curTxBdPtr
    emit(16, enc(OP_ADD, VAL_EIGHT, 3, 3));        // R3 = &txBd.status
    emit(17, enc(OP_READ, 0, 4, 3));               // R4 = status
    emit(18, enc(OP_AND, MSK_RLEN, 4, 5));
    emit(19, enc(OP_TESTEQZERO, 0, 5, 5));
    emit(20, enc(OP_JUMP, COND_IFTRUE, 2, 11));    // -> 43 (RX part)
    emit(21, enc(OP_SUB, VAL_COUNT1, 4, 4));
    emit(22, enc(OP_WRITE, 0, 4, 3));
    emit(23, enc(OP_AND, MSK_LEN, 4, 5));
    emit(24, enc(OP_TESTEQZERO, 0, 5, 5));
    emit(25, enc(OP_JUMP, COND_IFTRUE, 1, 14));    // -> 30
    emit(26, enc(OP_READ, 0, 2, 1));               // R2 = lTxPtr
    emit(27, enc(OP_WRITE2CODEC, 0, CREG_TX_L, 2));
    emit(28, enc(OP_ADD, VAL_TWO, 2, 2));
    emit(29, enc(OP_WRITE, 0, 2, 1));
    emit(30, enc(OP_AND, MSK_REN, 4, 5));
    emit(31, enc(OP_TESTEQZERO, 0, 5, 5));
    emit(32, enc(OP_JUMP, COND_IFTRUE, 2, 6));     // -> 38
    emit(33, enc(OP_ADD, VAL_FOUR, 0, 1));         // R1 = &rTxPtr
    emit(34, enc(OP_READ, 0, 2, 1));
    emit(35, enc(OP_WRITE2CODEC, 0, CREG_TX_R, 2));
    emit(36, enc(OP_ADD, VAL_TWO, 2, 2));
    emit(37, enc(OP_WRITE, 0, 2, 1));
    emit(38, enc(OP_AND, MSK_COUNT, 4, 5));
    emit(39, enc(OP_TESTEQZERO, 0, 5, 5));
    emit(40, enc(OP_JUMP, COND_IFFALSE, 2, 11));   // -> 43
    emit(41, enc(OP_AND, MSK_RDY_CLR, 4, 5));
    emit(42, enc(OP_WRITE, 0, 5, 3));              // clear TX rdy
    emit(43, enc(OP_ADD, VAL_TWENTY, 0, 1));       // R1 = &lRxPtr
    emit(44, enc(OP_ADD, VAL_EIGHT, 1, 2));        // R2 = &curRxBdPtr
    emit(45, enc(OP_READ, 0, 3, 2));
    emit(46, enc(OP_ADD, VAL_EIGHT, 3, 3));
    emit(47, enc(OP_READ, 0, 4, 3));
    emit(48, enc(OP_AND, MSK_RLEN, 4, 5));
    emit(49, enc(OP_TESTEQZERO, 0, 5, 5));
    emit(50, enc(OP_JUMP, COND_IFTRUE, 0, 1));
    emit(51, enc(OP_SUB, VAL_COUNT1, 4, 4));
    emit(52, enc(OP_WRITE, 0, 4, 3));
    emit(53, enc(OP_AND, MSK_LEN, 4, 5));
    emit(54, enc(OP_TESTEQZERO, 0, 5, 5));
    emit(55, enc(OP_JUMP, COND_IFTRUE, 3, 12));    // -> 60
    emit(56, enc(OP_READ, 0, 2, 1));
    emit(57, enc(OP_READFROMCODEC, 0, CREG_RX_L, 2));
    emit(58, enc(OP_ADD, VAL_TWO, 2, 2));
    emit(59, enc(OP_WRITE, 0, 2, 1));
    emit(60, enc(OP_AND, MSK_REN, 4, 5));
    emit(61, enc(OP_TESTEQZERO, 0, 5, 5));
    emit(62, enc(OP_JUMP, COND_IFTRUE, 4, 4));     // -> 68
    emit(63, enc(OP_ADD, VAL_FOUR, 1, 1));         // R1 = &rRxPtr
    emit(64, enc(OP_READ, 0, 2, 1));
    emit(65, enc(OP_READFROMCODEC, 0, CREG_RX_R, 2));
    emit(66, enc(OP_ADD, VAL_TWO, 2, 2));
    emit(67, enc(OP_WRITE, 0, 2, 1));
    emit(68, enc(OP_AND, MSK_COUNT, 4, 5));
    emit(69, enc(OP_TESTEQZERO, 0, 5, 5));
    emit(70, enc(OP_JUMP, COND_IFFALSE, 0, 1));
    emit(71, enc(OP_OR, MSK_RDY, 4, 5));
    emit(72, enc(OP_WRITE, 0, 5, 3));              // set RX rdy
    emit(73, enc(OP_SENDIRQ2DSP, 0, 0, 0));
    emit(74, enc(OP_JUMP, COND_ANYCASE, 0, 1));
  endtask

  // ------------------------------------------------ mechanism counters
  int n_big_frames = 0;
  int n_direct_irq = 0, n_ctrl_mode_words = 0, n_loopback = 0, n_isr = 0, n_frames = 0;
  int n_w2c = 0, n_rfc = 0, n_jump_taken = 0, n_jump_not = 0, n_debug_step = 0;
  int n_protect = 0, n_timeout = 0, n_half = 0;
  int isr_start = 0, isr_max = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut.u_apc.int_ack) begin n_isr++; isr_start = $time / 10; end
    if (dut.u_apc.codec_reg_we) n_w2c++;
    if (dut.u_apc.u_trans_sm.state == 2'd3 && dut.u_apc.ir.opcode == OP_READFROMCODEC) n_rfc++;
    if (dut.u_apc.agu_en && dut.u_apc.ir.opcode == OP_JUMP) begin
      if (dut.u_apc.jump_taken) n_jump_taken++; else n_jump_not++;
    end
    if (odb_timeout) n_timeout++;
    if (dut.u_apc.agu_en && dut.u_apc.ir.opcode == OP_JUMP && dut.u_apc.jump_address == 8'd1
        && dut.u_apc.jump_taken && dut.u_apc.pc >= 8'd12)
      if ($time / 10 - isr_start > isr_max) isr_max = $time / 10 - isr_start;
  end

  // ------------------------------------------------ watchdog
  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------ DSP frame routine
  // rx and tx descriptors run in step; on each frame interrupt the DSP
  // checks the full RX buffer, re-arms both descriptors and switches to
  // the other buffer pair.
  int rx_frames_done = 0;
  logic [15:0] first_rx_l = 0;
  bit   run_frames = 0;

  task automatic init_bd(input logic [31:0] bd, input logic [31:0] l, input logic [31:0] r, input bit rdy);
    u_sram.wr32(bd + 0,  l);
    u_sram.wr32(bd + 4,  r);
    u_sram.wr32(bd + 8,  {16'(FRAME), 11'd0, 1'b1, rdy, 1'b0, 2'b11});
    u_sram.wr32(bd + 12, 32'(FRAME));
  endtask

  task automatic point_cd(input int b);
    logic [31:0] tbd, rbd;
    tbd = TXBD + 32'(16 * (b % 2));
    rbd = RXBD + 32'(16 * (b % 2));
    u_sram.wr32(CD + 0,  txbuf(b, 0));
    u_sram.wr32(CD + 4,  txbuf(b, 1));
    u_sram.wr32(CD + 8,  tbd);
    u_sram.wr32(CD + 12, TXBD);
    u_sram.wr32(CD + 20, rxbuf(b, 0));
    u_sram.wr32(CD + 24, rxbuf(b, 1));
    u_sram.wr32(CD + 28, rbd);
    u_sram.wr32(CD + 32, RXBD);
    init_bd(tbd, txbuf(b, 0), txbuf(b, 1), 1'b1);
    init_bd(rbd, rxbuf(b, 0), rxbuf(b, 1), 1'b0);
    for (int i = 0; i < FRAME; i++) begin
      u_sram.wr16(txbuf(b, 0) + 32'(2 * i), 16'h5000 + 16'(b * 256 + i));
      u_sram.wr16(txbuf(b, 1) + 32'(2 * i), 16'h6000 + 16'(b * 256 + i));
    end
  endtask

  task automatic frame_irq();
    int b;
    logic [31:0] st, tst;
    logic [15:0] l0;
    bit ok_seq;
    b = rx_frames_done;
    $display("frame %0d complete at t=%0t after %0d controller interrupt routines", b, $time, n_isr);
    // acknowledge
    ctrl_shadow.dma_int_ack = 1;
    bus_write(FPGA_BASE, 32'(ctrl_shadow));
    ctrl_shadow.dma_int_ack = 0;
    while (dsp_dma_irq) @(posedge clk);
    n_frames++;
    st  = u_sram.rd32(RXBD + 32'(16 * (b % 2)) + 8);
    tst = u_sram.rd32(TXBD + 32'(16 * (b % 2)) + 8);
    check(st[31:16] == 0, $sformatf("rx count reached zero %h %h", st, tst));
    check(st[3] == 1'b1, "rx rdy set by controller");
    check(tst[31:16] == 0 && tst[3] == 1'b0, "tx count zero and tx rdy cleared");
    // samples in order, no gap, left/right consistent
    // the first word after the switch to data mode is a partial one
    if (b == 0) first_rx_l = u_sram.rd16(rxbuf(0, 0) + 2) - 16'd1;
    l0 = first_rx_l + 16'(b * FRAME);
    ok_seq = 1;
    for (int i = (b == 0) ? 1 : 0; i < FRAME; i++) begin
      logic [15:0] l, r;
      l = u_sram.rd16(rxbuf(b, 0) + 32'(2 * i));
      r = u_sram.rd16(rxbuf(b, 1) + 32'(2 * i));
      if (l != l0 + 16'(i) || r != l + 16'h1000 || l[15:12] != 4'h1) ok_seq = 0;
    end
    check(ok_seq, $sformatf("rx buffer %0d holds consecutive codec samples l0=%h first=%h", b, l0, first_rx_l));
    if (!ok_seq) for (int i = 0; i < 6; i++) $display("  %h %h", u_sram.rd16(rxbuf(b, 0) + 32'(2 * i)), u_sram.rd16(rxbuf(b, 1) + 32'(2 * i)));
    rx_frames_done++;
    point_cd(b + 1);
  endtask

  // ------------------------------------------------ main sequence
  initial begin
    logic [31:0] d;
    plen = 0;
    for (int i = 0; i < 256; i++) prog[i] = enc(OP_JUMP, COND_ANYCASE, 0, 1);
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);

    // ---- phase 1: control mode, direct access, FPGA drives the clock
    ctrl_shadow.codec_int_reset_n = 1;
    ctrl_shadow.codec_int_enable  = 1;
    ctrl_shadow.dip_switches      = 4'd2;
    set_ctrl();
    bus_read(FPGA_BASE, d);
    check(d[15:0] == 16'h0026, "control register reads back");
    bus_write(FPGA_BASE + 32'h10, 32'h0000_A1A1, 3'd1 /*half*/);
    bus_write(FPGA_BASE + 32'h14, 32'h0000_B2B2);
    bus_write(FPGA_BASE + 32'h18, 32'hC3C3_0000, 3'd1);   // halfword at offset 0, upper lanes ignored (little endian)
    bus_write(FPGA_BASE + 32'h1C, 32'h0000_D4D4, 3'd1);
    bus_read(FPGA_BASE + 32'h14, d);
    check(d[15:0] == 16'hB2B2, "TX right register reads back");
    for (int k = 0; k < 3; k++) begin
      wait (dsp_codec_irq);
      n_direct_irq++;
      check(sclk_oe && fsync_oe, "FPGA drives SCLK/FSYNC in control mode");
      ctrl_shadow.codec_int_ack = 1;
      bus_write(FPGA_BASE, 32'(ctrl_shadow));
      ctrl_shadow.codec_int_ack = 0;
      repeat (2) @(negedge clk);
      check(!dsp_codec_irq, "codec interrupt acknowledged");
    end
    n_ctrl_mode_words = u_codec.rx_count;
    bus_read(FPGA_BASE + 32'h20, d); check(d[15:0] == 16'hA1A1, "echo left");
    bus_read(FPGA_BASE + 32'h24, d); check(d[15:0] == 16'hB2B2, "echo right");
    bus_read(FPGA_BASE + 32'h28, d); check(d[15:0] == 16'h0000, "echo cmd high (halfword on unused lanes)");
    bus_read(FPGA_BASE + 32'h2C, d); check(d[15:0] == 16'hD4D4, "echo cmd low");

    // ---- phase 2: loopback
    ctrl_shadow.loopback = 1;
    set_ctrl();
    bus_write(FPGA_BASE + 32'h10, 32'h0000_1357);
    bus_write(FPGA_BASE + 32'h1C, 32'h0000_2468);
    for (int k = 0; k < 2; k++) begin
      wait (dsp_codec_irq);
      ack_codec();
    end
    bus_read(FPGA_BASE + 32'h20, d); check(d[15:0] == 16'h1357, $sformatf("loopback left %h", d));
    bus_read(FPGA_BASE + 32'h2C, d); check(d[15:0] == 16'h2468, "loopback cmd low");
    if (d[15:0] == 16'h2468) n_loopback++;
    ctrl_shadow.loopback = 0;
    ctrl_shadow.codec_int_enable = 0;
    set_ctrl();

    // ---- phase 3: program load
    build_program();
    bus_write(FPGA_BASE + 32'h1000, 32'h0000_BEEF, 3'd1);   // protected: must not land
    bus_read(FPGA_BASE + 32'h1000, d, 3'd1);
    check(d[15:0] != 16'hBEEF, "program memory write-protected");
    if (d[15:0] != 16'hBEEF) n_protect++;
    bus_write(FPGA_BASE + 32'h4, 32'h1);                    // allow program writes
    for (int i = 0; i < 256; i++)
      bus_write(FPGA_BASE + 32'h1000 + 32'(2 * i), {prog[i], prog[i]}, 3'd1);
    for (int i = 0; i < plen; i += 7) begin
      bus_read(FPGA_BASE + 32'h1000 + 32'(2 * i), d, 3'd1);
      check(d[15:0] == prog[i], $sformatf("program word %0d", i));
    end
    bus_write(FPGA_BASE + 32'h8, CD);                       // dma_address

    // ---- phase 4: debug single step
    point_cd(0);
    bus_write(FPGA_BASE + 32'h4, 32'h2);                    // debug enable, protection on
    ctrl_shadow.dma_enable = 1;
    ctrl_shadow.dma_int_enable = 1;
    set_ctrl();
    repeat (40) @(posedge clk);
    bus_read(FPGA_BASE + 32'hC, d);
    check(d[7:0] == 8'd0 && d[31:28] == OP_MOVE_ADDR, "debug: held before executing instruction 0");
    bus_write(FPGA_BASE + 32'h4, 32'h6);                    // step
    repeat (40) @(posedge clk);
    bus_read(FPGA_BASE + 32'hC, d);
    check(d[7:0] == 8'd1, "debug: one step advanced the PC by one");
    check(dut.u_apc.u_reg_bank.regs[0] == CD, "debug: MOVE_ADDR executed");
    if (d[7:0] == 8'd1) n_debug_step++;
    repeat (40) @(posedge clk);
    bus_read(FPGA_BASE + 32'hC, d);
    check(d[7:0] == 8'd1 && d[31:28] == OP_JUMP, "debug: no further progress without a step");
    bus_write(FPGA_BASE + 32'h4, 32'h0);                    // leave debug mode

    // ---- phase 5: data mode, controller running
    ctrl_shadow.codec_dc = 1;
    ctrl_shadow.codec_int_enable = 1;
    set_ctrl();
    run_frames = 1;
    while (rx_frames_done < NBUF) begin
      @(posedge clk);
      if (dsp_dma_irq) frame_irq();
    end
    check(!dsp_codec_irq, "no direct codec interrupt in controller mode");
    // transmitted samples: find the first word of buffer 0 in the codec's log
    begin
      int start, cnt;
      bit ok_tx;
      start = -1;
      for (int k = 0; k < u_codec.rx_count; k++)
        if (start < 0 && u_codec.rx_word[k][63:48] == 16'h5000) start = k;
      check(start >= 0, "first TX sample reached the codec");
      ok_tx = (start >= 0);
      cnt = 0;
      if (start >= 0)
        for (int b = 0; b < NBUF - 1; b++)
          for (int i = 0; i < FRAME; i++) begin
            logic [63:0] w;
            w = u_codec.rx_word[start + b * FRAME + i];
            if (w[63:48] != 16'h5000 + 16'(b * 256 + i) || w[47:32] != 16'h6000 + 16'(b * 256 + i)) ok_tx = 0;
            cnt++;
          end
      check(ok_tx && cnt == (NBUF - 1) * FRAME, "TX samples reached the codec in order");
    end
    check(n_isr >= NBUF * FRAME, "one controller routine per codec word");
    check(isr_max < 64 * 2 * HALF, $sformatf("routine (%0d cycles) fits in one sample period", isr_max));
    n_half = u_sram.n_half;

    // ---- phase 6: DMA-bus time-out
    stall = 30;
    repeat (64 * 2 * HALF * 2) @(posedge clk);
    stall = 0;
    repeat (64 * 2 * HALF * 2) @(posedge clk);
    check(n_timeout > 0, "DMA-bus time-out fired on a stalled transfer");
    bus_read(FPGA_BASE + 32'hC, d);
    check(dut.u_apc.int_req == 1'b0 || d[7:0] >= 8'd12 || d[7:0] == 8'd1, "controller still running after time-out");

    // ---- phase 7: big-endian system, one more frame each way
    ctrl_shadow.dma_enable = 0;
    ctrl_shadow.dma_int_ack = 1;
    set_ctrl();
    ctrl_shadow.dma_int_ack = 0;
    repeat (64 * 2 * HALF) @(posedge clk);
    ctrl_shadow.endianness = 1;
    set_ctrl();
    big = 1'b1;
    point_cd(NBUF);
    begin
      int log0, start;
      bit ok_rx, ok_tx;
      logic [31:0] st;
      logic [15:0] l, r, lp;
      log0 = u_codec.rx_count;
      ctrl_shadow.dma_enable = 1;
      set_ctrl();
      wait (dsp_dma_irq);
      ctrl_shadow.dma_int_ack = 1;
      set_ctrl();
      ctrl_shadow.dma_int_ack = 0;
      repeat (4 * 64 * 2 * HALF) @(posedge clk);
      st = u_sram.rd32(RXBD + 32'(16 * (NBUF % 2)) + 8);
      check(st[31:16] == 0 && st[3], $sformatf("big endian: rx descriptor completed %h", st));
      ok_rx = 1;
      lp = u_sram.rd16(rxbuf(NBUF, 0) + 2);
      for (int i = 2; i < FRAME; i++) begin
        l = u_sram.rd16(rxbuf(NBUF, 0) + 32'(2 * i));
        r = u_sram.rd16(rxbuf(NBUF, 1) + 32'(2 * i));
        if (l != lp + 16'd1 || r != l + 16'h1000 || l[15:12] != 4'h1) ok_rx = 0;
        lp = l;
      end
      check(ok_rx, "big endian: rx buffer holds consecutive codec samples");
      start = -1;
      for (int k = log0; k < u_codec.rx_count; k++)
        if (start < 0 && u_codec.rx_word[k][63:48] == 16'h5000 + 16'(NBUF * 256)) start = k;
      ok_tx = (start >= 0) && (start + FRAME <= u_codec.rx_count);
      if (ok_tx)
        for (int i = 0; i < FRAME; i++)
          if (u_codec.rx_word[start + i][63:48] != 16'h5000 + 16'(NBUF * 256 + i) ||
              u_codec.rx_word[start + i][47:32] != 16'h6000 + 16'(NBUF * 256 + i)) ok_tx = 0;
      check(ok_tx, "big endian: TX samples reached the codec in order");
      if (ok_rx && ok_tx) n_big_frames++;
    end

    // ---- mechanism coverage
    $display("mechanisms: direct_irq=%0d ctrl_mode_words=%0d loopback=%0d protect=%0d debug_step=%0d isr=%0d frames=%0d w2c=%0d rfc=%0d half=%0d jump_taken=%0d jump_not=%0d timeout=%0d big_frames=%0d isr_max=%0d",
             n_direct_irq, n_ctrl_mode_words, n_loopback, n_protect, n_debug_step, n_isr, n_frames,
             n_w2c, n_rfc, n_half, n_jump_taken, n_jump_not, n_timeout, n_big_frames, isr_max);
    check(n_direct_irq > 0, "mechanism: direct codec interrupt");
    check(n_ctrl_mode_words > 0, "mechanism: control-mode clock generation");
    check(n_loopback > 0, "mechanism: loopback");
    check(n_protect > 0, "mechanism: program memory protection");
    check(n_debug_step > 0, "mechanism: debug single step");
    check(n_frames >= NBUF, "mechanism: frame interrupt to the DSP");
    check(n_w2c > 0 && n_rfc > 0, "mechanism: codec transfers");
    check(n_half > 0, "mechanism: halfword DMA transfers");
    check(n_jump_taken > 0 && n_jump_not > 0, "mechanism: conditional jumps both ways");
    check(n_timeout > 0, "mechanism: DMA-bus time-out");
    check(n_big_frames > 0, "mechanism: big-endian sample path");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
