// tb_codec_if: the audio port interface against the codec model.
//   control mode: the interface makes SCLK itself; checks the SCLK period
//     8*(divider+1) clocks for two divider settings, that each control
//     word written to the TX registers reaches the codec, and that the
//     codec's echo comes back in the RX registers one word later;
//   data mode, codec as master: checks that received words are whole
//     (all four fields of one model word) and consecutive, that the
//     interrupt comes once per 64-bit word (128*HALF clocks), that the
//     acknowledge clears it, and that TX data reaches the codec;
//   data mode, interface as master with loopback: RX equals TX;
//   pins: DC and RESET follow the configuration inputs.
module tb_codec_if;
  int checks = 0, failures = 0;
  localparam int HALF = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic sclk_out, sclk_oe, fsync_out, fsync_oe, sdrx, dc, codec_reset_n;
  logic m_sclk, m_fsync, m_sdtx;
  logic codec_dc, master_slave, loopback, int_reset_n, int_en, int_ack, irq;
  logic [3:0] dip;
  logic reg_we;
  logic [1:0] wsel;
  logic [15:0] wdata, rda, rdb;
  logic [2:0] rsa, rsb;

  codec_if dut (.clk, .rst_n, .sclk_in(m_sclk), .sclk_out, .sclk_oe, .fsync_in(m_fsync), .fsync_out,
                .fsync_oe, .sdtx(m_sdtx), .sdrx, .dc, .codec_reset_n, .codec_dc, .master_slave,
                .loopback, .dip_switches(dip), .codec_int_reset_n(int_reset_n), .codec_int_en(int_en),
                .codec_int_ack(int_ack), .codec_irq(irq), .reg_we, .reg_wsel(wsel), .reg_wdata(wdata),
                .rsel_a(rsa), .rdata_a(rda), .rsel_b(rsb), .rdata_b(rdb));
  codec_model #(.HALF(HALF)) u_codec (.clk, .reset_n(codec_reset_n), .dc, .sclk_fpga(sclk_out),
                                      .fsync_fpga(fsync_out), .sclk(m_sclk), .fsync(m_fsync),
                                      .sdtx(m_sdtx), .sdrx);

  task automatic chk(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask

  task automatic write_tx(input logic [63:0] w);
    for (int i = 0; i < 4; i++) begin
      @(negedge clk); reg_we = 1; wsel = 2'(i); wdata = w[63 - 16 * i -: 16];
    end
    @(negedge clk); reg_we = 0;
  endtask

  function automatic logic [63:0] rx_word();
    logic [63:0] w;
    for (int i = 0; i < 4; i++) w[63 - 16 * i -: 16] = dut.rx_reg[i];
    return w;
  endfunction

  // wait for the next interrupt, return the clock at which it came, ack it
  task automatic next_irq(output longint t);
    @(posedge clk iff irq); t = $time / 10;
    @(negedge clk); int_ack = 1; @(negedge clk); int_ack = 0;
    chk(!irq, "acknowledge clears the interrupt");
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t0, t1;
    logic [63:0] w, prev;
    int k0;
    codec_dc = 0; master_slave = 0; loopback = 0; int_reset_n = 0; int_en = 0; int_ack = 0;
    dip = 0; reg_we = 0; wsel = 0; wdata = 0; rsa = 0; rsb = 4;
    #12 rst_n = 1;
    @(negedge clk); chk(!codec_reset_n && !dc && sclk_oe, "pins after reset");
    int_reset_n = 1; int_en = 1;
    // ---- control mode: SCLK period for two divider settings
    for (int d = 0; d < 3; d += 2) begin
      dip = 4'(d);
      @(posedge sclk_out); @(posedge sclk_out); t0 = $time / 10;
      @(posedge sclk_out); t1 = $time / 10;
      chk(t1 - t0 == 8 * (d + 1), $sformatf("SCLK period %0d for divider %0d", t1 - t0, d));
    end
    // ---- control words go out and are echoed back
    prev = '0;
    for (int n = 0; n < 4; n++) begin
      w = {$urandom, $urandom};
      next_irq(t0);              // word boundary
      write_tx(w);
      next_irq(t0);              // TX is loaded into the shifter here
      next_irq(t0);              // w is sent during this word
      k0 = u_codec.rx_count;
      chk(u_codec.rx_word[k0 - 1] == w, $sformatf("control word %0d reaches the codec", n));
      next_irq(t0);              // the echo of w comes back during this word
      chk(rx_word() == w, "echo in RX registers");
      rsa = 3'(4 + n); rsb = 3'(n);
      #1 chk(rda == w[63 - 16 * n -: 16] && rdb == w[63 - 16 * n -: 16], "read ports");
    end
    // ---- data mode, codec is master
    codec_dc = 1; master_slave = 0;
    @(negedge clk); chk(dc && !sclk_oe && !fsync_oe, "data mode: pins released");
    write_tx(64'hCAFE_0001_BEEF_0002);
    next_irq(t0); next_irq(t0); next_irq(t0);
    prev = rx_word();
    for (int n = 0; n < 8; n++) begin
      next_irq(t1);
      w = rx_word();
      chk(w[63:48] - 16'h1000 == w[47:32] - 16'h2000 && w[47:32] - 16'h2000 == w[31:16] - 16'h3000 &&
          w[31:16] - 16'h3000 == w[15:0] - 16'h4000, "whole word received");
      chk(w[15:0] == prev[15:0] + 1, "consecutive words");
      chk(t1 - t0 == 128 * HALF, $sformatf("one interrupt per word (%0d clocks)", t1 - t0));
      k0 = u_codec.rx_count;
      chk(u_codec.rx_word[k0 - 1] == 64'hCAFE_0001_BEEF_0002, "TX data reaches codec");
      prev = w; t0 = t1;
    end
    // interrupts disabled: none comes
    int_en = 0;
    repeat (300 * HALF) @(negedge clk);
    chk(!irq, "no interrupt when disabled");
    int_en = 1;
    // ---- data mode, interface is master, loopback
    master_slave = 1; loopback = 1; dip = 0;
    @(negedge clk); chk(sclk_oe && fsync_oe, "master drives SCLK/FSYNC");
    w = {$urandom, $urandom};
    write_tx(w);
    next_irq(t0); next_irq(t0); next_irq(t0); next_irq(t0);
    chk(rx_word() == w, "loopback word");
    int_reset_n = 0; #1 chk(!codec_reset_n, "reset pin follows control bit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
