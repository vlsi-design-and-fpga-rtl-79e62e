// codec_if: audio port interface, the serial-to-parallel front end for the
// stereo audio codec.
//
// The codec exchanges one 64-bit word per sample period over a serial
// port: SCLK (bit clock), FSYNC (high during the last bit of each word),
// SDTX (codec to FPGA), SDRX (FPGA to codec), plus the DC (data/control
// mode) and RESET pins. The word carries, MSB first: left sample, right
// sample, command high, command low, 16 bits each.
//
// Receive: a 64-bit shift register samples SDTX on each rising SCLK edge;
// at the edge where FSYNC is high the complete word is copied into the four
// 16-bit RX registers. Transmit: at the same moment the four TX registers
// are loaded into a second 64-bit shift register, which puts one bit on
// SDRX at each falling SCLK edge, MSB first. The RX registers therefore
// hold the word that has just ended, and TX registers written during a
// sample period go out in the next word.
//
// State machine 1 (clock generator): in control mode (codec_dc = 0) or
// when master_slave is set, the interface drives SCLK and FSYNC itself
// (the *_oe outputs enable the pad drivers): SCLK has a half period of
// 4*(dip_switches+1) clock cycles and FSYNC marks every 64th bit.
// Otherwise the codec supplies both and the interface follows them.
// State machine 2 (interrupt): at every word boundary codec_irq is raised
// (if codec_int_en); codec_int_ack clears it. The request means: new data
// in the RX registers, TX registers free for the next word.
// Loopback: the serial input is taken from SDRX instead of SDTX, so the
// RX registers return what was written into the TX registers one word
// earlier.
//
// The pins, sampling SCLK/FSYNC/SDTX with the system clock (through two
// flip-flops), word layout and register set follow the published design
// as far as it goes; the SCLK edge use, the divider formula and the
// two read ports (system bus: rsel_a, DMA path: rsel_b) are this design's.
// Register numbering: 0-3 TX L/R/CmdH/CmdL, 4-7 RX L/R/CmdH/CmdL.
module codec_if (
  input  logic        clk,
  input  logic        rst_n,
  // codec pins
  input  logic        sclk_in,
  output logic        sclk_out,
  output logic        sclk_oe,
  input  logic        fsync_in,
  output logic        fsync_out,
  output logic        fsync_oe,
  input  logic        sdtx,
  output logic        sdrx,
  output logic        dc,
  output logic        codec_reset_n,
  // configuration
  input  logic        codec_dc,
  input  logic        master_slave,
  input  logic        loopback,
  input  logic [3:0]  dip_switches,
  input  logic        codec_int_reset_n,
  input  logic        codec_int_en,
  input  logic        codec_int_ack,
  output logic        codec_irq,
  // register access
  input  logic        reg_we,
  input  logic [1:0]  reg_wsel,
  input  logic [15:0] reg_wdata,
  input  logic [2:0]  rsel_a,
  output logic [15:0] rdata_a,
  input  logic [2:0]  rsel_b,
  output logic [15:0] rdata_b
);
  localparam int unsigned WORD_BITS = 64;
  localparam int unsigned BW = $clog2(WORD_BITS);

  // ------------------------------------------------ state machine 1
  logic          drive;
  logic [5:0]    div_cnt;
  logic          gen_sclk, gen_fsync;
  logic [BW-1:0] gen_bit;
  logic [5:0]    half_period;

  assign drive       = !codec_dc || master_slave;
  assign half_period = {dip_switches, 2'b11};   // 4*(dip+1) - 1

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_cnt   <= '0;
      gen_sclk  <= 1'b0;
      gen_fsync <= 1'b0;
      gen_bit   <= '0;
    end else if (!drive) begin
      div_cnt  <= '0;
      gen_sclk <= 1'b0;
    end else if (div_cnt >= half_period) begin
      div_cnt  <= '0;
      gen_sclk <= !gen_sclk;
      if (gen_sclk) begin                    // falling edge: next bit
        gen_bit   <= gen_bit + 1'b1;
        gen_fsync <= (gen_bit == BW'(WORD_BITS - 2));
      end
    end else begin
      div_cnt <= div_cnt + 1'b1;
    end
  end

  assign sclk_out  = gen_sclk;
  assign fsync_out = gen_fsync;
  assign sclk_oe   = drive;
  assign fsync_oe  = drive;
  assign dc            = codec_dc;
  assign codec_reset_n = codec_int_reset_n;

  // ------------------------------------------------ serial shifting
  logic [1:0] sclk_s, fsync_s, sd_s;
  logic       sclk_d, sclk_rise, sclk_fall;
  logic       sclk_pin, fsync_pin;

  assign sclk_pin  = drive ? gen_sclk  : sclk_in;
  assign fsync_pin = drive ? gen_fsync : fsync_in;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_s  <= '0;
      fsync_s <= '0;
      sd_s    <= '0;
      sclk_d  <= 1'b0;
    end else begin
      sclk_s  <= {sclk_s[0], sclk_pin};
      fsync_s <= {fsync_s[0], fsync_pin};
      sd_s    <= {sd_s[0], sdtx};
      sclk_d  <= sclk_s[1];
    end
  end
  assign sclk_rise = sclk_s[1] && !sclk_d;
  assign sclk_fall = !sclk_s[1] && sclk_d;

  logic [WORD_BITS-1:0] in_sr, out_sr;
  logic [15:0]          tx_reg [4];
  logic [15:0]          rx_reg [4];
  logic                 in_bit, word_end;
  logic [WORD_BITS-1:0] word_in;

  assign in_bit   = loopback ? sdrx : sd_s[1];
  assign word_end = sclk_rise && fsync_s[1];
  assign word_in  = {in_sr[WORD_BITS-2:0], in_bit};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_sr  <= '0;
      out_sr <= '0;
      sdrx   <= 1'b0;
      for (int i = 0; i < 4; i++) begin
        tx_reg[i] <= '0;
        rx_reg[i] <= '0;
      end
    end else begin
      if (sclk_rise) in_sr <= word_in;
      if (word_end) begin
        for (int i = 0; i < 4; i++)
          rx_reg[i] <= word_in[WORD_BITS-1-16*i -: 16];
        out_sr <= {tx_reg[0], tx_reg[1], tx_reg[2], tx_reg[3]};
      end else if (sclk_fall) begin
        sdrx   <= out_sr[WORD_BITS-1];
        out_sr <= {out_sr[WORD_BITS-2:0], 1'b0};
      end
      if (reg_we) tx_reg[reg_wsel] <= reg_wdata;
    end
  end

  assign rdata_a = rsel_a[2] ? rx_reg[rsel_a[1:0]] : tx_reg[rsel_a[1:0]];
  assign rdata_b = rsel_b[2] ? rx_reg[rsel_b[1:0]] : tx_reg[rsel_b[1:0]];

  // ------------------------------------------------ state machine 2
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                           codec_irq <= 1'b0;
    else if (!codec_int_en)               codec_irq <= 1'b0;
    else if (word_end)                    codec_irq <= 1'b1;
    else if (codec_int_ack)               codec_irq <= 1'b0;
  end
endmodule
