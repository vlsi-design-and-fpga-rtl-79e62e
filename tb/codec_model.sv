// codec_model: behavioural model of the serial port of the stereo audio
// codec (an AD1849-class part), for simulation only.
//
// Data mode (dc = 1): the model is the serial master. It drives SCLK with
// a half period of HALF clock cycles and FSYNC high during the last of the
// 64 bits of each word, sends word k = {16'h1000+k, 16'h2000+k,
// 16'h3000+k, 16'h4000+k} on SDTX (changing on falling SCLK edges, MSB
// first) and samples SDRX on rising edges.
// Control mode (dc = 0): the model follows the SCLK/FSYNC driven by the
// FPGA and sends back each word it received, one word later, as the real
// part echoes its control words.
// rx_word[k] is the k-th word received, rx_count how many there are.
module codec_model #(
  parameter int HALF = 12
) (
  input  logic clk,
  input  logic reset_n,
  input  logic dc,
  input  logic sclk_fpga,
  input  logic fsync_fpga,
  output logic sclk,
  output logic fsync,
  output logic sdtx,
  input  logic sdrx
);
  logic [63:0] rx_word [0:4095];
  int          rx_count;
  int          tx_index;

  int          div;
  int          bitn;
  logic        my_sclk, my_fsync;
  logic        sclk_eff, fsync_eff, sclk_q;
  logic [63:0] in_sr, out_sr;

  function automatic logic [63:0] gen_word(input int k);
    return {16'h1000 + 16'(k), 16'h2000 + 16'(k), 16'h3000 + 16'(k), 16'h4000 + 16'(k)};
  endfunction

  assign sclk      = my_sclk;
  assign fsync     = my_fsync;
  assign sclk_eff  = dc ? my_sclk  : sclk_fpga;
  assign fsync_eff = dc ? my_fsync : fsync_fpga;

  // own clock generator
  always_ff @(posedge clk) begin
    if (!reset_n || !dc) begin
      div      <= 0;
      my_sclk  <= 1'b0;
      my_fsync <= 1'b0;
      bitn     <= 0;
    end else if (div == HALF - 1) begin
      div     <= 0;
      my_sclk <= !my_sclk;
      if (my_sclk) begin
        bitn     <= (bitn + 1) % 64;
        my_fsync <= (bitn == 62);
      end
    end else div <= div + 1;
  end

  // shifting, on the edges of whichever clock is in use
  always_ff @(posedge clk) begin
    if (!reset_n) begin
      sclk_q   <= 1'b0;
      in_sr    <= '0;
      out_sr   <= '0;
      sdtx     <= 1'b0;
      rx_count <= 0;
      tx_index <= 0;
    end else begin
      sclk_q <= sclk_eff;
      if (sclk_eff && !sclk_q) begin
        in_sr <= {in_sr[62:0], sdrx};
        if (fsync_eff) begin
          rx_word[rx_count % 4096] <= {in_sr[62:0], sdrx};
          rx_count <= rx_count + 1;
          if (dc) begin
            out_sr   <= gen_word(tx_index);
            tx_index <= tx_index + 1;
          end else begin
            out_sr <= {in_sr[62:0], sdrx};
          end
        end
      end else if (!sclk_eff && sclk_q) begin
        sdtx   <= out_sr[63];
        out_sr <= {out_sr[62:0], 1'b0};
      end
    end
  end
endmodule
