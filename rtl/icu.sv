// icu: interrupt control unit of the audio port controller.
//
// Turns the audio port interface's interrupt request into a request to the
// program counter. A rising edge of codec_irq, while codec_int_en is set,
// makes int_req pending; the pending request is dropped when the AGU
// acknowledges it (int_ack), i.e. when the jump to int_address is made.
// int_address is the entry point of the per-sample routine (0x0C).
// When the program executes ClearCodecIrq (clear_codec_irq), the ICU
// pulses codec_int_ack to the interface, which withdraws its request.
// There is no masking and a single source, as published. Edge detection
// of the request is this design's choice: it keeps a request that is still
// high from re-entering the routine before ClearCodecIrq has run.
module icu #(
  parameter int unsigned AW = 8,
  parameter logic [AW-1:0] INT_ADDRESS = 8'h0C
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          codec_irq,
  input  logic          codec_int_en,
  input  logic          int_ack,
  input  logic          clear_codec_irq,
  output logic          int_req,
  output logic [AW-1:0] int_address,
  output logic          codec_int_ack
);
  logic irq_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      irq_q   <= 1'b0;
      int_req <= 1'b0;
    end else begin
      irq_q <= codec_irq;
      if (codec_irq && !irq_q && codec_int_en) int_req <= 1'b1;
      else if (int_ack)                        int_req <= 1'b0;
    end
  end

  assign int_address   = INT_ADDRESS;
  assign codec_int_ack = clear_codec_irq;
endmodule
