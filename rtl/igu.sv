// igu: interrupt generation unit of the audio port controller.
//
// A set/reset flag. SendIrq2Dsp sets it (trigger); the DSP clears it by
// writing the acknowledge bit of the User FPGA Control Register (ack).
// irq_pending is the flag; dma_irq, the pin towards the DSP, is the flag
// gated by DmaIntEnable. Set-by-instruction and reset-by-core follow the
// published description; acknowledge taking priority over a simultaneous
// trigger is this design's choice.
module igu (
  input  logic clk,
  input  logic rst_n,
  input  logic trigger,
  input  logic ack,
  input  logic dma_int_enable,
  output logic irq_pending,
  output logic dma_irq
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       irq_pending <= 1'b0;
    else if (ack)     irq_pending <= 1'b0;
    else if (trigger) irq_pending <= 1'b1;
  end
  assign dma_irq = irq_pending && dma_int_enable;
endmodule
