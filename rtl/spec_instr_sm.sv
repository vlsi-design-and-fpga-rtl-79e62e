// spec_instr_sm: execution state machine for ClearCodecIrq and SendIrq2Dsp
// (and for the unused opcode, which it runs as a one-cycle no-operation).
//
// ClearCodecIrq: one busy cycle in which clear_codec_irq is high; the ICU
//   turns it into the acknowledge towards the audio port interface.
// SendIrq2Dsp: pulses igu_trigger, then stays busy until the IGU's flag has
//   been cleared by the DSP, so the instruction ends only when the core has
//   acknowledged it, as published.
// The NOP handling is this design's choice: without it an unused opcode
// would leave the control machine waiting for a busy flag forever.
module spec_instr_sm
  import apc_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   exec_en,
  input  instr_t ir,
  input  logic   irq_pending,
  output logic   busy,
  output logic   clear_codec_irq,
  output logic   igu_trigger
);
  typedef enum logic [1:0] {S_IDLE, S_ONE, S_SET, S_WAIT_ACK} state_e;
  state_e state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= S_IDLE;
    else begin
      unique case (state)
        S_IDLE:
          if (exec_en) begin
            if (ir.opcode == OP_CLRCODECIRQ || ir.opcode == OP_NOP) state <= S_ONE;
            else if (ir.opcode == OP_SENDIRQ2DSP)                   state <= S_SET;
          end
        S_ONE:      state <= S_IDLE;
        S_SET:      state <= S_WAIT_ACK;
        S_WAIT_ACK: if (!irq_pending) state <= S_IDLE;
        default:    state <= S_IDLE;
      endcase
    end
  end

  assign busy            = (state != S_IDLE);
  assign clear_codec_irq = (state == S_ONE) && (ir.opcode == OP_CLRCODECIRQ);
  assign igu_trigger     = (state == S_SET);
endmodule
