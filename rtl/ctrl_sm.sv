// ctrl_sm: instruction-flow state machine of the audio port controller.
//
// Steps every instruction through fetch, execution and address generation:
//   IDLE      one cycle for the program memory to present the word at the PC
//   FETCH     load_ir: the instruction register takes the program word
//   HOLD      only in debug mode: wait for a rising edge of debug_step
//   START     exec_en: the four execution state machines look at the opcode
//   WAIT_BUSY wait until the machine that took the opcode raises its busy flag
//   WAIT_DONE wait until every busy flag is low again
//   AGEN      agu_en: the AGU loads the next address (interrupt, jump or +1)
// Execution time is open-ended because transfers wait for the DMA bus.
// run low (controller disabled) parks the machine in IDLE.
// The phase sequence, the busy-flag semaphore and the single-step debug
// mode follow the published design. Where debug mode stops (after the
// fetch, before execution) follows the text; the state encoding and the
// single AGEN cycle are this design's. debug_step is edge detected, so a
// step bit that stays high runs one instruction only.
module ctrl_sm (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       run,
  input  logic       debug_en,
  input  logic       debug_step,
  input  logic [3:0] busy_flags,
  output logic       load_ir,
  output logic       exec_en,
  output logic       agu_en,
  output logic [2:0] state_o
);
  typedef enum logic [2:0] {
    S_IDLE, S_FETCH, S_HOLD, S_START, S_WAIT_BUSY, S_WAIT_DONE, S_AGEN
  } state_e;

  state_e state, state_n;
  logic   step_q, step_pending;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      step_q       <= 1'b0;
      step_pending <= 1'b0;
    end else begin
      state  <= state_n;
      step_q <= debug_step;
      if (debug_step && !step_q)   step_pending <= 1'b1;
      else if (state == S_HOLD && step_pending) step_pending <= 1'b0;
    end
  end

  always_comb begin
    state_n = state;
    unique case (state)
      S_IDLE:      if (run) state_n = S_FETCH;
      S_FETCH:     state_n = debug_en ? S_HOLD : S_START;
      S_HOLD:      if (!debug_en || step_pending) state_n = S_START;
      S_START:     state_n = S_WAIT_BUSY;
      S_WAIT_BUSY: if (busy_flags != 4'b0000) state_n = S_WAIT_DONE;
      S_WAIT_DONE: if (busy_flags == 4'b0000) state_n = S_AGEN;
      S_AGEN:      state_n = S_IDLE;
      default:     state_n = S_IDLE;
    endcase
  end

  assign load_ir = (state == S_FETCH);
  assign exec_en = (state == S_START);
  assign agu_en  = (state == S_AGEN);
  assign state_o = state;
endmodule
