// jump_instr_sm: execution state machine for JUMP.
//
// On exec_en with the JUMP opcode it goes busy for one cycle and decides
// whether the jump is taken from the condition in OPTIONS (ANYCASE, IFTRUE,
// IFFALSE) and the TrueFalse flag. The decision (jump_taken) and the 8-bit
// target {REG1, REG2} are held until the next JUMP, for the AGU to use in
// the address-generation phase. Any other instruction clears jump_taken.
// Conditions and target packing follow the published instruction set; the
// numeric condition codes are this design's (apc_pkg::COND_*). An unknown
// condition code is never taken.
module jump_instr_sm
  import apc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       exec_en,
  input  instr_t     ir,
  input  logic       true_false,
  output logic       busy,
  output logic       jump_taken,
  output logic [7:0] jump_address
);
  logic active;
  logic cond;

  always_comb begin
    unique case (ir.options)
      COND_ANYCASE: cond = 1'b1;
      COND_IFTRUE:  cond = true_false;
      COND_IFFALSE: cond = !true_false;
      default:      cond = 1'b0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active     <= 1'b0;
      jump_taken <= 1'b0;
    end else begin
      active <= exec_en && (ir.opcode == OP_JUMP);
      if (exec_en) jump_taken <= (ir.opcode == OP_JUMP) && cond;
    end
  end

  assign busy         = active;
  assign jump_address = {ir.reg1, ir.reg2};
endmodule
