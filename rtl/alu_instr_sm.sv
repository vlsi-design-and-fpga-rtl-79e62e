// alu_instr_sm: execution state machine for the eight ALU instructions
// (ADD, SUB, AND, OR, TESTEQZERO, MOVE, MOVE_ADDR, MOVE_CTRL).
//
// When exec_en arrives with an opcode whose top bit is 0, the machine goes
// busy for one cycle (EXEC). In that cycle it reads REG1 (raddr) and writes
// the result into REG2 (reg_we, waddr), choosing the write source with
// wsel: the ALU output, the DMA address register or the DMA control
// register. TESTEQZERO writes no register; it loads the TrueFalse flag
// (tf_we) from the ALU's zero output instead.
// Opcode grouping and "REG2 is the destination" follow the published
// instruction set; the single-cycle execution is this design's choice.
module alu_instr_sm
  import apc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       exec_en,
  input  instr_t     ir,
  output logic       busy,
  output logic       reg_we,
  output logic [2:0] raddr,
  output logic [2:0] waddr,
  output logic [1:0] wsel,     // 0 ALU, 1 dma_address, 2 dma_control
  output logic       tf_we
);
  logic active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      active <= 1'b0;
    else if (active) active <= 1'b0;
    else             active <= exec_en && !ir.opcode[3];
  end

  assign busy   = active;
  assign raddr  = ir.reg1[2:0];
  assign waddr  = ir.reg2[2:0];
  assign reg_we = active && (ir.opcode != OP_TESTEQZERO);
  assign tf_we  = active && (ir.opcode == OP_TESTEQZERO);
  always_comb begin
    unique case (ir.opcode)
      OP_MOVE_ADDR: wsel = 2'd1;
      OP_MOVE_CTRL: wsel = 2'd2;
      default:      wsel = 2'd0;
    endcase
  end
endmodule
