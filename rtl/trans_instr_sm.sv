// trans_instr_sm: execution state machine for the four transfer
// instructions READ, WRITE, WRITE2CODEC and READFROMCODEC.
//
// Uses the simple request interface of the ODB (DMA bus) master:
//   REQ   raise re (READ, WRITE2CODEC) or we (WRITE, READFROMCODEC) with
//         size until the master accepts by dropping ok;
//   WAIT  wait for ok to rise again: the bus operation is over;
//   FIN   READ writes the returned word into REG1 (reg_we);
//         WRITE2CODEC writes the returned halfword into codec register
//         REG1 (codec_reg_we).
// The SRAM address is always the register named by REG2 (raddr_b); the data
// of WRITE is the register named by REG1 (raddr_a). For READFROMCODEC the
// data is codec register REG1, which codec_to_odb routes to the master.
// Word transfers for READ/WRITE and halfword transfers for the codec
// follow the published design; the three-state sequence is this design's.
module trans_instr_sm
  import apc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       exec_en,
  input  instr_t     ir,
  input  logic       ok,
  output logic       busy,
  output logic       re,
  output logic       we,
  output logic [1:0] size,
  output logic [2:0] raddr_a,
  output logic [2:0] raddr_b,
  output logic       reg_we,
  output logic [2:0] waddr,
  output logic [2:0] codec_reg_sel,
  output logic       codec_reg_we,
  output logic       codec_to_odb
);
  typedef enum logic [1:0] {S_IDLE, S_REQ, S_WAIT, S_FIN} state_e;
  state_e state;

  logic is_read;   // data moves from SRAM into the controller side
  assign is_read = (ir.opcode == OP_READ) || (ir.opcode == OP_WRITE2CODEC);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= S_IDLE;
    else begin
      unique case (state)
        S_IDLE:  if (exec_en && ir.opcode[3:2] == 2'b10) state <= S_REQ;
        S_REQ:   if (!ok) state <= S_WAIT;
        S_WAIT:  if (ok)  state <= S_FIN;
        S_FIN:   state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy          = (state != S_IDLE);
  assign re            = (state == S_REQ) && is_read;
  assign we            = (state == S_REQ) && !is_read;
  assign size          = ir.opcode[1] ? SZ_HALF : SZ_WORD;
  assign raddr_a       = ir.reg1[2:0];
  assign raddr_b       = ir.reg2[2:0];
  assign waddr         = ir.reg1[2:0];
  assign reg_we        = (state == S_FIN) && (ir.opcode == OP_READ);
  assign codec_reg_sel = ir.reg1[2:0];
  assign codec_reg_we  = (state == S_FIN) && (ir.opcode == OP_WRITE2CODEC);
  assign codec_to_odb  = busy && (ir.opcode == OP_READFROMCODEC);
endmodule
