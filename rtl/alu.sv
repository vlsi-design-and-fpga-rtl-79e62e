// alu: arithmetic logic unit of the audio port controller.
//
// Purely combinational. The first operand is the register named by REG1;
// the second comes from the instruction itself: OPTIONS indexes one of two
// 16-entry tables, immediate values for ADD/SUB and masks for AND/OR
// (apc_pkg::value_of / mask_of). MOVE passes the operand through. zero is
// high when the operand equals zero; it becomes the controller's TrueFalse
// flag on TESTEQZERO. The operation set and the operand-from-OPTIONS scheme
// follow the published instruction set; the table contents are this design's.
//
// Interface: opcode, options, a -> y, zero. No clock; result valid in the
// same cycle.
module alu
  import apc_pkg::*;
(
  input  opcode_e     opcode,
  input  logic [3:0]  options,
  input  logic [31:0] a,
  output logic [31:0] y,
  output logic        zero
);
  always_comb begin
    unique case (opcode)
      OP_ADD:  y = a + value_of(options);
      OP_SUB:  y = a - value_of(options);
      OP_AND:  y = a & mask_of(options);
      OP_OR:   y = a | mask_of(options);
      default: y = a;
    endcase
  end
  assign zero = (a == 32'd0);
endmodule
