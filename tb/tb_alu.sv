// tb_alu: checks every ALU operation against values computed here, for
// random operands and every OPTIONS index, and the zero flag.
module tb_alu;
  import apc_pkg::*;
  int checks = 0, failures = 0;
  opcode_e     op;
  logic [3:0]  opt;
  logic [31:0] a, y;
  logic        zero;

  alu dut (.opcode(op), .options(opt), .a, .y, .zero);

  // independent copies of the operand tables
  logic [31:0] vals [16] = '{0, 1, 2, 4, 8, 12, 16, 20, 24, 32, 32'h100, 32'h10000, 64, 128, 1024, 32'hFFFFFFFF};
  logic [31:0] msks [16] = '{32'h1, 32'h2, 32'h3, 32'h4, 32'h8, 32'h10, 32'hFFFF0000, 32'hFFFFFFF7,
                             32'hFFFF, 32'hFF, 32'hFFFFFFFC, 32'hFFFFFFEF, 32'hFF00, 32'hFF000000,
                             32'h7FFFFFFF, 32'hFFFFFFFF};

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp;
    for (int n = 0; n < 400; n++) begin
      a   = (n % 10 == 0) ? 32'h0 : $urandom;
      opt = 4'(n % 16);
      op  = opcode_e'(4'(n / 16 % 8));
      #1;
      unique case (op)
        OP_ADD: exp = a + vals[opt];
        OP_SUB: exp = a - vals[opt];
        OP_AND: exp = a & msks[opt];
        OP_OR:  exp = a | msks[opt];
        default: exp = a;
      endcase
      checks++;
      if (y !== exp || zero !== (a == 0)) begin
        failures++;
        $display("FAIL op=%s opt=%0d a=%h y=%h exp=%h", op.name(), opt, a, y, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
