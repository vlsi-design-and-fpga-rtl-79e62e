// tb_jump_instr_sm: checks the taken/not-taken decision for each
// condition code and flag value, the {REG1, REG2} target, the one-cycle
// busy, and that a non-jump instruction clears jump_taken.
module tb_jump_instr_sm;
  import apc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  logic exec_en, tf, busy, taken;
  logic [7:0] target;
  instr_t ir;
  jump_instr_sm dut (.clk, .rst_n, .exec_en, .ir, .true_false(tf), .busy, .jump_taken(taken), .jump_address(target));

  task automatic chk(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL %s opt=%0d tf=%0d", s, ir.options, tf); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exec_en = 0; ir = '0; tf = 0;
    #12 rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      bit exp;
      @(negedge clk);
      ir.opcode = ($urandom % 4 == 0) ? OP_ADD : OP_JUMP;
      ir.options = 4'($urandom % 4); ir.reg1 = 4'($urandom); ir.reg2 = 4'($urandom);
      tf = $urandom % 2;
      exp = ir.opcode == OP_JUMP && (ir.options == 0 || (ir.options == 1 && tf) || (ir.options == 2 && !tf));
      exec_en = 1;
      @(negedge clk); exec_en = 0;
      chk(busy == (ir.opcode == OP_JUMP), "busy");
      chk(taken == exp, "decision");
      chk(target == {ir.reg1, ir.reg2}, "target");
      @(negedge clk);
      chk(!busy && taken == exp, "decision held, busy one cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
