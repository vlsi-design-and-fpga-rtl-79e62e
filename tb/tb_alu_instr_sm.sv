// tb_alu_instr_sm: for every opcode, checks that an ALU instruction
// (opcodes 0-7) is busy for exactly one cycle after exec_en and raises the
// right write strobe and write source, and that other opcodes do nothing.
module tb_alu_instr_sm;
  import apc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  logic exec_en, busy, reg_we, tf_we;
  instr_t ir;
  logic [2:0] raddr, waddr;
  logic [1:0] wsel;
  alu_instr_sm dut (.clk, .rst_n, .exec_en, .ir, .busy, .reg_we, .raddr, .waddr, .wsel, .tf_we);

  task automatic chk(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL %s op=%0d", s, ir.opcode); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exec_en = 0; ir = '0;
    #12 rst_n = 1;
    for (int n = 0; n < 64; n++) begin
      bit is_alu;
      @(negedge clk);
      ir.opcode = opcode_e'(4'(n % 16)); ir.options = 4'($urandom);
      ir.reg1 = 4'($urandom % 8); ir.reg2 = 4'($urandom % 8);
      is_alu = (n % 16) < 8;
      exec_en = 1; #1 chk(!busy, "not busy before edge");
      @(negedge clk); exec_en = 0;
      chk(busy == is_alu, "busy in cycle 1");
      chk(reg_we == (is_alu && ir.opcode != OP_TESTEQZERO), "reg_we");
      chk(tf_we == (is_alu && ir.opcode == OP_TESTEQZERO), "tf_we");
      chk(raddr == ir.reg1[2:0] && waddr == ir.reg2[2:0], "register fields");
      chk(wsel == (ir.opcode == OP_MOVE_ADDR ? 2'd1 : ir.opcode == OP_MOVE_CTRL ? 2'd2 : 2'd0), "wsel");
      @(negedge clk);
      chk(!busy && !reg_we && !tf_we, "one cycle only");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
