// tb_trans_instr_sm: drives each transfer opcode against a model DMA-bus
// master whose ok line drops for a random number of cycles. Checks the
// read/write strobe, the transfer size (word for READ/WRITE, halfword for
// the codec transfers), register and codec-register write-back at the end,
// codec_to_odb for READFROMCODEC, and that the unit is busy exactly for
// the request plus the master's operation plus one finishing cycle.
module tb_trans_instr_sm;
  import apc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  logic exec_en, ok, busy, re, we, reg_we, creg_we, c2o;
  logic [1:0] size;
  logic [2:0] ra, rb, wa, csel;
  instr_t ir;
  trans_instr_sm dut (.clk, .rst_n, .exec_en, .ir, .ok, .busy, .re, .we, .size,
                      .raddr_a(ra), .raddr_b(rb), .reg_we, .waddr(wa),
                      .codec_reg_sel(csel), .codec_reg_we(creg_we), .codec_to_odb(c2o));

  task automatic chk(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL %s op=%s at %0t", s, ir.opcode.name(), $time); end
  endtask

  // model master: accepts a request one cycle later, busy for op_len cycles
  int op_len, left;
  int n_req;
  always_ff @(posedge clk) begin
    if (ok && (re || we)) begin ok <= 0; left <= op_len; n_req <= n_req + 1; end
    else if (!ok && left > 0) left <= left - 1;
    else ok <= 1;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exec_en = 0; ir = '0; ok = 1; left = 0; op_len = 0; n_req = 0;
    #12 rst_n = 1;
    for (int n = 0; n < 80; n++) begin
      int b, req0;
      bit rd, fin_reg, fin_codec;
      @(negedge clk);
      ir.opcode = opcode_e'(4'(8 + n % 5));   // the four transfers, then JUMP
      ir.reg1 = 4'($urandom % 8); ir.reg2 = 4'($urandom % 8); ir.options = 0;
      op_len = int'($urandom % 6);
      rd = ir.opcode == OP_READ || ir.opcode == OP_WRITE2CODEC;
      req0 = n_req;
      exec_en = 1; @(negedge clk); exec_en = 0;
      if (ir.opcode == OP_JUMP) begin chk(!busy && !re && !we, "non-transfer ignored"); continue; end
      chk(re == rd && we == !rd, "strobe");
      chk(size == ((ir.opcode == OP_WRITE2CODEC || ir.opcode == OP_READFROMCODEC) ? SZ_HALF : SZ_WORD), "size");
      chk(ra == ir.reg1[2:0] && rb == ir.reg2[2:0] && csel == ir.reg1[2:0], "register fields");
      chk(c2o == (ir.opcode == OP_READFROMCODEC), "codec_to_odb");
      b = 0; fin_reg = 0; fin_codec = 0;
      while (busy) begin
        if (reg_we) begin fin_reg = 1; chk(wa == ir.reg1[2:0], "write-back register"); end
        if (creg_we) fin_codec = 1;
        @(negedge clk); b++;
      end
      chk(n_req == req0 + 1, "one request");
      chk(fin_reg == (ir.opcode == OP_READ), "register write-back");
      chk(fin_codec == (ir.opcode == OP_WRITE2CODEC), "codec register write");
      chk(b == op_len + 4, $sformatf("busy cycles %0d for op_len %0d", b, op_len));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
