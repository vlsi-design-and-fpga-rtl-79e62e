// tb_spec_instr_sm: ClearCodecIrq pulses clear_codec_irq for one cycle;
// SendIrq2Dsp pulses igu_trigger and then stays busy until the DSP has
// acknowledged (irq_pending low), checked for random acknowledge delays;
// other opcodes leave the unit idle.
module tb_spec_instr_sm;
  import apc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  logic exec_en, pend, busy, clr, trig;
  instr_t ir;
  spec_instr_sm dut (.clk, .rst_n, .exec_en, .ir, .irq_pending(pend), .busy, .clear_codec_irq(clr), .igu_trigger(trig));

  task automatic chk(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model interrupt generation unit
  int ack_delay, cnt;
  always_ff @(posedge clk) begin
    if (trig) begin pend <= 1; cnt <= ack_delay; end
    else if (pend && cnt > 0) cnt <= cnt - 1;
    else if (pend) pend <= 0;
  end

  initial begin
    exec_en = 0; ir = '0; pend = 0; cnt = 0; ack_delay = 0;
    #12 rst_n = 1;
    for (int n = 0; n < 30; n++) begin
      int b;
      @(negedge clk);
      ir.opcode = opcode_e'(4'($urandom % 4 + 12)); // JUMP, CLR, SEND, NOP
      ack_delay = int'($urandom % 20);
      exec_en = 1; @(negedge clk); exec_en = 0;
      if (ir.opcode == OP_CLRCODECIRQ) begin
        chk(busy && clr && !trig, "clear pulse");
        @(negedge clk); chk(!busy && !clr, "clear one cycle");
      end else if (ir.opcode == OP_NOP) begin
        chk(busy && !clr && !trig, "nop");
        @(negedge clk); chk(!busy, "nop one cycle");
      end else if (ir.opcode == OP_SENDIRQ2DSP) begin
        chk(busy && trig, "trigger");
        b = 0;
        while (busy) begin @(negedge clk); b++; chk(!trig, "trigger one cycle"); end
        chk(b == ack_delay + 3, $sformatf("busy until acknowledged %0d/%0d", b, ack_delay));
      end else begin
        chk(!busy && !clr && !trig, "other opcode ignored");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
