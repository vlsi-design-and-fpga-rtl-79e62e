// tb_igu: trigger sets the DSP interrupt, the DSP acknowledge clears it,
// DmaIntEnable gates the pin but not the pending flag.
module tb_igu;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  logic trig, ack, en, pend, irq;
  igu dut (.clk, .rst_n, .trigger(trig), .ack, .dma_int_enable(en), .irq_pending(pend), .dma_irq(irq));

  task automatic chk(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    trig = 0; ack = 0; en = 1;
    #12 rst_n = 1;
    @(negedge clk); chk(!pend && !irq, "idle after reset");
    trig = 1; @(negedge clk); trig = 0;
    chk(pend && irq, "set by trigger");
    repeat (4) @(negedge clk); chk(irq, "held until acknowledged");
    en = 0; #1 chk(!irq && pend, "pin gated by enable");
    en = 1; ack = 1; @(negedge clk); ack = 0;
    chk(!pend && !irq, "cleared by acknowledge");
    trig = 1; ack = 1; @(negedge clk); trig = 0; ack = 0;
    chk(!pend, "acknowledge wins over trigger");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
