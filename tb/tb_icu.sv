// tb_icu: an enabled rising codec request becomes int_req until int_ack;
// a disabled one is ignored; a request held high does not re-trigger;
// ClearCodecIrq produces the codec acknowledge; int_address is 0x0C.
module tb_icu;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  logic irq, en, ack, clr, req, cack;
  logic [7:0] iad;
  icu dut (.clk, .rst_n, .codec_irq(irq), .codec_int_en(en), .int_ack(ack),
           .clear_codec_irq(clr), .int_req(req), .int_address(iad), .codec_int_ack(cack));

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
    irq = 0; en = 1; ack = 0; clr = 0;
    #12 rst_n = 1;
    chk(iad == 8'h0C, "interrupt address");
    @(negedge clk); irq = 1;
    @(negedge clk); chk(req, "request pending after rising edge");
    repeat (3) @(negedge clk); chk(req, "request held");
    ack = 1; @(negedge clk); ack = 0; chk(!req, "cleared by int_ack");
    repeat (5) @(negedge clk); chk(!req, "held-high request does not re-trigger");
    clr = 1; #1 chk(cack, "ClearCodecIrq acknowledges codec"); @(negedge clk); clr = 0; irq = 0;
    #1 chk(!cack, "acknowledge is a pulse");
    en = 0; @(negedge clk); irq = 1; @(negedge clk); @(negedge clk);
    chk(!req, "disabled request ignored");
    irq = 0; en = 1; @(negedge clk); irq = 1; @(negedge clk);
    chk(req, "second request");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
