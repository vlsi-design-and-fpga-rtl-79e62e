// tb_agu: checks increment, jump load, interrupt priority with int_ack,
// hold when not enabled, and clear.
module tb_agu;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  logic clear, en, lj, ir, ia;
  logic [7:0] na, iad, pc;
  agu dut (.clk, .rst_n, .clear, .enable(en), .load_jump(lj), .new_address(na),
           .int_address(iad), .int_req(ir), .int_ack(ia), .address_out(pc));

  task automatic chk(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL %s pc=%0d", s, pc); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] model;
    clear = 0; en = 0; lj = 0; ir = 0; na = 0; iad = 8'h0C;
    #12 rst_n = 1;
    model = 0;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      en = $urandom % 2; lj = $urandom % 2; ir = ($urandom % 5) == 0; na = 8'($urandom);
      clear = ($urandom % 40) == 0;
      #1;
      chk(ia == (en && ir && !clear), "int_ack");
      if (clear) model = 0;
      else if (en) model = ir ? iad : (lj ? na : model + 1);
      @(posedge clk); #1;
      chk(pc == model, "next address");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
