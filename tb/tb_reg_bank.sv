// tb_reg_bank: writes random values into random registers and compares
// both read ports with a reference array; checks the reset value.
module tb_reg_bank;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  logic        we;
  logic [2:0]  wa, ra, rb;
  logic [31:0] wd, qa, qb;
  logic [31:0] ref_regs [8];

  reg_bank dut (.clk, .rst_n, .write_enable(we), .waddr(wa), .wdata(wd),
                .raddr_a(ra), .rdata_a(qa), .raddr_b(rb), .rdata_b(qb));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; wa = 0; wd = 0; ra = 0; rb = 0;
    for (int i = 0; i < 8; i++) ref_regs[i] = 0;
    #12 rst_n = 1;
    for (int i = 0; i < 8; i++) begin
      ra = 3'(i); #1; checks++;
      if (qa !== 0) begin failures++; $display("FAIL reset reg %0d", i); end
    end
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      we = ($urandom % 3) != 0; wa = 3'($urandom); wd = $urandom;
      ra = 3'($urandom); rb = 3'($urandom);
      #1;
      checks++;
      if (qa !== ref_regs[ra] || qb !== ref_regs[rb]) begin
        failures++; $display("FAIL read ra=%0d qa=%h exp=%h rb=%0d qb=%h exp=%h", ra, qa, ref_regs[ra], rb, qb, ref_regs[rb]);
      end
      @(posedge clk);
      if (we) ref_regs[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
