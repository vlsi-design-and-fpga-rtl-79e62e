// tb_prog_mem: fills the 256 x 16 memory through port B, reads it back
// through both ports and checks the one-cycle read latency.
module tb_prog_mem;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = !clk;
  logic [7:0]  aa, ab;
  logic        web;
  logic [15:0] db, qa, qb;
  logic [15:0] ref_mem [256];

  prog_mem dut (.clk, .addr_a(aa), .q_a(qa), .addr_b(ab), .we_b(web), .d_b(db), .q_b(qb));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    aa = 0; ab = 0; web = 0; db = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); ab = 8'(i); web = 1; db = 16'($urandom); ref_mem[i] = db;
    end
    @(negedge clk); web = 0;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk); aa = 8'($urandom); ab = 8'($urandom);
      @(negedge clk);
      checks++;
      if (qa !== ref_mem[aa] || qb !== ref_mem[ab]) begin
        failures++; $display("FAIL aa=%0d qa=%h exp=%h", aa, qa, ref_mem[aa]);
      end
    end
    // latency: the new address is visible only after one edge
    @(negedge clk); aa = 8'd3; @(negedge clk); aa = 8'd200; #1;
    checks++;
    if (qa !== ref_mem[3]) begin failures++; $display("FAIL latency"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
