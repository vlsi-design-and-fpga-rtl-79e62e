// tb_ctrl_sm: drives the controller's main state machine with a model
// execution unit that stays busy for a random 1..6 cycles after exec_en.
// Checks the order fetch -> execute -> address generation, the cycle
// count of one instruction (busy cycles + 5), that run=0 stops it in
// idle, and that debug mode holds each instruction until a rising edge
// of debug_step.
module tb_ctrl_sm;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  logic run, den, dstep, load_ir, exec_en, agu_en;
  logic [3:0] busy;
  logic [2:0] st;
  int busy_left, busy_len;
  ctrl_sm dut (.clk, .rst_n, .run, .debug_en(den), .debug_step(dstep), .busy_flags(busy),
               .load_ir, .exec_en, .agu_en, .state_o(st));

  // model execution unit: one of the four busy flags, chosen at random
  int unit_sel;
  always_ff @(posedge clk) begin
    if (exec_en) begin busy_left <= busy_len; unit_sel <= int'($urandom % 4); end
    else if (busy_left > 0) busy_left <= busy_left - 1;
  end
  always_comb busy = (busy_left > 0) ? 4'(1 << unit_sel) : 4'b0;

  task automatic chk(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // phase order monitor: load_ir, exec_en, agu_en must alternate in order
  int phase = 0;
  always @(posedge clk) if (rst_n) begin
    if (load_ir) begin chk(phase == 0, "fetch out of order"); phase = 1; end
    if (exec_en) begin chk(phase == 1, "execute out of order"); phase = 2; end
    if (agu_en)  begin chk(phase == 2 && busy == 0, "agen out of order"); phase = 0; end
  end

  initial begin
    int t0, n;
    run = 0; den = 0; dstep = 0; busy_left = 0; busy_len = 1; unit_sel = 0;
    #12 rst_n = 1;
    repeat (5) @(negedge clk);
    chk(st == 3'd0 && !load_ir, "stays idle without run");
    run = 1;
    for (n = 0; n < 40; n++) begin
      busy_len = 1 + int'($urandom % 6);
      @(posedge clk iff load_ir); t0 = int'($time / 10);
      @(posedge clk iff agu_en);  @(posedge clk);
      @(posedge clk iff load_ir);
      chk(int'($time / 10) - t0 == busy_len + 5, $sformatf("instruction cycles %0d", int'($time / 10) - t0));
    end
    // stop
    @(negedge clk iff agu_en); run = 0;
    repeat (6) @(negedge clk);
    chk(!load_ir && st == 3'd0, "stopped in idle");
    // debug single step
    den = 1; run = 1;
    for (n = 0; n < 5; n++) begin
      @(posedge clk iff load_ir);
      repeat (8) begin @(posedge clk); chk(!exec_en, "debug mode holds"); end
      @(negedge clk); dstep = 1;
      @(posedge clk iff exec_en); chk(1, "step runs");
      @(negedge clk); dstep = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
