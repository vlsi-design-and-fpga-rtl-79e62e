// tb_fpga_ctrl_reg: writes random values and checks read-back of every
// field at its published bit position, that unused bits read 0, and that
// the two acknowledge bits (0 and 14) clear themselves after one cycle.
module tb_fpga_ctrl_reg;
  import apc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  logic we;
  logic [31:0] wd, rd;
  fpga_ctrl_t ctrl;
  fpga_ctrl_reg dut (.clk, .rst_n, .we, .wdata(wd), .ctrl, .rdata(rd));

  task automatic chk(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL %s wd=%h rd=%h", s, wd, rd); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; wd = 0;
    #12 rst_n = 1;
    @(negedge clk); chk(rd == 0, "reset value");
    for (int n = 0; n < 100; n++) begin
      @(negedge clk); wd = $urandom; we = 1;
      @(negedge clk); we = 0;
      chk(rd == (wd & 32'h7FF7), "read-back mask");
      chk(ctrl.codec_int_ack == wd[0] && ctrl.codec_int_enable == wd[1] && ctrl.codec_int_reset_n == wd[2], "codec irq bits 0-2");
      chk(ctrl.dip_switches == wd[7:4], "divider bits 4-7");
      chk(ctrl.endianness == wd[8] && ctrl.codec_dc == wd[9] && ctrl.master_slave == wd[10] && ctrl.loopback == wd[11], "bits 8-11");
      chk(ctrl.dma_enable == wd[12] && ctrl.dma_int_enable == wd[13] && ctrl.dma_int_ack == wd[14], "bits 12-14");
      @(negedge clk);
      chk(rd == (wd & 32'h3FF6), "acknowledge bits self-clear");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
