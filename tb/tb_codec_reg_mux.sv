// tb_codec_reg_mux: checks in both modes (DmaEnable 0 and 1) who may write
// the codec TX registers, that RX registers are never written, the
// separate read ports, the READFROMCODEC data substitution on the DMA
// bus, and the routing of the codec interrupt and its acknowledge.
module tb_codec_reg_mux;
  int checks = 0, failures = 0;
  logic dma_en, bus_we, ctrl_we, c2o, irq, crack, dack;
  logic [2:0] bus_sel, ctrl_sel, rsa, rsb;
  logic [15:0] bus_wd, bus_rd, if_wd, rda, rdb;
  logic [31:0] ctrl_wd, odb_rd, odb_wd;
  logic if_we, cack, c2d, dspirq;
  logic [1:0] if_wsel;
  codec_reg_mux dut (.dma_enable(dma_en), .bus_we, .bus_sel, .bus_wdata(bus_wd), .bus_rdata(bus_rd),
                     .ctrl_we, .ctrl_sel, .codec_to_odb(c2o), .ctrl_wdata(ctrl_wd), .odb_rdata(odb_rd),
                     .odb_wdata(odb_wd), .if_we, .if_wsel, .if_wdata(if_wd), .if_rsel_a(rsa),
                     .if_rdata_a(rda), .if_rsel_b(rsb), .if_rdata_b(rdb), .codec_irq(irq),
                     .ctrl_reg_int_ack(crack), .dma2codec_int_ack(dack), .codec_int_ack(cack),
                     .codec2dma_irq(c2d), .dsp_codec_irq(dspirq));

  // model register file behind the two read ports
  function automatic logic [15:0] regval(input logic [2:0] s);
    return 16'h1111 * (16'(s) + 1);
  endfunction
  assign rda = regval(rsa);
  assign rdb = regval(rsb);

  task automatic chk(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL %s dma_en=%0d", s, dma_en); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      bit exp_we;
      dma_en = $urandom % 2; bus_we = $urandom % 2; ctrl_we = $urandom % 2; c2o = $urandom % 2;
      irq = $urandom % 2; crack = $urandom % 2; dack = $urandom % 2;
      bus_sel = 3'($urandom); ctrl_sel = 3'($urandom);
      bus_wd = 16'($urandom); ctrl_wd = $urandom; odb_rd = $urandom;
      #1;
      exp_we = dma_en ? (ctrl_we && ctrl_sel < 4) : (bus_we && bus_sel < 4);
      chk(if_we == exp_we, "write enable by mode");
      if (exp_we) begin
        chk(if_wsel == (dma_en ? ctrl_sel[1:0] : bus_sel[1:0]), "write select");
        chk(if_wd == (dma_en ? odb_rd[15:0] : bus_wd), "write data");
      end
      chk(bus_rd == regval(bus_sel), "bus read port");
      chk(odb_wd == (c2o ? {16'h0, regval(ctrl_sel)} : ctrl_wd), "DMA-bus write data");
      chk(c2d == (dma_en && irq) && dspirq == (!dma_en && irq), "interrupt routing");
      chk(cack == (dma_en ? dack : crack), "acknowledge routing");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
