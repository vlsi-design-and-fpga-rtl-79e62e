// tb_odb_master: runs word, halfword and byte reads and writes through the
// DMA-bus master into an SRAM model, in both endiannesses, with random
// wait states, and compares against the SRAM's contents read by address.
// Checks the request/ok handshake and its cycle count (4 cycles plus the
// wait states with a one-cycle grant), and that a transfer still unfinished
// after TIMEOUT = 20 cycles is abandoned exactly then with a timeout pulse.
module tb_odb_master;
  import apc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic        big, re, we, ok, tmo;
  logic [1:0]  size;
  logic [31:0] address, wdata, rdata;
  logic        hbusreq, hlock, hgrant, hwrite, hready;
  logic [31:0] haddr, hwdata, hrdata;
  logic [1:0]  htrans;
  logic [2:0]  hsize, hburst;
  int          stall;

  odb_master dut (.clk, .rst_n, .endianness(big), .re, .we, .size, .address, .wdata, .ok, .rdata,
                  .timeout(tmo), .hbusreq, .hlock, .hgrant, .haddr, .htrans, .hwrite, .hsize,
                  .hburst, .hwdata, .hrdata, .hready, .hresp(2'b00));
  sram_model #(.WORDS(256)) u_sram (.clk, .rst_n, .big, .stall, .hbusreq, .hlock, .hgrant, .haddr,
                                    .htrans, .hwrite, .hsize, .hwdata, .hrdata, .hready);

  task automatic chk(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask

  int n_tmo = 0;
  always @(posedge clk) if (tmo) n_tmo++;

  // one request; returns the cycles ok was low
  task automatic xfer(input bit wr, input logic [1:0] sz, input logic [31:0] a, input logic [31:0] d,
                      output int cyc);
    @(negedge clk);
    re = !wr; we = wr; size = sz; address = a; wdata = d;
    @(negedge clk); re = 0; we = 0;
    cyc = 0;
    while (!ok) begin cyc++; @(negedge clk); end
  endtask

  function automatic logic [31:0] mem_rd(input logic [1:0] sz, input logic [31:0] a);
    unique case (sz)
      SZ_BYTE: return 32'(u_sram.mem[a]);
      SZ_HALF: return 32'(u_sram.rd16(a));
      default: return u_sram.rd32(a);
    endcase
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, tmo0;
    logic [31:0] a, d;
    logic [1:0] sz;
    big = 0; re = 0; we = 0; size = SZ_WORD; address = 0; wdata = 0; stall = 0;
    #12 rst_n = 1;
    for (int i = 0; i < 256; i++) u_sram.wr32(32'(4 * i), $urandom);
    for (int n = 0; n < 400; n++) begin
      bit wr;
      big = (n / 100) % 2;
      sz = 2'($urandom % 3);
      a = 32'($urandom % 1024);
      a = (sz == SZ_WORD) ? {a[31:2], 2'b00} : (sz == SZ_HALF) ? {a[31:1], 1'b0} : a;
      wr = $urandom % 2;
      d = $urandom;
      stall = (n % 10 == 9) ? 16 + int'($urandom % 8) : int'($urandom % 4);
      tmo0 = n_tmo;
      xfer(wr, sz, a, d, cyc);
      if (stall >= 16) begin
        chk(cyc == 20, $sformatf("timeout after 20 cycles (%0d)", cyc));
        chk(tmo, "timeout pulse with ok");
        @(negedge clk);
        chk(n_tmo == tmo0 + 1 && !tmo, "single timeout pulse");
        chk(wr || rdata == 0, "abandoned read returns 0");
        stall = 0;
        repeat (30) @(negedge clk);   // let the slave finish the abandoned transfer
        continue;
      end
      chk(cyc == 4 + stall, $sformatf("cycle count %0d for stall %0d", cyc, stall));
      chk(n_tmo == tmo0, "no timeout");
      if (wr) begin
        logic [31:0] m;
        m = (sz == SZ_BYTE) ? 32'hFF : (sz == SZ_HALF) ? 32'hFFFF : 32'hFFFF_FFFF;
        @(negedge clk);
        chk(mem_rd(sz, a) == (d & m), $sformatf("write sz=%0d a=%h big=%0d", sz, a, big));
      end else begin
        chk(rdata == mem_rd(sz, a), $sformatf("read sz=%0d a=%h big=%0d got %h", sz, a, big, rdata));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
