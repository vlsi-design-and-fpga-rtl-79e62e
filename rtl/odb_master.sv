// odb_master: AHB master on the Off-Chip DMA Bus, with a simple request
// interface for the audio port controller.
//
// Request interface: while ok is high the master is free. The controller
// raises re or we with address, size (0 byte, 1 halfword, 2 word) and,
// for a write, wdata. The master takes the request, drops ok while busy
// and raises ok again when the bus transfer is over; a read's result is
// then on rdata, right-aligned (a halfword in [15:0]), and stays there
// until the next read.
//
// Bus side, one single (non-burst) transfer per request: ask the arbiter
// (hbusreq) until granted, drive one NONSEQ address phase with hlock
// high, then the data phase, waiting on hready in both. A write of a
// halfword or a byte replicates it over all byte lanes, so the target
// picks its lanes itself; a read picks the lanes that the endianness
// (1 = big endian) assigns to the address.
//
// Time-out: if a request is not finished TIMEOUT clock cycles after it
// was taken, the master abandons it, returns to idle, raises ok and
// pulses timeout. A read that timed out returns 0.
// Published: the request signals and their ok handshake, the AHB phases
// and the 20-cycle time-out. This design's: the exact cycle counting of
// the time-out, lane replication on writes and hlock during the address
// phase only (as drawn in the AHB write timing diagram).
module odb_master
  import apc_pkg::*;
#(
  parameter int unsigned TIMEOUT = 20
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        endianness,
  // request interface
  input  logic        re,
  input  logic        we,
  input  logic [1:0]  size,
  input  logic [31:0] address,
  input  logic [31:0] wdata,
  output logic        ok,
  output logic [31:0] rdata,
  output logic        timeout,
  // AHB master
  output logic        hbusreq,
  output logic        hlock,
  input  logic        hgrant,
  output logic [31:0] haddr,
  output logic [1:0]  htrans,
  output logic        hwrite,
  output logic [2:0]  hsize,
  output logic [2:0]  hburst,
  output logic [31:0] hwdata,
  input  logic [31:0] hrdata,
  input  logic        hready,
  input  logic [1:0]  hresp
);
  typedef enum logic [1:0] {S_IDLE, S_REQ, S_ADDR, S_DATA} state_e;
  state_e      state;
  logic [31:0] addr_q, wdata_q;
  logic [1:0]  size_q;
  logic        write_q;
  logic [$clog2(TIMEOUT+1)-1:0] cnt;
  logic        expire;

  assign expire = (state != S_IDLE) && (cnt == ($bits(cnt))'(TIMEOUT - 1));

  // lanes of a read
  function automatic logic [31:0] extract(input logic [31:0] d, input logic [1:0] a,
                                          input logic [1:0] sz, input logic big);
    logic [1:0] lane;
    lane = big ? ~a : a;
    unique case (sz)
      SZ_BYTE: return 32'(d[8*lane +: 8]);
      SZ_HALF: return 32'(d[16*lane[1] +: 16]);
      default: return d;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      addr_q  <= '0;
      wdata_q <= '0;
      size_q  <= SZ_WORD;
      write_q <= 1'b0;
      cnt     <= '0;
      rdata   <= '0;
      timeout <= 1'b0;
    end else begin
      timeout <= 1'b0;
      if (state == S_IDLE) cnt <= '0;
      else                 cnt <= cnt + 1'b1;
      if (expire) begin
        state   <= S_IDLE;
        timeout <= 1'b1;
        if (!write_q) rdata <= '0;
      end else begin
        unique case (state)
          S_IDLE:
            if (re || we) begin
              state   <= S_REQ;
              addr_q  <= address;
              size_q  <= size;
              write_q <= we;
              unique case (size)
                SZ_BYTE: wdata_q <= {4{wdata[7:0]}};
                SZ_HALF: wdata_q <= {2{wdata[15:0]}};
                default: wdata_q <= wdata;
              endcase
            end
          S_REQ:  if (hgrant && hready) state <= S_ADDR;
          S_ADDR: if (hready) state <= S_DATA;
          S_DATA:
            if (hready) begin
              state <= S_IDLE;
              if (!write_q) rdata <= extract(hrdata, addr_q[1:0], size_q, endianness);
            end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

  assign ok      = (state == S_IDLE);
  assign hbusreq = (state == S_REQ);
  assign hlock   = (state == S_ADDR);
  assign htrans  = (state == S_ADDR) ? HTRANS_NONSEQ : HTRANS_IDLE;
  assign haddr   = addr_q;
  assign hwrite  = write_q;
  assign hsize   = {1'b0, size_q};
  assign hburst  = 3'b000;             // SINGLE
  assign hwdata  = wdata_q;

  // The master never starts a transfer it was not granted.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state == S_REQ && hgrant && hready) |=> htrans == HTRANS_NONSEQ);
endmodule
