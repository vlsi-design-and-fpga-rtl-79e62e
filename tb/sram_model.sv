// sram_model: behavioural model of the DSP's on-chip SRAM as seen from the
// DMA bus, with the bus arbiter, for simulation only.
//
// AHB slave with a one-master arbiter: hgrant follows hbusreq one cycle
// later. A transfer's data phase lasts 1 + stall cycles (hready low while
// stalling); stall is taken from the input when the address phase is
// accepted. The memory is byte addressed (WORDS 32-bit words, wrapping);
// big = 1 selects big-endian byte lanes, 0 little-endian, for the bus and
// for the backdoor functions rd32/wr32/rd16 that testbenches use in place
// of the DSP's own port. Counters: reads, writes, halfword accesses and
// stalled transfers.
module sram_model #(
  parameter int WORDS = 4096
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        big,
  input  int          stall,
  input  logic        hbusreq,
  input  logic        hlock,
  output logic        hgrant,
  input  logic [31:0] haddr,
  input  logic [1:0]  htrans,
  input  logic        hwrite,
  input  logic [2:0]  hsize,
  input  logic [31:0] hwdata,
  output logic [31:0] hrdata,
  output logic        hready
);
  logic [7:0] mem [0:4*WORDS-1];
  int n_reads, n_writes, n_half, n_stalled;

  logic        dp;          // data phase active
  logic [31:0] a_q;
  logic        w_q;
  logic [2:0]  s_q;
  int          wait_left;

  function automatic int idx(input logic [31:0] a);
    return int'(a % (4 * WORDS));
  endfunction
  function automatic int lane_of(input logic [31:0] a);  // byte lane of address a
    return big ? 3 - int'(a[1:0]) : int'(a[1:0]);
  endfunction

  function automatic logic [31:0] rd32(input logic [31:0] a);
    logic [31:0] v;
    for (int i = 0; i < 4; i++) v[8*lane_of(a + 32'(i)) +: 8] = mem[idx(a + 32'(i))];
    return v;
  endfunction
  function automatic void wr32(input logic [31:0] a, input logic [31:0] d);
    for (int i = 0; i < 4; i++) mem[idx(a + 32'(i))] = d[8*lane_of(a + 32'(i)) +: 8];
  endfunction
  function automatic logic [15:0] rd16(input logic [31:0] a);
    return big ? {mem[idx(a)], mem[idx(a + 1)]} : {mem[idx(a + 1)], mem[idx(a)]};
  endfunction
  function automatic void wr16(input logic [31:0] a, input logic [15:0] d);
    mem[idx(a)]     = big ? d[15:8] : d[7:0];
    mem[idx(a + 1)] = big ? d[7:0]  : d[15:8];
  endfunction

  initial begin
    for (int i = 0; i < 4 * WORDS; i++) mem[i] = 8'h00;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) hgrant <= 1'b0;
    else        hgrant <= hbusreq || hlock;
  end

  assign hready = !dp || (wait_left == 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dp <= 1'b0; a_q <= '0; w_q <= 1'b0; s_q <= '0; wait_left <= 0;
      n_reads <= 0; n_writes <= 0; n_half <= 0; n_stalled <= 0;
    end else begin
      if (dp && wait_left > 0) wait_left <= wait_left - 1;
      if (hready) begin
        if (dp && w_q) begin
          for (int i = 0; i < 4; i++) begin
            int b;
            b = i;
            if ((s_q == 3'd2) ||
                (s_q == 3'd1 && (lane_of(a_q) >> 1) == (b >> 1)) ||
                (s_q == 3'd0 && lane_of(a_q) == b))
              mem[idx({a_q[31:2], 2'b00} + 32'(big ? 3 - b : b))] <= hwdata[8*b +: 8];
          end
        end
        dp <= htrans[1];
        if (htrans[1]) begin
          a_q <= haddr; w_q <= hwrite; s_q <= hsize;
          wait_left <= stall;
          if (stall > 0) n_stalled <= n_stalled + 1;
          if (hwrite) n_writes <= n_writes + 1; else n_reads <= n_reads + 1;
          if (hsize == 3'd1) n_half <= n_half + 1;
        end
      end
    end
  end

  assign hrdata = (dp && !w_q) ? rd32({a_q[31:2], 2'b00}) : 32'h0;
endmodule
