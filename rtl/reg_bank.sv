// reg_bank: register bank of the audio port controller, 8 x 32 bit.
//
// One synchronous write port (write_enable, waddr, wdata) and two
// combinational read ports. Port A feeds the ALU and the ODB write data,
// port B the ODB address. The published block diagram draws one read
// address; a second read port is this design's choice so that a transfer
// instruction can present address and data in the same cycle.
// Register contents are cleared by reset.
module reg_bank #(
  parameter int unsigned NREGS = 8,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW = $clog2(NREGS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             write_enable,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr_a,
  output logic [WIDTH-1:0] rdata_a,
  input  logic [AW-1:0]    raddr_b,
  output logic [WIDTH-1:0] rdata_b
);
  logic [WIDTH-1:0] regs [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NREGS); i++) regs[i] <= '0;
    end else if (write_enable) begin
      regs[waddr] <= wdata;
    end
  end

  assign rdata_a = regs[raddr_a];
  assign rdata_b = regs[raddr_b];
endmodule
