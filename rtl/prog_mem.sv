// prog_mem: program memory of the audio port controller, 256 x 16 bit.
//
// A true dual-port RAM. Port A is read-only and used by the controller as
// its instruction ROM: the word at addr_a appears on q_a one clock later.
// Port B belongs to the system bus: the DSP can write (we_b) and read it,
// read data again one clock after the address. Word count and width follow
// the published design; that both ports have one cycle of read latency is
// this design's choice (it matches block-RAM behaviour).
// The contents are not reset; a program is loaded over port B.
module prog_mem #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic [AW-1:0]    addr_a,
  output logic [WIDTH-1:0] q_a,
  input  logic [AW-1:0]    addr_b,
  input  logic             we_b,
  input  logic [WIDTH-1:0] d_b,
  output logic [WIDTH-1:0] q_b
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    q_a <= mem[addr_a];
  end

  always_ff @(posedge clk) begin
    if (we_b) mem[addr_b] <= d_b;
    q_b <= mem[addr_b];
  end
endmodule
