// agu: address generation unit (program counter) of the audio port controller.
//
// When the control state machine pulses enable in the address-generation
// phase, the next program address is chosen in this priority:
//   1. a pending interrupt (int_req): load int_address and pulse int_ack;
//   2. a taken JUMP (load_jump, i.e. LoadInc): load new_address;
//   3. otherwise increment the present address.
// The priority and the port list follow the published description.
// clear forces the counter to 0 (used while the controller is disabled);
// that input is this design's addition. Reset also sets the counter to 0.
module agu #(
  parameter int unsigned AW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          enable,
  input  logic          load_jump,
  input  logic [AW-1:0] new_address,
  input  logic [AW-1:0] int_address,
  input  logic          int_req,
  output logic          int_ack,
  output logic [AW-1:0] address_out
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      address_out <= '0;
    end else if (clear) begin
      address_out <= '0;
    end else if (enable) begin
      if (int_req)        address_out <= int_address;
      else if (load_jump) address_out <= new_address;
      else                address_out <= address_out + 1'b1;
    end
  end

  assign int_ack = enable && int_req && !clear;
endmodule
