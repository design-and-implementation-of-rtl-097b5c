// accumulator: the clocked "accumulator up" stage of the MAC unit.
//
// On every rising clock edge the register adds the incoming product q to its
// contents; while reset is high it loads zero instead. The sum wraps modulo
// 2^W: there is no overflow flag or saturation. The W-bit adder in front of
// the register is the only logic besides the flip-flops.
//
// Interface: clock, reset (synchronous, active high), q the product to add,
// acc the registered running sum. Timing: acc shows the sum including q one
// clock edge after q is presented; one new product can be taken every cycle.
//
// The 64-bit width and the presence of clock and reset follow the design.
// Synchronous active-high reset, accumulating on every edge with no enable,
// and wrap-around on overflow are this implementation's choices.
module accumulator #(
  parameter int unsigned W = mac_pkg::MAC_ACC_W
) (
  input  logic         clock,
  input  logic         reset,
  input  logic [W-1:0] q,
  output logic [W-1:0] acc
);
  always_ff @(posedge clock) begin
    if (reset) acc <= '0;
    else       acc <= acc + q;
  end
endmodule
