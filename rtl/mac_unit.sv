// mac_unit: 32-bit multiply-accumulate unit built on a Vedic multiplier.
//
// Two N-bit unsigned operands a and b go through the combinational Vedic
// multiplier (vedic_mul), whose 2N-bit product Q feeds the accumulator, a
// clocked 2N-bit register that adds Q to its contents on every rising edge
// and clears on reset. The result is acc = sum of a*b over the cycles since
// reset, modulo 2^(2N).
//
// Interface: clock, reset (synchronous, active high), a and b (N bits each),
// acc (2N bits). Timing: one multiply-accumulate per clock; acc includes the
// product of the a, b present at an edge right after that edge. The critical
// path runs from a, b through the multiplier and the accumulator adder to the
// register.
//
// The block structure (multiplier into accumulator with clock and reset) and
// the sizes (N = 32, 64-bit product and accumulator) follow the design; the
// port names follow its block diagram. Reset polarity and style are this
// implementation's choices.
module mac_unit #(
  parameter int unsigned N = mac_pkg::MAC_N
) (
  input  logic             clock,
  input  logic             reset,
  input  logic [N-1:0]     a,
  input  logic [N-1:0]     b,
  output logic [2*N-1:0]   acc
);
  logic [2*N-1:0] q;  // product Q

  vedic_mul #(.N(N)) u_mul (.a(a), .b(b), .q(q));

  accumulator #(.W(2*N)) u_acc (.clock(clock), .reset(reset), .q(q), .acc(acc));
endmodule
