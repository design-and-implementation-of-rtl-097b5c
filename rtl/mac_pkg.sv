// mac_pkg: sizes shared by the multiply-accumulate unit and its testbenches.
// The operand width of 32 bits and the 64-bit product / accumulator width
// are the sizes of the MAC unit this RTL describes; everything else derives
// from them.
package mac_pkg;
  // Operand width of the multiplier (a, b).
  localparam int unsigned MAC_N = 32;
  // Product and accumulator width (Q, acc).
  localparam int unsigned MAC_ACC_W = 2 * MAC_N;
endpackage
