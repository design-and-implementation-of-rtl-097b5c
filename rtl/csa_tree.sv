// csa_tree: four-operand adder built as a small Wallace-style tree of
// carry-save adders, used to merge the four partial products of one level
// of the Vedic multiplier.
//
// How it works: a row of 3:2 carry-save adders (one full adder per bit)
// reduces x0, x1, x2 to a sum word and a carry word; the carry word is moved
// one place left. A second row reduces that pair and x3 to a new sum and
// carry. Only the last pair goes through a carry-propagate adder, so a carry
// ripples once instead of three times as it would with three chained adders.
//
// Interface: x0..x3 W-bit unsigned operands; sum = x0+x1+x2+x3 mod 2^W.
// The caller sizes W so that the true sum fits (3N/2 bits for an N-bit
// multiplier level). Timing: purely combinational.
//
// That the multiplier's partial products are added by a carry-save tree
// instead of plain adders is the design's; the order of the operands in the
// tree, the two-row arrangement and the use of a behavioural '+' for the
// final carry-propagate adder are this implementation's choices.
module csa_tree #(
  parameter int unsigned W = 48
) (
  input  logic [W-1:0] x0,
  input  logic [W-1:0] x1,
  input  logic [W-1:0] x2,
  input  logic [W-1:0] x3,
  output logic [W-1:0] sum
);
  logic [W-1:0] s1, c1;  // first 3:2 row
  logic [W-1:0] s2, c2;  // second 3:2 row

  always_comb begin
    // row 1: x0 + x1 + x2 = s1 + c1
    s1 = x0 ^ x1 ^ x2;
    c1 = ((x0 & x1) | (x0 & x2) | (x1 & x2)) << 1;
    // row 2: s1 + c1 + x3 = s2 + c2
    s2 = s1 ^ c1 ^ x3;
    c2 = ((s1 & c1) | (s1 & x3) | (c1 & x3)) << 1;
    // final carry-propagate adder
    sum = s2 + c2;
  end
endmodule
