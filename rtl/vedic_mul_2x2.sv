// vedic_mul_2x2: 2x2-bit Urdhva Tiryakbhyam ("vertically and crosswise")
// multiplier, the leaf of the recursive Vedic multiplier.
//
// With the multiplicand written as digits A B (a[1], a[0]) and the multiplier
// as C D (b[1], b[0]), the product is formed in three steps:
//   step 1, vertical on the right : B x D           -> q[0]
//   step 2, crosswise             : A x D + B x C   -> q[1], carry c1
//   step 3, vertical on the left  : A x C + c1      -> q[2], q[3]
// In binary the single-digit products are AND gates and the two additions
// are half adders, so the block is four ANDs and two half adders with no
// clock. The three steps follow the Vedic 2-digit method; spelling them out
// as AND gates and half adders is the usual binary reading of it.
//
// Interface: a, b 2-bit unsigned operands; q = a * b, 4 bits.
// Timing: purely combinational.
module vedic_mul_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] q
);
  logic bd, ad, bc, ac;  // single-digit products
  logic c1;              // carry out of the crosswise step

  always_comb begin
    bd   = a[0] & b[0];
    ad   = a[1] & b[0];
    bc   = a[0] & b[1];
    ac   = a[1] & b[1];
    // step 1
    q[0] = bd;
    // step 2: half adder on the two crosswise products
    q[1] = ad ^ bc;
    c1   = ad & bc;
    // step 3: half adder on the left vertical product and the carry
    q[2] = ac ^ c1;
    q[3] = ac & c1;
  end
endmodule
