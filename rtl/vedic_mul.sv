// vedic_mul: unsigned NxN-bit Vedic (Urdhva Tiryakbhyam) multiplier.
//
// The operands are split into halves of H = N/2 bits, and four H x H
// multipliers form the partial products (first stage):
//   P0 = a[H-1:0] * b[H-1:0]    P1 = a[H-1:0] * b[N-1:H]
//   P2 = a[N-1:H] * b[H-1:0]    P3 = a[N-1:H] * b[N-1:H]
// The low H bits of the product are P0[H-1:0] unchanged. The upper 3H bits,
// Q[2N-1:H], are the sum of four terms aligned to weight 2^H:
//   P1 + P0[N-1:H] + P2 + {P3, H'b0}
// In the conventional Vedic structure this sum takes three chained adders
// (two in the second stage, one in the third); here a carry-save tree
// (csa_tree) adds all four terms with one carry-propagate adder at its end.
// Each H x H multiplier is built the same way, down to the 2x2
// vertical-and-crosswise multiplier (vedic_mul_2x2) at the leaves.
//
// The recursion is unrolled into levels so that the module does not
// instantiate itself: level 1 holds one 2x2 multiplier for every pair of
// 2-bit digits (a digit i, b digit j); level k holds the 2^k x 2^k products
// of every pair of 2^k-bit digits, each made from the four level k-1
// products of its half-digits plus one carry-save tree. The single product
// of level log2(N) is q. For N = 32 that is 256 2x2 multipliers and
// 64 + 16 + 4 + 1 carry-save trees at the 4, 8, 16 and 32-bit levels.
//
// The split into four half-size multipliers, the bit slices of each term and
// the use of a carry-save addition tree follow the design; unrolling the
// recursion level by level is this implementation's choice.
//
// Interface: a, b N-bit unsigned operands; q = a * b, 2N bits. N must be a
// power of two, at least 2. Timing: purely combinational.
module vedic_mul #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] q
);
  localparam int unsigned L = $clog2(N);  // number of levels

  if (N < 2 || (N & (N - 1)) != 0) begin : g_bad_n
    $error("vedic_mul: N must be a power of two and at least 2");
  end

  for (genvar k = 1; k <= L; k++) begin : g_lvl
    localparam int unsigned S  = 2 ** k;   // digit width at this level
    localparam int unsigned NB = N / S;    // digits per operand
    localparam int unsigned H  = S / 2;    // half-digit width
    localparam int unsigned T  = 3 * H;    // width of the upper sum

    // p[i*NB + j] = (a digit i) * (b digit j), 2S bits
    logic [2*S-1:0] p [NB*NB];

    for (genvar i = 0; i < NB; i++) begin : g_i
      for (genvar j = 0; j < NB; j++) begin : g_j
        if (k == 1) begin : g_leaf
          vedic_mul_2x2 u_2x2 (
            .a(a[S*i +: S]),
            .b(b[S*j +: S]),
            .q(p[i*NB + j])
          );
        end else begin : g_node
          localparam int unsigned CB = 2 * NB;  // digits per operand one level down
          logic [S-1:0] p0, p1, p2, p3;  // first stage partial products
          logic [T-1:0] t0, t1, t2, t3;  // terms aligned to weight 2^H
          logic [T-1:0] upper;           // product bits [2S-1:H]

          always_comb begin
            p0 = g_lvl[k-1].p[(2*i)*CB     + 2*j];      // a low  x b low
            p1 = g_lvl[k-1].p[(2*i)*CB     + 2*j + 1];  // a low  x b high
            p2 = g_lvl[k-1].p[(2*i + 1)*CB + 2*j];      // a high x b low
            p3 = g_lvl[k-1].p[(2*i + 1)*CB + 2*j + 1];  // a high x b high
            t0 = T'(p1);
            t1 = T'(p0[S-1:H]);
            t2 = T'(p2);
            t3 = {p3, {H{1'b0}}};
          end

          csa_tree #(.W(T)) u_tree (.x0(t0), .x1(t1), .x2(t2), .x3(t3), .sum(upper));

          assign p[i*NB + j] = {upper, p0[H-1:0]};
        end
      end
    end
  end

  assign q = g_lvl[L].p[0];
endmodule
