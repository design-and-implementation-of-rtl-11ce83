// GF(2^4) multiplier, field polynomial x^4 + x + 1 (helper of the composite
// S-box, the boxes marked "X" on the 4-bit paths of the inversion datapath).
// Purely combinational: a carry-less 4x4 product (7 bits) reduced with
// x^4 = x + 1. The choice of x^4 + x + 1 is this design's; the source names
// the composite field but not its polynomials.
module gf4_mul (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [3:0] p
);
  logic [6:0] m;
  always_comb begin
    m = '0;
    for (int i = 0; i < 4; i++)
      if (b[i]) m = m ^ (7'(a) << i);
    // reduce x^6, x^5, x^4 with x^4 = x + 1
    p = m[3:0] ^ {m[6:4], 1'b0} ^ {1'b0, m[6:4]};
  end
endmodule
