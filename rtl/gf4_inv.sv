// GF(2^4) multiplicative inverse (field polynomial x^4 + x + 1), the "x^-1"
// box of the composite S-box. It raises the input to the 14th power,
// a^-1 = a^2 * a^4 * a^8, using the linear squaring map and two gf4_mul
// instances, so no lookup table is used. Input 0 gives 0, as AES requires.
// Combinational.
module gf4_inv (
  input  logic [3:0] a,
  output logic [3:0] y
);
  // squaring in GF(2^4)/(x^4+x+1) is linear
  function automatic logic [3:0] sq(input logic [3:0] v);
    return {v[3], v[3] ^ v[1], v[2], v[2] ^ v[0]};
  endfunction

  logic [3:0] a2, a4, a8, a6;
  assign a2 = sq(a);
  assign a4 = sq(a2);
  assign a8 = sq(a4);

  gf4_mul u_m0 (.a(a2), .b(a4), .p(a6));
  gf4_mul u_m1 (.a(a6), .b(a8), .p(y));
endmodule
