// Multiplicative inversion in the composite field GF((2^4)^2), the dashed
// "multiplicative inversion" region of the S-box datapath.
//
// An element is a = ah*y + al with ah, al in GF(2^4) and y^2 = y + LAMBDA.
// Its inverse is
//   d    = ah^2 * LAMBDA  xor  (ah xor al) * al      (4-bit "determinant")
//   a^-1 = (ah * d^-1) * y + (ah xor al) * d^-1
// The upper path squares ah and scales it by LAMBDA, the lower path forms
// ah xor al and multiplies it by al; the two are XORed, inverted in GF(2^4)
// and fed to two output multipliers. That block structure (x^2, x lambda, XOR,
// three 4-bit multipliers, 4-bit inverse) is the source's; the polynomials
// and LAMBDA = {1100} are this design's choice. Combinational; 0 maps to 0.
module gf_inv_composite #(
  parameter logic [3:0] LAMBDA = 4'hC
) (
  input  logic [7:0] a,   // composite-field element {ah, al}
  output logic [7:0] y    // its inverse, same representation
);
  logic [3:0] ah, al, ah_sq, ah_sq_l, ahl, low_prod, d, d_inv;

  assign ah = a[7:4];
  assign al = a[3:0];

  // x^2 (linear in GF(2^4)/(x^4+x+1))
  assign ah_sq = {ah[3], ah[3] ^ ah[1], ah[2], ah[2] ^ ah[0]};

  gf4_mul u_lambda (.a(ah_sq), .b(LAMBDA), .p(ah_sq_l));
  assign ahl = ah ^ al;
  gf4_mul u_low (.a(ahl), .b(al), .p(low_prod));
  assign d = ah_sq_l ^ low_prod;

  gf4_inv u_inv (.a(d), .y(d_inv));

  gf4_mul u_out_h (.a(ah),  .b(d_inv), .p(y[7:4]));
  gf4_mul u_out_l (.a(ahl), .b(d_inv), .p(y[3:0]));
endmodule
