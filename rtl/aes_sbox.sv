// AES SubBytes S-box computed in a composite field instead of a 256-entry
// table.
//
// Datapath: the isomorphic map delta takes the byte into GF((2^4)^2), the
// multiplicative inverse is taken there with 4-bit arithmetic
// (gf_inv_composite), delta^-1 maps the result back, and the AES affine
// transformation  s_i = b_i ^ b_(i+4) ^ b_(i+5) ^ b_(i+6) ^ b_(i+7) ^ c_i,
// c = {63}, finishes the S-box. This three-stage arrangement follows the
// source's S-box diagram; the delta matrix is derived for this design's field
// polynomials (see aes_pkg). Combinational; no clock.
module aes_sbox
  import aes_pkg::*;
(
  input  logic [7:0] a,
  output logic [7:0] s
);
  localparam byte_t AFFINE_C = 8'h63;
  byte_t q, qi, b;

  assign q = gf2_mat8(DELTA, a);
  gf_inv_composite u_inv (.a(q), .y(qi));
  assign b = gf2_mat8(DELTA_INV, qi);

  always_comb
    for (int i = 0; i < 8; i++)
      s[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8] ^ AFFINE_C[i];
endmodule
