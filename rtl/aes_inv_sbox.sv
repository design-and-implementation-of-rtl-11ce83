// AES InvSubBytes S-box computed in the composite field.
//
// It undoes the affine transformation first,
//   b_i = s_(i+2) ^ s_(i+5) ^ s_(i+7) ^ d_i,  d = {05},
// then maps to GF((2^4)^2) with delta, inverts there with the same
// gf_inv_composite unit as the forward S-box, and maps back with delta^-1.
// The source states that InvSubBytes uses the composite-field datapath too
// but draws only the forward one; the ordering here is the standard inverse.
// Combinational.
module aes_inv_sbox
  import aes_pkg::*;
(
  input  logic [7:0] s,
  output logic [7:0] a
);
  localparam byte_t AFFINE_D = 8'h05;
  byte_t b, q, qi;

  always_comb
    for (int i = 0; i < 8; i++)
      b[i] = s[(i+2)%8] ^ s[(i+5)%8] ^ s[(i+7)%8] ^ AFFINE_D[i];

  assign q = gf2_mat8(DELTA, b);
  gf_inv_composite u_inv (.a(q), .y(qi));
  assign a = gf2_mat8(DELTA_INV, qi);
endmodule
