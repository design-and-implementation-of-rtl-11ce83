// One AES decryption round of the inverse cipher:
//   InvShiftRows -> InvSubBytes -> AddRoundKey -> InvMixColumns.
//
// InvSubBytes uses sixteen composite-field inverse S-boxes (aes_inv_sbox);
// InvMixColumns uses four enhanced inv_mix_column units built from the
// advanced-xtime multipliers. With FINAL = 1 (the last round) InvMixColumns
// is left out. Because the round key is added before InvMixColumns, the
// normal (not equivalent-inverse) key schedule is used. Combinational.
module aes_dec_round
  import aes_pkg::*;
#(
  parameter bit FINAL = 1'b0
) (
  input  block_t state_in,
  input  block_t round_key,
  output block_t state_out
);
  block_t shifted, sub, keyed;

  assign shifted = inv_shift_rows(state_in);

  for (genvar i = 0; i < 16; i++) begin : g_sbox
    aes_inv_sbox u_isbox (.s(shifted[127-8*i -: 8]), .a(sub[127-8*i -: 8]));
  end

  assign keyed = sub ^ round_key;

  if (FINAL) begin : g_final
    assign state_out = keyed;
  end else begin : g_mix
    for (genvar c = 0; c < 4; c++) begin : g_col
      inv_mix_column u_imix (.col_in(keyed[127-32*c -: 32]), .col_out(state_out[127-32*c -: 32]));
    end
  end
endmodule
