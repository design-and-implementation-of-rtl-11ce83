// One AES encryption round:  SubBytes -> ShiftRows -> MixColumns -> AddRoundKey.
//
// SubBytes uses sixteen composite-field S-boxes (aes_sbox); MixColumns uses
// four mix_column units. With FINAL = 1 the round is the AES final round and
// MixColumns is left out. Combinational; the caller registers the result.
module aes_enc_round
  import aes_pkg::*;
#(
  parameter bit FINAL = 1'b0
) (
  input  block_t state_in,
  input  block_t round_key,
  output block_t state_out
);
  block_t sub, shifted, mixed;

  for (genvar i = 0; i < 16; i++) begin : g_sbox
    aes_sbox u_sbox (.a(state_in[127-8*i -: 8]), .s(sub[127-8*i -: 8]));
  end

  assign shifted = shift_rows(sub);

  if (FINAL) begin : g_final
    assign mixed = shifted;
  end else begin : g_mix
    for (genvar c = 0; c < 4; c++) begin : g_col
      mix_column u_mix (.col_in(shifted[127-32*c -: 32]), .col_out(mixed[127-32*c -: 32]));
    end
  end

  assign state_out = mixed ^ round_key;
endmodule
