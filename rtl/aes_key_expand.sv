// One AES-128 key-expansion step: round key i -> round key i+1.
//
//   t  = SubWord(RotWord(w3)) ^ {rcon, 00, 00, 00}
//   w0' = w0 ^ t,  w1' = w1 ^ w0',  w2' = w2 ^ w1',  w3' = w3 ^ w2'
// SubWord uses four composite-field S-boxes, the same aes_sbox as the
// datapath. Words are 32 bits with w0 in bits [127:96]. Combinational.
module aes_key_expand
  import aes_pkg::*;
(
  input  block_t     key_in,
  input  logic [7:0] rcon,
  output block_t     key_out
);
  word_t w [4];
  word_t rot, sub, t;
  word_t n [4];

  for (genvar k = 0; k < 4; k++) begin : g_w
    assign w[k] = key_in[127-32*k -: 32];
  end

  assign rot = {w[3][23:0], w[3][31:24]};

  for (genvar k = 0; k < 4; k++) begin : g_sub
    aes_sbox u_sbox (.a(rot[31-8*k -: 8]), .s(sub[31-8*k -: 8]));
  end

  assign t    = sub ^ {rcon, 24'h0};
  assign n[0] = w[0] ^ t;
  assign n[1] = w[1] ^ n[0];
  assign n[2] = w[2] ^ n[1];
  assign n[3] = w[3] ^ n[2];
  assign key_out = {n[0], n[1], n[2], n[3]};
endmodule
