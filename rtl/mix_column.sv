// MixColumns for one 32-bit state column, used by the encryption rounds.
//
// Each output byte is  s'_r = {02}s_r ^ {03}s_(r+1) ^ s_(r+2) ^ s_(r+3),
// computed in the shared-XOR form  s'_r = xtime(s_r ^ s_(r+1)) ^ s_(r+1)
// ^ s_(r+2) ^ s_(r+3): four pairwise XORs, four xtime units and an XOR tree,
// one XTime block per output byte. xtime(v) = (v << 1) ^ (v[7] ? {1b} : 0).
// Row 0 is bits [31:24]. Combinational.
module mix_column (
  input  logic [31:0] col_in,
  output logic [31:0] col_out
);
  function automatic logic [7:0] xtime(input logic [7:0] v);
    return {v[6:0], 1'b0} ^ (v[7] ? 8'h1b : 8'h00);
  endfunction

  logic [7:0] s [4];
  for (genvar r = 0; r < 4; r++) begin : g_in
    assign s[r] = col_in[31-8*r -: 8];
  end
  for (genvar r = 0; r < 4; r++) begin : g_out
    assign col_out[31-8*r -: 8] = xtime(s[r] ^ s[(r+1)%4]) ^ s[(r+1)%4] ^ s[(r+2)%4] ^ s[(r+3)%4];
  end
endmodule
