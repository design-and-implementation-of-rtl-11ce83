// Enhanced InvMixColumns for one 32-bit state column.
//
// Computes the inverse MixColumns matrix product
//   s'_r = {0e}s_r ^ {0b}s_(r+1) ^ {0d}s_(r+2) ^ {09}s_(r+3)   (indices mod 4)
// with one advanced-xtime multiplier per matrix entry (xtime_09/0b/0d/0e),
// each of which replaces an xtime chain by a shift and a 3-input correction
// term. The column layout is row 0 in bits [31:24]. Combinational.
module inv_mix_column (
  input  logic [31:0] col_in,
  output logic [31:0] col_out
);
  logic [7:0] s [4];
  logic [7:0] m09 [4], m0b [4], m0d [4], m0e [4];

  for (genvar r = 0; r < 4; r++) begin : g_byte
    assign s[r] = col_in[31-8*r -: 8];
    xtime_09 u_09 (.b(s[r]), .x(m09[r]));
    xtime_0b u_0b (.b(s[r]), .x(m0b[r]));
    xtime_0d u_0d (.b(s[r]), .x(m0d[r]));
    xtime_0e u_0e (.b(s[r]), .x(m0e[r]));
  end

  for (genvar r = 0; r < 4; r++) begin : g_out
    assign col_out[31-8*r -: 8] = m0e[r] ^ m0b[(r+1)%4] ^ m0d[(r+2)%4] ^ m09[(r+3)%4];
  end
endmodule
