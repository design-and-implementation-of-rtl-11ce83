// Reference model of AES-128 for the testbenches, written independently of
// the RTL: GF(2^8) products by shift-and-add, the S-box as x^254 followed by
// the affine map, and the cipher as a plain loop over a 16-byte state array.
package aes_ref_pkg;

  typedef logic [7:0] u8;

  function automatic u8 gmul(input u8 a, input u8 b);
    u8 r = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= a;
      a = {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
    end
    return r;
  endfunction

  function automatic u8 ginv(input u8 a);   // a^254, 0 -> 0
    u8 r = 8'h01;
    for (int i = 0; i < 254; i++) r = gmul(r, a);
    return r;
  endfunction

  function automatic u8 rotl8(input u8 v, input int n);
    return u8'((v << n) | (v >> (8 - n)));
  endfunction

  function automatic u8 sbox(input u8 a);
    u8 b = ginv(a);
    return b ^ rotl8(b, 1) ^ rotl8(b, 2) ^ rotl8(b, 3) ^ rotl8(b, 4) ^ 8'h63;
  endfunction

  function automatic u8 inv_sbox(input u8 s);
    for (int v = 0; v < 256; v++) if (sbox(u8'(v)) == s) return u8'(v);
    return 0;
  endfunction

  // FIPS-197 layout: byte i of a block is bits [127-8i -: 8]
  function automatic u8 gb(input logic [127:0] b, input int i);
    return b[127-8*i -: 8];
  endfunction

  function automatic logic [31:0] mixcol(input logic [31:0] c, input bit inverse);
    u8 s[4], o[4];
    u8 m[4];
    m = inverse ? '{8'h0e, 8'h0b, 8'h0d, 8'h09} : '{8'h02, 8'h03, 8'h01, 8'h01};
    for (int r = 0; r < 4; r++) s[r] = c[31-8*r -: 8];
    for (int r = 0; r < 4; r++) begin
      o[r] = 0;
      for (int k = 0; k < 4; k++) o[r] ^= gmul(m[k], s[(r+k)%4]);
    end
    return {o[0], o[1], o[2], o[3]};
  endfunction

  function automatic logic [127:0] next_key(input logic [127:0] k, input u8 rc);
    logic [31:0] w[4], t;
    for (int i = 0; i < 4; i++) w[i] = k[127-32*i -: 32];
    t = {sbox(w[3][23:16]) ^ rc, sbox(w[3][15:8]), sbox(w[3][7:0]), sbox(w[3][31:24])};
    w[0] ^= t; w[1] ^= w[0]; w[2] ^= w[1]; w[3] ^= w[2];
    return {w[0], w[1], w[2], w[3]};
  endfunction

  function automatic void expand(input logic [127:0] key, output logic [127:0] rk[11]);
    u8 rc = 8'h01;
    rk[0] = key;
    for (int i = 1; i <= 10; i++) begin
      rk[i] = next_key(rk[i-1], rc);
      rc = gmul(rc, 8'h02);
    end
  endfunction

  function automatic logic [127:0] enc_round(input logic [127:0] st, input logic [127:0] rk, input bit final_r);
    logic [127:0] t;
    for (int c = 0; c < 4; c++)                  // SubBytes + ShiftRows
      for (int r = 0; r < 4; r++)
        t[127-8*(4*c+r) -: 8] = sbox(gb(st, 4*((c+r)%4)+r));
    if (!final_r) for (int c = 0; c < 4; c++) t[127-32*c -: 32] = mixcol(t[127-32*c -: 32], 0);
    return t ^ rk;
  endfunction

  function automatic logic [127:0] dec_round(input logic [127:0] st, input logic [127:0] rk, input bit final_r);
    logic [127:0] t;
    for (int c = 0; c < 4; c++)                  // InvShiftRows + InvSubBytes
      for (int r = 0; r < 4; r++)
        t[127-8*(4*c+r) -: 8] = inv_sbox(gb(st, 4*((c+4-r)%4)+r));
    t ^= rk;
    if (!final_r) for (int c = 0; c < 4; c++) t[127-32*c -: 32] = mixcol(t[127-32*c -: 32], 1);
    return t;
  endfunction

  function automatic logic [127:0] encrypt(input logic [127:0] pt, input logic [127:0] key);
    logic [127:0] rk[11], st;
    expand(key, rk);
    st = pt ^ rk[0];
    for (int i = 1; i <= 10; i++) st = enc_round(st, rk[i], i == 10);
    return st;
  endfunction

  function automatic logic [127:0] decrypt(input logic [127:0] ct, input logic [127:0] key);
    logic [127:0] rk[11], st;
    expand(key, rk);
    st = ct ^ rk[10];
    for (int i = 9; i >= 0; i--) st = dec_round(st, rk[i], i == 0);
    return st;
  endfunction

  function automatic logic [127:0] rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
