// Shared types, constants and byte-wiring helpers for the AES-128 datapath.
//
// A 128-bit block is held the FIPS-197 way: byte 0 is bits [127:120], and
// byte i sits at row i%4, column i/4 of the 4x4 state. A column is therefore
// the 32 contiguous bits [127-32c -: 32], with row 0 in the top byte.
// Only wiring lives here (ShiftRows permutations, round constants); all
// Galois-field arithmetic is done by modules so that its structure stays
// visible in the hierarchy.
package aes_pkg;

  localparam int unsigned NR = 10;            // AES-128 rounds
  localparam int unsigned NK = 11;            // number of round keys

  typedef logic [7:0]   byte_t;
  typedef logic [31:0]  word_t;
  typedef logic [127:0] block_t;
  typedef logic [NK-1:0][127:0] round_keys_t; // index i is round key i

  function automatic byte_t get_byte(input block_t b, input int unsigned i);
    return b[127-8*i -: 8];
  endfunction

  // ShiftRows: row r rotates left by r columns; out byte (r,c) = in byte (r,c+r)
  function automatic block_t shift_rows(input block_t b);
    block_t o;
    for (int unsigned c = 0; c < 4; c++)
      for (int unsigned r = 0; r < 4; r++)
        o[127-8*(4*c+r) -: 8] = b[127-8*(4*((c+r)%4)+r) -: 8];
    return o;
  endfunction

  // InvShiftRows: out byte (r,c) = in byte (r,c-r)
  function automatic block_t inv_shift_rows(input block_t b);
    block_t o;
    for (int unsigned c = 0; c < 4; c++)
      for (int unsigned r = 0; r < 4; r++)
        o[127-8*(4*c+r) -: 8] = b[127-8*(4*((c+4-r)%4)+r) -: 8];
    return o;
  endfunction

  // Isomorphic map delta from GF(2^8) (AES polynomial x^8+x^4+x^3+x+1) to the
  // composite field GF((2^4)^2) used by the S-box (GF(2^4): x^4+x+1; extension:
  // y^2 + y + lambda, lambda = {1100}). Output bit i = XOR of the input bits
  // selected by row i. Column j of delta is beta^j, where beta = {21} in the
  // composite field is a root of the AES polynomial; DELTA_INV is its inverse.
  localparam byte_t DELTA     [8] = '{8'h03, 8'ha8, 8'h5c, 8'h68, 8'h70, 8'hd2, 8'hac, 8'ha0};
  localparam byte_t DELTA_INV [8] = '{8'hb1, 8'hb0, 8'h42, 8'h82, 8'h9a, 8'hd4, 8'h5e, 8'h54};

  function automatic byte_t gf2_mat8(input byte_t rows [8], input byte_t v);
    byte_t o;
    for (int i = 0; i < 8; i++) o[i] = ^(rows[i] & v);
    return o;
  endfunction

endpackage
