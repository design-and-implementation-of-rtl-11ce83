// Advanced xtime: multiplies one byte by {0e} in GF(2^8) (AES polynomial
// x^8 + x^4 + x^3 + x + 1) for the enhanced InvMixColumns.
//
// Instead of chaining xtime stages, the byte is shifted left without
// reduction (b<<1 XOR b<<2, and b<<3) and all the reduction that the discarded bits b[7:5]
// would need is added at once as an 8-bit correction term T that depends only
// on b[7:5]:
//   Te = {0, b7, b6, b5, b5^b6, b6, b5, b5^b6^b7}
// The shift/XOR arrangement and the T equations follow the source's circuit
// for this constant. Combinational.
module xtime_0e (
  input  logic [7:0] b,
  output logic [7:0] x
);
  logic [7:0] t;
  assign t = {1'b0, b[7], b[6], b[5], b[5] ^ b[6], b[6], b[5], b[5] ^ b[6] ^ b[7]};
  assign x = (b << 3) ^ ((b << 1) ^ (b << 2)) ^ t;
endmodule
