// Advanced xtime: multiplies one byte by {0d} in GF(2^8) (AES polynomial
// x^8 + x^4 + x^3 + x + 1) for the enhanced InvMixColumns.
//
// Instead of chaining xtime stages, the byte is shifted left without
// reduction (b<<2 XOR b, and b<<3) and all the reduction that the discarded bits b[7:5]
// would need is added at once as an 8-bit correction term T that depends only
// on b[7:5]:
//   Td = {0, b7, b6, b5^b7, b5^b6^b7, b6, b5^b7, b5^b6}
// The shift/XOR arrangement and the T equations follow the source's circuit
// for this constant, except bit 3 of T: it is b5^b6^b7, the value the field
// arithmetic requires, where the source's equation reduces to b7. Combinational.
module xtime_0d (
  input  logic [7:0] b,
  output logic [7:0] x
);
  logic [7:0] t;
  assign t = {1'b0, b[7], b[6], b[5] ^ b[7], b[5] ^ b[6] ^ b[7], b[6], b[5] ^ b[7], b[5] ^ b[6]};
  assign x = (b << 3) ^ ((b << 2) ^ b) ^ t;
endmodule
