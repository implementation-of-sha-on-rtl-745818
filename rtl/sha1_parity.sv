// sha1_parity: the SHA-1 parity function, Parity(x,y,z) = x XOR y XOR z.
//
// A single three-input XOR per bit. Used for rounds 20..39 and 60..79. Purely
// combinational on 32-bit words. Function and gate structure follow the original design.
module sha1_parity
  import sha1_pkg::*;
(
  input  word_t x,
  input  word_t y,
  input  word_t z,
  output word_t f
);
  always_comb f = x ^ y ^ z;
endmodule
