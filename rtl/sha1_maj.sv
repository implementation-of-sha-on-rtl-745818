// sha1_maj: the SHA-1 majority function,
// Maj(x,y,z) = (x AND y) XOR (x AND z) XOR (y AND z).
//
// Each result bit is 1 when at least two of the three input bits are 1. Built as three
// pairwise AND terms merged by a three-input XOR, as the function's gate diagram shows.
// Used for rounds 40..59. Purely combinational on 32-bit words. Function and gate
// structure follow the original design.
module sha1_maj
  import sha1_pkg::*;
(
  input  word_t x,
  input  word_t y,
  input  word_t z,
  output word_t f
);
  word_t xy, xz, yz;

  always_comb begin
    xy = x & y;
    xz = x & z;
    yz = y & z;
    f  = xy ^ xz ^ yz;
  end
endmodule
