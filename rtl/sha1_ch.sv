// sha1_ch: the SHA-1 "choose" function, Ch(x,y,z) = (x AND y) XOR (NOT x AND z).
//
// Bit by bit, x selects y where it is 1 and z where it is 0. Built as two AND terms,
// one of them with x inverted, merged by an XOR, as the function's gate diagram shows.
// Used for rounds 0..19. Purely combinational; all three operands and the result are
// 32-bit words. Function and gate structure follow the original design.
module sha1_ch
  import sha1_pkg::*;
(
  input  word_t x,
  input  word_t y,
  input  word_t z,
  output word_t f
);
  word_t xy, nxz;

  always_comb begin
    xy  = x & y;
    nxz = ~x & z;
    f   = xy ^ nxz;
  end
endmodule
