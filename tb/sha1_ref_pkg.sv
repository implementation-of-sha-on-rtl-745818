// sha1_ref_pkg: behavioural SHA-1 reference for the testbenches.
//
// Written straight from the Secure Hash Standard, without any of the hardware's
// structure: the whole 80-word schedule is expanded into an array, the round function
// is picked by a case on t, and padding is done on a byte queue. The testbenches
// compare the RTL against these functions and against published test vectors.
package sha1_ref_pkg;

  typedef logic [31:0] word_t;
  typedef byte unsigned bytes_t [$];

  function automatic word_t rol(word_t x, int n);
    return (x << n) | (x >> (32 - n));
  endfunction

  function automatic word_t ref_f(int t, word_t b, word_t c, word_t d);
    if (t < 20)      return (b & c) | (~b & d);
    else if (t < 40) return b ^ c ^ d;
    else if (t < 60) return (b & c) | (b & d) | (c & d);
    else             return b ^ c ^ d;
  endfunction

  function automatic word_t ref_k(int t);
    case (t / 20)
      0: return 32'h5A827999;
      1: return 32'h6ED9EBA1;
      2: return 32'h8F1BBCDC;
      default: return 32'hCA62C1D6;
    endcase
  endfunction

  // Expanded message schedule of one block.
  function automatic void ref_schedule(input word_t m [16], output word_t w [80]);
    for (int t = 0; t < 80; t++)
      w[t] = (t < 16) ? m[t] : rol(w[t-3] ^ w[t-8] ^ w[t-14] ^ w[t-16], 1);
  endfunction

  // One compression: h is updated in place.
  function automatic void ref_compress(inout word_t h [5], input word_t m [16]);
    word_t w [80];
    word_t a, b, c, d, e, tmp;
    ref_schedule(m, w);
    a = h[0]; b = h[1]; c = h[2]; d = h[3]; e = h[4];
    for (int t = 0; t < 80; t++) begin
      tmp = rol(a, 5) + ref_f(t, b, c, d) + e + w[t] + ref_k(t);
      e = d; d = c; c = rol(b, 30); b = a; a = tmp;
    end
    h[0] += a; h[1] += b; h[2] += c; h[3] += d; h[4] += e;
  endfunction

  // Padded message as a byte queue (length a multiple of 64).
  function automatic bytes_t ref_pad(bytes_t msg);
    bytes_t p = msg;
    longint unsigned l = 64'(msg.size()) * 8;
    p.push_back(8'h80);
    while ((p.size() % 64) != 56) p.push_back(8'h00);
    for (int i = 7; i >= 0; i--) p.push_back(byte'(l >> (8 * i)));
    return p;
  endfunction

  function automatic logic [159:0] ref_sha1(bytes_t msg);
    bytes_t p = ref_pad(msg);
    word_t h [5] = '{32'h67452301, 32'hEFCDAB89, 32'h98BADCFE, 32'h10325476, 32'hC3D2E1F0};
    word_t m [16];
    for (int blk = 0; blk < p.size() / 64; blk++) begin
      for (int i = 0; i < 16; i++)
        m[i] = {p[64*blk+4*i], p[64*blk+4*i+1], p[64*blk+4*i+2], p[64*blk+4*i+3]};
      ref_compress(h, m);
    end
    return {h[0], h[1], h[2], h[3], h[4]};
  endfunction

  function automatic bytes_t str_bytes(string s);
    bytes_t q;
    for (int i = 0; i < s.len(); i++) q.push_back(s[i]);
    return q;
  endfunction

endpackage
