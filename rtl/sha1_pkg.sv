// sha1_pkg: types and constants shared by the SHA-1 core and its serial front end.
//
// Holds the 32-bit word type, the 512-bit block type (16 words, word 0 first, each word
// big-endian as SHA-1 requires), the four round constants K_t, the initial hash value
// H(0) and the circular left rotation used throughout the compression function.
// It also defines the command and status codes of the SPI protocol. The constant values
// are those of the Secure Hash Standard; the block and digest layout and the SPI
// protocol codes are this design's own choice.
package sha1_pkg;

  typedef logic [31:0]  word_t;
  typedef logic [159:0] digest_t;      // {H0, H1, H2, H3, H4}, H0 in the top bits
  typedef word_t        block_t [16];  // block_t[0] is M_0, the first word of the block

  localparam int unsigned ROUNDS       = 80;

  // Round constants, one per group of 20 rounds.
  localparam word_t K0 = 32'h5A82_7999;  // rounds  0..19
  localparam word_t K1 = 32'h6ED9_EBA1;  // rounds 20..39
  localparam word_t K2 = 32'h8F1B_BCDC;  // rounds 40..59
  localparam word_t K3 = 32'hCA62_C1D6;  // rounds 60..79

  // Initial hash value H(0).
  localparam word_t H0_INIT = 32'h6745_2301;
  localparam word_t H1_INIT = 32'hEFCD_AB89;
  localparam word_t H2_INIT = 32'h98BA_DCFE;
  localparam word_t H3_INIT = 32'h1032_5476;
  localparam word_t H4_INIT = 32'hC3D2_E1F0;

  localparam digest_t H_INIT = {H0_INIT, H1_INIT, H2_INIT, H3_INIT, H4_INIT};

  // Circular left rotation of a word by n places (ROTL^n, written S^n in some texts).
  function automatic word_t rotl(input word_t x, input int unsigned n);
    return (x << n) | (x >> (32 - n));
  endfunction

  // Command byte that opens each SPI transaction (first byte after CS_N falls).
  typedef enum logic [7:0] {
    CMD_INIT   = 8'h01,  // start a new message, H = H(0)
    CMD_DATA   = 8'h02,  // every following byte is a message byte
    CMD_FINISH = 8'h03,  // end of message: pad and hash the last block(s)
    CMD_STATUS = 8'h04,  // every following byte returned is the status byte
    CMD_DIGEST = 8'h05   // the next 20 bytes returned are the digest, H0 first, MSB first
  } spi_cmd_e;

  // Status byte, returned during every command byte and after CMD_STATUS.
  localparam int unsigned ST_DONE     = 0;  // digest of the last message is valid
  localparam int unsigned ST_BUSY     = 1;  // bytes, padding or rounds still in progress
  localparam int unsigned ST_OVERRUN  = 2;  // a message byte was dropped since CMD_INIT
  localparam int unsigned ST_ACCEPT   = 3;  // the padder is taking message bytes

endpackage
