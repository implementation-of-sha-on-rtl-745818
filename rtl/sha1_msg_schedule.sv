// sha1_msg_schedule: SHA-1 message scheduler, one word W_t per clock.
//
// A window of sixteen 32-bit registers holds W_t .. W_t+15. The word leaving the low
// end of the window is the current round's W_t. On each advance the window shifts by
// one word and the new top word is W_t+16 = ROTL1(W_t+13 XOR W_t+8 XOR W_t+2 XOR W_t),
// the SHA-1 recurrence W_s = ROTL1(W_s-3 XOR W_s-8 XOR W_s-14 XOR W_s-16) taken at
// s = t+16. A multiplexer in front of the window chooses between the 16 message words
// M_0..M_15 of a new block (load) and this feedback (advance), so rounds 0..15 read the
// message words themselves and rounds 16..79 the computed ones.
//
// Interface: load copies block[0..15] into the window (block[0] becomes W_0); advance
// moves to the next round; load wins if both are set. w is valid from the clock after a
// load and changes one clock after each advance. The parallel load of the whole block
// is this design's choice; the window-and-feedback structure follows the scheduler
// drawing of the SHA-1 datapath.
module sha1_msg_schedule
  import sha1_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   load,
  input  block_t block,
  input  logic   advance,
  output word_t  w
);
  word_t win_q [16];
  word_t fb;

  always_comb fb = rotl(win_q[13] ^ win_q[8] ^ win_q[2] ^ win_q[0], 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 16; i++) win_q[i] <= '0;
    end else if (load) begin
      for (int i = 0; i < 16; i++) win_q[i] <= block[i];
    end else if (advance) begin
      for (int i = 0; i < 15; i++) win_q[i] <= win_q[i+1];
      win_q[15] <= fb;
    end
  end

  assign w = win_q[0];
endmodule
