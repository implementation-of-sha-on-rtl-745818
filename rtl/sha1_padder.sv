// sha1_padder: SHA-1 message padding and parsing into 512-bit blocks.
//
// Message bytes are collected into a 64-byte block buffer while a 64-bit counter keeps
// the message length l in bits. Each time the buffer fills it is offered to the hash
// core. When the message ends (finish), the bit "1" is appended as the byte 80h,
// followed by zero bytes so that the length becomes 448 mod 512 bits, then l as a
// 64-bit big-endian number. If 80h leaves no room for the length in the current block
// (more than 55 message bytes in it), a block ending in zeros is emitted first and a
// second block of zeros and the length follows. The last block is flagged blk_last.
//
// Interface: bytes arrive on in_valid/in_byte/in_ready; the end of the message is a
// finish_valid/finish_ready handshake, accepted only when no byte is offered in the same
// clock. Blocks leave on blk_valid/blk/blk_last/blk_ready; byte 0 of the message is the
// most significant byte of word 0. After the last block the padder accepts nothing more
// until init (one clock), which starts a new, empty message; reset does the same.
// Timing: one byte per clock while absorbing; a full block is offered in the clock
// after its 64th byte and held until taken; the padding block(s) are offered in the
// clock after finish. Messages are whole bytes: the bit-level length of the padding
// rule is supported only in multiples of 8. The padding rule follows the Secure Hash
// Standard; the byte interface, the buffering and the handshakes are this design's own.
module sha1_padder
  import sha1_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       init,
  input  logic       in_valid,
  input  logic [7:0] in_byte,
  output logic       in_ready,
  input  logic       finish_valid,
  output logic       finish_ready,
  output logic       blk_valid,
  output block_t     blk,
  output logic       blk_last,
  input  logic       blk_ready,
  output logic       busy
);
  typedef enum logic [2:0] {P_ABSORB, P_EMIT_DATA, P_EMIT_PAD, P_EMIT_LAST, P_FINISHED} state_e;

  state_e      state_q;
  logic [7:0]  buf_q [64];
  logic [5:0]  cnt_q;      // bytes held in the current block
  logic [63:0] len_q;      // message length in bits

  logic take_byte, take_finish, take_blk;

  assign in_ready     = (state_q == P_ABSORB);
  assign finish_ready = (state_q == P_ABSORB) && !in_valid;
  assign take_byte    = in_valid && in_ready;
  assign take_finish  = finish_valid && finish_ready;
  assign blk_valid    = (state_q == P_EMIT_DATA) || (state_q == P_EMIT_PAD) ||
                        (state_q == P_EMIT_LAST);
  assign blk_last     = (state_q == P_EMIT_LAST);
  assign take_blk     = blk_valid && blk_ready;
  assign busy         = blk_valid;

  always_comb begin
    for (int w = 0; w < 16; w++)
      blk[w] = {buf_q[4*w], buf_q[4*w+1], buf_q[4*w+2], buf_q[4*w+3]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= P_ABSORB;
      cnt_q   <= '0;
      len_q   <= '0;
      for (int i = 0; i < 64; i++) buf_q[i] <= '0;
    end else if (init) begin
      state_q <= P_ABSORB;
      cnt_q   <= '0;
      len_q   <= '0;
    end else begin
      unique case (state_q)
        P_ABSORB: begin
          if (take_byte) begin
            buf_q[cnt_q] <= in_byte;
            cnt_q        <= cnt_q + 6'd1;
            len_q        <= len_q + 64'd8;
            if (cnt_q == 6'd63) state_q <= P_EMIT_DATA;
          end else if (take_finish) begin
            for (int i = 0; i < 64; i++) begin
              if (i == int'(cnt_q))     buf_q[i] <= 8'h80;
              else if (i > int'(cnt_q)) buf_q[i] <= 8'h00;
              if (cnt_q <= 6'd55 && i >= 56) buf_q[i] <= len_q[8*(63-i) +: 8];
            end
            state_q <= (cnt_q <= 6'd55) ? P_EMIT_LAST : P_EMIT_PAD;
          end
        end
        P_EMIT_DATA: if (take_blk) begin
          cnt_q   <= '0;
          state_q <= P_ABSORB;
        end
        P_EMIT_PAD: if (take_blk) begin
          for (int i = 0; i < 64; i++)
            buf_q[i] <= (i >= 56) ? len_q[8*(63-i) +: 8] : 8'h00;
          state_q <= P_EMIT_LAST;
        end
        P_EMIT_LAST: if (take_blk) state_q <= P_FINISHED;
        P_FINISHED: ;
        default: state_q <= P_ABSORB;
      endcase
    end
  end

  // Valid/ready rule: an offered block stays offered, unchanged, until it is taken.
  a_blk_hold: assert property (@(posedge clk) disable iff (!rst_n || init)
    blk_valid && !blk_ready |=> blk_valid && $stable(blk_last));
endmodule
