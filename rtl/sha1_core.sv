// sha1_core: iterative SHA-1 hash calculation, one round per clock.
//
// Holds the chaining value H0..H4 and the working variables A..E. When a 512-bit block
// is accepted, A..E are loaded from H and the block is handed to the message scheduler.
// Each of the next 80 clocks performs one round:
//   T = ROTL5(A) + f(t; B,C,D) + E + W_t + K_t
//   E = D, D = C, C = ROTL30(B), B = A, A = T
// with f and K chosen by sha1_f_k and W_t supplied by sha1_msg_schedule. One further
// clock adds A..E into H0..H4, giving the intermediate hash H(i). Blocks of one message
// are fed back to back; the block flagged last makes the sum the final digest.
//
// Interface: init (one clock) restores H to the initial value H(0), abandons any block
// in progress and clears digest_valid. Blocks arrive on a valid/ready handshake
// (blk_valid, blk, blk_last / blk_ready); blk_ready is high only while the core is idle.
// Timing: a block accepted at clock edge 0 is in rounds at edges 1..80 and is added into
// H at edge 81, so the core is ready for the next block 82 clocks after accepting one
// (82 clocks per 512-bit block). done pulses for one clock after the last block's update
// and digest_valid then stays high until init or the next accepted block.
// The round equations and the register/adder structure follow the SHA-1 datapath
// drawing; the handshake, the separate update clock and the reset behaviour are this
// design's own.
module sha1_core
  import sha1_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    init,
  input  logic    blk_valid,
  input  block_t  blk,
  input  logic    blk_last,
  output logic    blk_ready,
  output logic    busy,
  output logic    done,
  output logic    digest_valid,
  output digest_t digest
);
  typedef enum logic [1:0] {S_IDLE, S_ROUND, S_UPDATE} state_e;

  state_e     state_q;
  logic [6:0] round_q;
  logic       last_q;
  word_t      a_q, b_q, c_q, d_q, e_q;
  word_t      h_q [5];
  word_t      w_t, f_t, k_t, t_sum;
  logic       accept;

  assign blk_ready = (state_q == S_IDLE) && !init;
  assign accept    = blk_valid && blk_ready;
  assign busy      = (state_q != S_IDLE);

  sha1_msg_schedule u_sched (
    .clk    (clk),
    .rst_n  (rst_n),
    .load   (accept),
    .block  (blk),
    .advance(state_q == S_ROUND),
    .w      (w_t)
  );

  sha1_f_k u_fk (
    .round(round_q),
    .b    (b_q),
    .c    (c_q),
    .d    (d_q),
    .f    (f_t),
    .k    (k_t)
  );

  always_comb t_sum = rotl(a_q, 5) + f_t + e_q + w_t + k_t;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q      <= S_IDLE;
      round_q      <= '0;
      last_q       <= 1'b0;
      {a_q, b_q, c_q, d_q, e_q} <= '0;
      {h_q[0], h_q[1], h_q[2], h_q[3], h_q[4]} <= H_INIT;
      done         <= 1'b0;
      digest_valid <= 1'b0;
    end else begin
      done <= 1'b0;
      if (init) begin
        state_q      <= S_IDLE;
        round_q      <= '0;
        {h_q[0], h_q[1], h_q[2], h_q[3], h_q[4]} <= H_INIT;
        digest_valid <= 1'b0;
      end else begin
        unique case (state_q)
          S_IDLE: if (accept) begin
            a_q          <= h_q[0];
            b_q          <= h_q[1];
            c_q          <= h_q[2];
            d_q          <= h_q[3];
            e_q          <= h_q[4];
            last_q       <= blk_last;
            round_q      <= '0;
            digest_valid <= 1'b0;
            state_q      <= S_ROUND;
          end
          S_ROUND: begin
            e_q     <= d_q;
            d_q     <= c_q;
            c_q     <= rotl(b_q, 30);
            b_q     <= a_q;
            a_q     <= t_sum;
            round_q <= round_q + 7'd1;
            if (round_q == 7'(ROUNDS - 1)) state_q <= S_UPDATE;
          end
          S_UPDATE: begin
            h_q[0]  <= h_q[0] + a_q;
            h_q[1]  <= h_q[1] + b_q;
            h_q[2]  <= h_q[2] + c_q;
            h_q[3]  <= h_q[3] + d_q;
            h_q[4]  <= h_q[4] + e_q;
            state_q <= S_IDLE;
            if (last_q) begin
              done         <= 1'b1;
              digest_valid <= 1'b1;
            end
          end
          default: state_q <= S_IDLE;
        endcase
      end
    end
  end

  assign digest = {h_q[0], h_q[1], h_q[2], h_q[3], h_q[4]};

  // The round counter never leaves 0..79 while rounds are running.
  a_round_range: assert property (@(posedge clk) disable iff (!rst_n)
    state_q == S_ROUND |-> round_q < 7'(ROUNDS));
endmodule
