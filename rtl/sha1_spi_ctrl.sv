// sha1_spi_ctrl: command decoder between the SPI byte stream and the hash core.
//
// Every SPI transaction (CS_N low) starts with a command byte (sha1_pkg::spi_cmd_e):
//   01 INIT    start a new message; the padder and the chaining value are reset
//   02 DATA    every following byte of the transaction is a message byte
//   03 FINISH  end of the message; the padder appends padding and length
//   04 STATUS  every following byte sent back is the status byte
//   05 DIGEST  the next 20 bytes sent back are H0..H4, most significant byte first
// The byte the slave sends while the command byte comes in is always the status byte:
// bit 0 done, bit 1 busy, bit 2 overrun, bit 3 accepting message bytes.
// A message byte is held in a one-byte register until the padder takes it; a byte that
// arrives while the register is still full is dropped and sets the overrun flag, which
// only INIT clears. FINISH is remembered until every held byte has reached the padder
// and the padder accepts it. Unknown commands make the rest of the transaction ignored.
// Timing: a received byte reaches the padder in the next clock when the padder is
// absorbing; tx_byte follows the mode register combinationally. The protocol is this
// design's own; the original design specifies only that the core is remote-controlled over a
// single-bit serial interface.
module sha1_spi_ctrl
  import sha1_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // SPI slave side
  input  logic       start,
  input  logic       rx_valid,
  input  logic [7:0] rx_byte,
  output logic [7:0] tx_byte,
  // padder side
  output logic       init,
  output logic       byte_valid,
  output logic [7:0] byte_data,
  input  logic       byte_ready,
  output logic       finish_valid,
  input  logic       finish_ready,
  input  logic       padder_busy,
  // core side
  input  logic       core_busy,
  input  logic       digest_valid,
  input  digest_t    digest
);
  typedef enum logic [2:0] {M_CMD, M_DATA, M_STATUS, M_DIGEST, M_IGNORE} mode_e;

  mode_e      mode_q;
  logic [4:0] idx_q;        // digest byte being sent
  logic       pend_q;       // a message byte waits in byte_q
  logic [7:0] byte_q;
  logic       fin_q;        // FINISH waits for the padder
  logic       overrun_q;
  logic       pend_left;
  logic [7:0] status;

  assign byte_valid   = pend_q;
  assign byte_data    = byte_q;
  assign finish_valid = fin_q && !pend_q;
  assign pend_left    = pend_q && !byte_ready;

  always_comb begin
    status = '0;
    status[ST_DONE]    = digest_valid;
    status[ST_BUSY]    = pend_q || fin_q || padder_busy || core_busy;
    status[ST_OVERRUN] = overrun_q;
    status[ST_ACCEPT]  = byte_ready;
  end

  always_comb begin
    if (mode_q == M_DIGEST)
      tx_byte = (idx_q < 5'd20) ? digest[8*(19 - int'(idx_q)) +: 8] : 8'h00;
    else
      tx_byte = status;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_q    <= M_CMD;
      idx_q     <= '0;
      pend_q    <= 1'b0;
      byte_q    <= '0;
      fin_q     <= 1'b0;
      overrun_q <= 1'b0;
      init      <= 1'b0;
    end else begin
      init   <= 1'b0;
      pend_q <= pend_left;
      if (finish_valid && finish_ready) fin_q <= 1'b0;

      if (start) begin
        mode_q <= M_CMD;
      end else if (rx_valid) begin
        unique case (mode_q)
          M_CMD: begin
            idx_q <= '0;
            unique case (rx_byte)
              CMD_INIT: begin
                init      <= 1'b1;
                pend_q    <= 1'b0;
                fin_q     <= 1'b0;
                overrun_q <= 1'b0;
                mode_q    <= M_IGNORE;
              end
              CMD_DATA:   mode_q <= M_DATA;
              CMD_FINISH: begin
                fin_q  <= 1'b1;
                mode_q <= M_IGNORE;
              end
              CMD_STATUS: mode_q <= M_STATUS;
              CMD_DIGEST: mode_q <= M_DIGEST;
              default:    mode_q <= M_IGNORE;
            endcase
          end
          M_DATA: begin
            if (pend_left) overrun_q <= 1'b1;
            else begin
              pend_q <= 1'b1;
              byte_q <= rx_byte;
            end
          end
          M_DIGEST: if (idx_q < 5'd20) idx_q <= idx_q + 5'd1;
          M_STATUS, M_IGNORE: ;
          default: mode_q <= M_IGNORE;
        endcase
      end
    end
  end

  // Valid/ready rule towards the padder: a held byte stays offered, unchanged, until
  // taken (INIT may withdraw it).
  a_byte_hold: assert property (@(posedge clk) disable iff (!rst_n || init)
    byte_valid && !byte_ready |=> byte_valid && $stable(byte_data));
endmodule
