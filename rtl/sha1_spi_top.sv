// sha1_spi_top: SHA-1 hash core with a single-bit SPI serial interface.
//
// A host (for example a PC through an SPI adapter) sends a message over SPI; the core
// pads it, splits it into 512-bit blocks, runs the 80 SHA-1 rounds on each block and
// returns the 160-bit digest over the same link. Chain of blocks:
//   spi_slave -> sha1_spi_ctrl -> sha1_padder -> sha1_core (scheduler, f/K, rounds)
//   sha1_core digest/status -> sha1_spi_ctrl -> spi_slave (MISO)
// Interface: one system clock clk with asynchronous active-low reset rst_n; SPI mode 0
// pins spi_sck, spi_cs_n, spi_mosi, spi_miso (SCK at most clk/8); digest_valid is also
// brought out as a pin so a host may wait on it instead of polling.
// Protocol (see sha1_spi_ctrl): INIT, then DATA transactions with the message bytes,
// then FINISH; poll STATUS until done, then read 20 bytes with DIGEST.
// Timing: the core needs 82 clocks per 512-bit block; the serial link needs 512 SCK
// periods per block, so the link, not the core, limits throughput.
module sha1_spi_top
  import sha1_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic spi_sck,
  input  logic spi_cs_n,
  input  logic spi_mosi,
  output logic spi_miso,
  output logic digest_valid
);
  logic       start, rx_valid;
  logic [7:0] rx_byte, tx_byte;
  logic       init;
  logic       byte_valid, byte_ready;
  logic [7:0] byte_data;
  logic       finish_valid, finish_ready, padder_busy;
  logic       blk_valid, blk_last, blk_ready;
  block_t     blk;
  logic       core_busy;
  digest_t    digest;

  spi_slave u_spi (
    .clk     (clk),
    .rst_n   (rst_n),
    .sck     (spi_sck),
    .cs_n    (spi_cs_n),
    .mosi    (spi_mosi),
    .miso    (spi_miso),
    .start   (start),
    .rx_valid(rx_valid),
    .rx_byte (rx_byte),
    .tx_byte (tx_byte)
  );

  sha1_spi_ctrl u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .start       (start),
    .rx_valid    (rx_valid),
    .rx_byte     (rx_byte),
    .tx_byte     (tx_byte),
    .init        (init),
    .byte_valid  (byte_valid),
    .byte_data   (byte_data),
    .byte_ready  (byte_ready),
    .finish_valid(finish_valid),
    .finish_ready(finish_ready),
    .padder_busy (padder_busy),
    .core_busy   (core_busy),
    .digest_valid(digest_valid),
    .digest      (digest)
  );

  sha1_padder u_pad (
    .clk         (clk),
    .rst_n       (rst_n),
    .init        (init),
    .in_valid    (byte_valid),
    .in_byte     (byte_data),
    .in_ready    (byte_ready),
    .finish_valid(finish_valid),
    .finish_ready(finish_ready),
    .blk_valid   (blk_valid),
    .blk         (blk),
    .blk_last    (blk_last),
    .blk_ready   (blk_ready),
    .busy        (padder_busy)
  );

  sha1_core u_core (
    .clk         (clk),
    .rst_n       (rst_n),
    .init        (init),
    .blk_valid   (blk_valid),
    .blk         (blk),
    .blk_last    (blk_last),
    .blk_ready   (blk_ready),
    .busy        (core_busy),
    .done        (),
    .digest_valid(digest_valid),
    .digest      (digest)
  );
endmodule
