// spi_slave: single-bit SPI slave, mode 0 (CPOL = 0, CPHA = 0), MSB first, bytes.
//
// SCK, CS_N and MOSI are brought into the system clock domain by two-flop
// synchronisers and SCK edges are found by comparing successive synchronised samples,
// so the whole slave runs on clk. MOSI is sampled on each rising SCK edge; after eight
// bits rx_valid pulses for one clock with the byte on rx_byte. MISO changes on falling
// SCK edges: the transmit shift register is loaded from tx_byte when CS_N falls and on
// the falling edge that ends each byte, so the byte sent in slot n+1 is the value of
// tx_byte half an SCK period after byte n was received. start pulses when CS_N falls.
// Timing: SCK must stay at most clk/8 so each SCK half period spans the synchroniser
// and response delay (about four clk periods). MISO is driven low while CS_N is high
// (no tri-state). The SPI mode, bit order and clocking scheme are this design's choice.
module spi_slave (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sck,
  input  logic       cs_n,
  input  logic       mosi,
  output logic       miso,
  output logic       start,
  output logic       rx_valid,
  output logic [7:0] rx_byte,
  input  logic [7:0] tx_byte
);
  logic [2:0] sck_s;
  logic [2:0] cs_s;
  logic [1:0] mosi_s;
  logic [2:0] bit_q;
  logic [6:0] rx_q;
  logic [7:0] tx_q;
  logic       active, sck_rise, sck_fall, cs_fall;

  assign active   = !cs_s[1];
  assign sck_rise = active && (sck_s[2:1] == 2'b01);
  assign sck_fall = active && (sck_s[2:1] == 2'b10);
  assign cs_fall  = (cs_s[2:1] == 2'b10);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sck_s  <= '0;
      cs_s   <= '1;
      mosi_s <= '0;
    end else begin
      sck_s  <= {sck_s[1:0], sck};
      cs_s   <= {cs_s[1:0], cs_n};
      mosi_s <= {mosi_s[0], mosi};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bit_q    <= '0;
      rx_q     <= '0;
      tx_q     <= '0;
      rx_valid <= 1'b0;
      rx_byte  <= '0;
      start    <= 1'b0;
    end else begin
      rx_valid <= 1'b0;
      start    <= 1'b0;
      if (cs_fall) begin
        bit_q <= '0;
        tx_q  <= tx_byte;
        start <= 1'b1;
      end else if (sck_rise) begin
        rx_q  <= {rx_q[5:0], mosi_s[1]};
        bit_q <= bit_q + 3'd1;
        if (bit_q == 3'd7) begin
          rx_valid <= 1'b1;
          rx_byte  <= {rx_q[6:0], mosi_s[1]};
        end
      end else if (sck_fall) begin
        tx_q <= (bit_q == 3'd0) ? tx_byte : {tx_q[6:0], 1'b0};
      end
    end
  end

  assign miso = active ? tx_q[7] : 1'b0;
endmodule
