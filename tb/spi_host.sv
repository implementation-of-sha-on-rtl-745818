// spi_host: behavioural model of the external computer that drives the SPI link.
//
// Not synthesizable: a bus-functional SPI master, mode 0 (SCK idle low, data set up on
// the falling edge and sampled on the rising edge), MSB first. HALF is half an SCK
// period in simulation time units. Tasks: select() drops CS_N, xfer() exchanges one
// byte, deselect() raises CS_N, and cmd() runs one whole transaction: a command byte
// followed by n data bytes, returning the bytes read back.
module spi_host #(
  parameter int HALF = 50
) (
  output logic sck,
  output logic cs_n,
  output logic mosi,
  input  logic miso
);
  initial begin
    sck  = 1'b0;
    cs_n = 1'b1;
    mosi = 1'b0;
  end

  task automatic select();
    cs_n = 1'b0;
    #(HALF);
  endtask

  task automatic deselect();
    #(HALF);
    cs_n = 1'b1;
    #(2 * HALF);
  endtask

  task automatic xfer(input logic [7:0] tx, output logic [7:0] rx);
    for (int i = 7; i >= 0; i--) begin
      mosi = tx[i];
      #(HALF);
      sck   = 1'b1;
      rx[i] = miso;
      #(HALF);
      sck   = 1'b0;
    end
    #(HALF);   // gap between bytes
  endtask

  // One transaction: command byte, then the payload bytes (tx), collecting what comes
  // back (rx[0] is what came back during the command byte).
  typedef byte unsigned q_t [$];
  task automatic cmd(input logic [7:0] c, input q_t tx, output q_t rx);
    logic [7:0] r;
    rx = {};
    select();
    xfer(c, r);
    rx.push_back(r);
    foreach (tx[i]) begin
      xfer(tx[i], r);
      rx.push_back(r);
    end
    deselect();
  endtask
endmodule
