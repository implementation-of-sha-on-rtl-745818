// tb_sha1_spi_ctrl: checks the SPI command decoder at byte level.
//
// The testbench plays the SPI slave (start, rx_valid, rx_byte) and a padder model with
// random byte_ready. It checks: the status byte offered during a command byte; the
// one-clock init pulse of INIT; that DATA bytes reach the padder once each and in
// order; that a byte arriving while the previous one is still held sets overrun and is
// dropped, and that INIT clears overrun; that FINISH is offered only after the held
// byte is gone; the 20 digest bytes of DIGEST, most significant first, then zeros; and
// that STATUS keeps returning the status byte.
module tb_sha1_spi_ctrl;
  import sha1_pkg::*;

  logic       clk = 0, rst_n = 0;
  logic       start = 0, rx_valid = 0;
  logic [7:0] rx_byte = '0, tx_byte;
  logic       init, byte_valid, byte_ready = 0, finish_valid, finish_ready = 0;
  logic [7:0] byte_data;
  logic       padder_busy = 0, core_busy = 0, digest_valid = 0;
  digest_t    digest = '0;
  int checks = 0, failures = 0;
  int inits = 0, finishes = 0;
  byte unsigned taken [$];
  bit rand_ready = 0;

  sha1_spi_ctrl dut (.clk(clk), .rst_n(rst_n), .start(start), .rx_valid(rx_valid),
                     .rx_byte(rx_byte), .tx_byte(tx_byte), .init(init),
                     .byte_valid(byte_valid), .byte_data(byte_data), .byte_ready(byte_ready),
                     .finish_valid(finish_valid), .finish_ready(finish_ready),
                     .padder_busy(padder_busy), .core_busy(core_busy),
                     .digest_valid(digest_valid), .digest(digest));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // padder model: records what it takes at each rising edge
  always @(posedge clk) if (rst_n) begin
    if (byte_valid && byte_ready) taken.push_back(byte_data);
    if (finish_valid && finish_ready) finishes++;
    if (init) inits++;
  end
  always @(negedge clk) if (rand_ready) byte_ready <= ($urandom_range(0, 1) == 1);

  task automatic pulse_start();
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
  endtask

  task automatic send(input logic [7:0] b, input int gap);
    @(negedge clk);
    rx_byte  = b;
    rx_valid = 1;
    @(negedge clk);
    rx_valid = 0;
    repeat (gap) @(negedge clk);
  endtask

  initial begin
    byte unsigned msg [$];
    repeat (3) @(posedge clk);
    rst_n = 1;

    // status during the command byte
    digest_valid = 1; padder_busy = 1;
    pulse_start();
    #1;
    check(tx_byte == 8'b0000_0011, $sformatf("status %b during command byte", tx_byte));
    digest_valid = 0; padder_busy = 0;

    // INIT: one init pulse
    send(CMD_INIT, 2);
    check(inits == 1, "one init pulse");

    // DATA with a randomly stalling padder, bytes 20 clocks apart
    rand_ready = 1;
    pulse_start();
    send(CMD_DATA, 2);
    for (int i = 0; i < 40; i++) begin
      msg.push_back(8'($urandom));
      send(msg[i], 20);
    end
    repeat (40) @(negedge clk);
    check(taken == msg, "DATA bytes reach the padder once each, in order");
    pulse_start();
    #1;
    check(!tx_byte[ST_OVERRUN], "no overrun at a slow byte rate");
    send(CMD_DATA, 2);

    // overrun: padder stalled, two bytes in a row
    rand_ready = 0;
    @(negedge clk);
    byte_ready = 0;
    taken = {};
    send(8'hA5, 2);
    send(8'h5A, 2);
    pulse_start();
    #1;
    check(tx_byte[ST_OVERRUN] && tx_byte[ST_BUSY], "overrun and busy reported");

    // FINISH waits for the held byte
    send(CMD_FINISH, 2);
    finish_ready = 1;
    repeat (5) @(negedge clk);
    check(finishes == 0 && !finish_valid, "finish held back while a byte is pending");
    byte_ready = 1;
    repeat (3) @(negedge clk);
    check(taken.size() == 1 && taken[0] == 8'hA5, "held byte delivered, second dropped");
    check(finishes == 1, "finish delivered after the byte");
    finish_ready = 0;

    // INIT clears overrun
    pulse_start();
    send(CMD_INIT, 2);
    pulse_start();
    #1;
    check(inits == 2 && !tx_byte[ST_OVERRUN], "INIT clears overrun");

    // DIGEST read-out
    digest = {$urandom, $urandom, $urandom, $urandom, $urandom};
    digest_valid = 1;
    pulse_start();
    send(CMD_DIGEST, 2);
    for (int i = 0; i < 22; i++) begin
      logic [7:0] exp;
      exp = (i < 20) ? digest[8*(19-i) +: 8] : 8'h00;
      #1;
      check(tx_byte == exp, $sformatf("digest byte %0d: %h, expected %h", i, tx_byte, exp));
      send(8'h00, 2);
    end

    // STATUS repeats the status byte
    pulse_start();
    send(CMD_STATUS, 2);
    core_busy = 1;
    #1;
    check(tx_byte == 8'b0000_1011, $sformatf("status %b after STATUS", tx_byte));
    send(8'h00, 2);
    core_busy = 0;
    #1;
    check(tx_byte == 8'b0000_1001, $sformatf("status %b after STATUS", tx_byte));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
