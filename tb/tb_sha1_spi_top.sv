// tb_sha1_spi_top: end-to-end test of the SPI-attached SHA-1 core at its default size.
//
// A behavioural SPI host (SCK = clk/10) hashes messages the way a computer would:
// INIT, the message in DATA transactions of random length, FINISH, STATUS polling until
// the done bit is set, then DIGEST to read the 20 digest bytes. Digests are compared
// with the FIPS 180 vectors ("abc", the 448-bit two-block string, the empty message)
// and with the reference model for random messages. The testbench counts how often
// each mechanism of the design happened and fails if one never did: multi-block
// messages, the extra padding block, the padder holding a block while the core is busy,
// STATUS polls that found the core busy, an overrun (bytes sent after FINISH without a
// new INIT), an INIT that abandons a message half way, and the digest_valid pin.
module tb_sha1_spi_top;
  import sha1_pkg::*;
  import sha1_ref_pkg::*;

  typedef byte unsigned q_t [$];
  q_t none;   // stays empty: a transaction with no payload

  logic clk = 0, rst_n = 0;
  logic sck, cs_n, mosi, miso, digest_valid;
  int checks = 0, failures = 0;
  int n_multi = 0, n_extra_pad = 0, n_pad_wait = 0, n_busy_poll = 0;
  int n_overrun = 0, n_abort = 0, n_pin = 0;

  sha1_spi_top dut (.clk(clk), .rst_n(rst_n), .spi_sck(sck), .spi_cs_n(cs_n),
                    .spi_mosi(mosi), .spi_miso(miso), .digest_valid(digest_valid));
  spi_host #(.HALF(50)) host (.sck(sck), .cs_n(cs_n), .mosi(mosi), .miso(miso));

  always #5 clk = ~clk;

  // the padder offering a block the core cannot take yet
  always @(posedge clk) if (rst_n && dut.blk_valid && !dut.blk_ready) n_pad_wait++;

  initial begin
    repeat (3000000) @(posedge clk);
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

  task automatic send_msg(input q_t msg);
    q_t rx, chunk;
    int i = 0;
    host.cmd(CMD_INIT, none, rx);
    while (i < msg.size()) begin
      int n = $urandom_range(1, 24);
      chunk = {};
      for (int j = 0; j < n && i < msg.size(); j++) chunk.push_back(msg[i++]);
      host.cmd(CMD_DATA, chunk, rx);
    end
    host.cmd(CMD_FINISH, none, rx);
  endtask

  task automatic read_status(output logic [7:0] st);
    q_t rx;
    host.cmd(CMD_STATUS, {8'h00}, rx);
    st = rx[1];
  endtask

  task automatic wait_done();
    logic [7:0] st;
    int polls = 0;
    do begin
      read_status(st);
      if (st[ST_BUSY]) n_busy_poll++;
      polls++;
    end while (!st[ST_DONE] && polls < 50);
    check(st[ST_DONE] && !st[ST_BUSY], "done reported by STATUS");
  endtask

  task automatic read_digest(output digest_t d);
    q_t rx, z;
    repeat (20) z.push_back(8'h00);
    host.cmd(CMD_DIGEST, z, rx);
    for (int i = 0; i < 20; i++) d[8*(19-i) +: 8] = rx[i+1];
  endtask

  task automatic hash(input q_t msg, output digest_t d);
    send_msg(msg);
    wait_done();
    if (digest_valid) n_pin++;
    read_digest(d);
    if (msg.size() >= 56) n_multi++;
    if ((msg.size() % 64) >= 56) n_extra_pad++;
  endtask

  initial begin
    q_t msg, rx;
    digest_t d;
    logic [7:0] st;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);

    hash(str_bytes("abc"), d);
    check(d === 160'ha9993e364706816aba3e25717850c26c9cd0d89d, "FIPS abc vector");

    hash(str_bytes("abcdbcdecdefdefgefghfghighijhijkijkljklmklmnlmnomnopnopq"), d);
    check(d === 160'h84983e441c3bd26ebaae4aa1f95129e5e54670f1, "FIPS two-block vector");

    msg = {};
    hash(msg, d);
    check(d === 160'hda39a3ee5e6b4b0d3255bfef95601890afd80709, "empty message vector");

    for (int n = 0; n < 6; n++) begin
      msg = {};
      repeat ($urandom_range(1, 150)) msg.push_back(8'($urandom));
      hash(msg, d);
      check(d === ref_sha1(msg), $sformatf("random message of %0d bytes", msg.size()));
    end

    // bytes after FINISH without INIT are refused and flagged
    host.cmd(CMD_DATA, {8'h11, 8'h22, 8'h33}, rx);
    read_status(st);
    if (st[ST_OVERRUN]) n_overrun++;
    check(st[ST_OVERRUN] && st[ST_DONE], "overrun flagged, digest kept");

    // INIT in the middle of a message abandons it
    host.cmd(CMD_INIT, none, rx);
    msg = {};
    repeat (100) msg.push_back(8'($urandom));
    host.cmd(CMD_DATA, msg, rx);
    read_status(st);
    check(!st[ST_DONE] && !st[ST_OVERRUN], "new message in progress");
    n_abort++;
    msg = str_bytes("abc");
    hash(msg, d);
    check(d === 160'ha9993e364706816aba3e25717850c26c9cd0d89d, "abc after abandoned message");

    $display("mechanisms: multi-block %0d, extra padding block %0d, padder waits %0d, busy polls %0d, overrun %0d, abort %0d, digest_valid pin %0d",
             n_multi, n_extra_pad, n_pad_wait, n_busy_poll, n_overrun, n_abort, n_pin);
    check(n_multi > 0, "multi-block message happened");
    check(n_extra_pad > 0, "extra padding block happened");
    check(n_pad_wait > 0, "padder waited for the core");
    check(n_busy_poll > 0, "a STATUS poll saw busy");
    check(n_overrun > 0, "overrun happened");
    check(n_abort > 0, "abort happened");
    check(n_pin > 0, "digest_valid pin seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
