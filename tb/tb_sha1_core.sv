// tb_sha1_core: block-level test of the SHA-1 compression core.
//
// Messages are padded by the reference model and fed to the core block by block over
// its valid/ready handshake, sometimes with idle gaps between blocks. The digest is
// compared with the published FIPS 180 vectors ("abc", the 448-bit two-block string,
// the empty message) and with the reference model for random messages of 0..200
// bytes. The timing is checked too: 82 clocks from accepting one block to accepting
// the next (ready again 81 clocks after an accept), and done one clock after the last update. An init in the middle of
// a block must abandon it and restore H(0).
module tb_sha1_core;
  import sha1_pkg::*;
  import sha1_ref_pkg::*;

  logic    clk = 0, rst_n = 0, init = 0;
  logic    blk_valid = 0, blk_last = 0, blk_ready, busy, done, digest_valid;
  block_t  blk;
  digest_t digest;
  int checks = 0, failures = 0;
  int cycle = 0;

  sha1_core dut (.clk(clk), .rst_n(rst_n), .init(init), .blk_valid(blk_valid), .blk(blk),
                 .blk_last(blk_last), .blk_ready(blk_ready), .busy(busy), .done(done),
                 .digest_valid(digest_valid), .digest(digest));

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (400000) @(posedge clk);
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

  // Hash a message; returns the digest the core produced.
  task automatic hash(input bytes_t msg, input bit gaps, output digest_t got);
    bytes_t p = ref_pad(msg);
    int nblk = p.size() / 64;
    int t_acc, t_rdy;
    @(negedge clk);
    init = 1;
    @(negedge clk);
    init = 0;
    for (int b = 0; b < nblk; b++) begin
      // inputs change and outputs are sampled at the falling edge only
      for (int i = 0; i < 16; i++)
        blk[i] = {p[64*b+4*i], p[64*b+4*i+1], p[64*b+4*i+2], p[64*b+4*i+3]};
      blk_last  = (b == nblk - 1);
      blk_valid = 1;
      #1;                                // let blk_ready settle after init drops
      while (!blk_ready) begin
        @(negedge clk);
        #1;
      end
      @(negedge clk);                    // accepted at the rising edge just passed
      t_acc = cycle;
      blk_valid = 0;
      blk = '{default: 32'hDEAD_BEEF};   // the core must have taken its own copy
      while (!blk_ready) @(negedge clk);
      t_rdy = cycle;
      // accept edge + 80 round edges + 1 update edge: the next block is taken 82 clocks
      // after this one
      check(t_rdy - t_acc == 81, $sformatf("block latency %0d, expected 81", t_rdy - t_acc));
      if (b == nblk - 1) check(done === 1'b1 && digest_valid === 1'b1, "done after last block");
      else               check(digest_valid === 1'b0, "no digest_valid mid-message");
      if (gaps) repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    got = digest;
  endtask

  initial begin
    digest_t got;
    bytes_t  msg;
    repeat (3) @(posedge clk);
    rst_n = 1;

    hash(str_bytes("abc"), 0, got);
    check(got === 160'ha9993e364706816aba3e25717850c26c9cd0d89d, "FIPS abc vector");

    hash(str_bytes("abcdbcdecdefdefgefghfghighijhijkijkljklmklmnlmnomnopnopq"), 0, got);
    check(got === 160'h84983e441c3bd26ebaae4aa1f95129e5e54670f1, "FIPS two-block vector");

    msg = {};
    hash(msg, 0, got);
    check(got === 160'hda39a3ee5e6b4b0d3255bfef95601890afd80709, "empty message vector");

    for (int n = 0; n < 40; n++) begin
      msg = {};
      repeat ($urandom_range(0, 200)) msg.push_back(8'($urandom));
      hash(msg, 1, got);
      check(got === ref_sha1(msg), $sformatf("random message of %0d bytes", msg.size()));
    end

    // init in the middle of a block abandons it
    @(negedge clk);
    for (int i = 0; i < 16; i++) blk[i] = $urandom;
    blk_last = 1; blk_valid = 1;
    @(negedge clk);
    blk_valid = 0;
    repeat (30) @(negedge clk);
    check(busy === 1'b1, "busy during rounds");
    init = 1;
    @(negedge clk);
    init = 0;
    #1;
    check(busy === 1'b0 && blk_ready === 1'b1 && digest === H_INIT && digest_valid === 1'b0,
          "init abandons block and restores H(0)");
    hash(str_bytes("abc"), 0, got);
    check(got === 160'ha9993e364706816aba3e25717850c26c9cd0d89d, "abc after abort");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
