// tb_sha1_padder: checks SHA-1 padding and block parsing.
//
// For each message a producer offers the bytes (with random idle clocks) and then
// finish, while a consumer takes the blocks with random back-pressure. The blocks
// taken are concatenated and compared byte for byte with the reference padding, and
// only the final block may carry blk_last. Message lengths include every boundary of
// the padding rule (0, 55, 56, 63, 64, 119, 120 bytes) so that both the one-block and
// the extra-block padding cases occur, plus random lengths; the number of messages
// that needed the extra padding block is counted and must be non-zero. Also checks
// that bytes stream in at one per clock while the padder is absorbing, and that
// nothing is accepted after the last block until init.
module tb_sha1_padder;
  import sha1_pkg::*;
  import sha1_ref_pkg::*;

  logic       clk = 0, rst_n = 0, init = 0;
  logic       in_valid = 0, in_ready, finish_valid = 0, finish_ready;
  logic [7:0] in_byte = '0;
  logic       blk_valid, blk_last, blk_ready = 0, busy;
  block_t     blk;
  int checks = 0, failures = 0;
  int extra_pad_msgs = 0, stream_checks = 0;

  sha1_padder dut (.clk(clk), .rst_n(rst_n), .init(init), .in_valid(in_valid),
                   .in_byte(in_byte), .in_ready(in_ready), .finish_valid(finish_valid),
                   .finish_ready(finish_ready), .blk_valid(blk_valid), .blk(blk),
                   .blk_last(blk_last), .blk_ready(blk_ready), .busy(busy));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  bytes_t got;
  int     nlast;
  bit     seen_last;

  // consumer: random back-pressure, records every block taken
  task automatic consume(input int max_blocks);
    int n = 0;
    while (!seen_last) begin
      @(negedge clk);
      blk_ready = ($urandom_range(0, 2) != 0);
      #1;
      if (blk_valid && blk_ready) begin
        check(!seen_last, "block after the last block");
        for (int w = 0; w < 16; w++)
          for (int b = 3; b >= 0; b--) got.push_back(blk[w][8*b +: 8]);
        if (blk_last) begin
          seen_last = 1;
          nlast++;
        end
        n++;
        if (n > max_blocks) begin
          check(0, "too many blocks");
          seen_last = 1;
        end
      end
    end
    @(negedge clk);
    blk_ready = 0;
  endtask

  task automatic produce(input bytes_t msg, input bit gaps);
    foreach (msg[i]) begin
      in_valid = 1;
      in_byte  = msg[i];
      #1;
      while (!in_ready) begin
        @(negedge clk);
        #1;
      end
      @(negedge clk);
      in_valid = 0;
      if (gaps && $urandom_range(0, 3) == 0) repeat ($urandom_range(1, 3)) @(negedge clk);
    end
    finish_valid = 1;
    #1;
    while (!finish_ready) begin
      @(negedge clk);
      #1;
    end
    @(negedge clk);
    finish_valid = 0;
  endtask

  task automatic run(input bytes_t msg, input bit gaps);
    bytes_t exp = ref_pad(msg);
    @(negedge clk);
    init = 1;
    @(negedge clk);
    init = 0;
    got = {};
    nlast = 0;
    seen_last = 0;
    fork
      produce(msg, gaps);
      consume(exp.size() / 64 + 1);
    join
    check(got.size() == exp.size(), $sformatf("%0d bytes: %0d padded bytes, expected %0d",
          msg.size(), got.size(), exp.size()));
    if (got.size() == exp.size())
      check(got == exp, $sformatf("%0d bytes: padded content", msg.size()));
    check(nlast == 1, "exactly one last block");
    if ((msg.size() % 64) > 55) extra_pad_msgs++;
    // after the last block nothing is accepted until init
    #1;
    check(!in_ready && !finish_ready && !blk_valid, "idle after the last block");
  endtask

  // 64 bytes offered back to back with the consumer stalled: one byte per clock
  task automatic stream_rate();
    int t0, t1;
    @(negedge clk);
    init = 1;
    @(negedge clk);
    init = 0;
    t0 = $time;
    in_valid = 1;
    for (int i = 0; i < 64; i++) begin
      in_byte = 8'(i);
      #1;
      check(in_ready, "absorbing a byte every clock");
      @(negedge clk);
    end
    in_valid = 0;
    t1 = $time;
    check((t1 - t0) == 64 * 10, "64 bytes in 64 clocks");
    #1;
    check(blk_valid && !blk_last && !in_ready, "full block offered, input stalled");
    stream_checks++;
  endtask

  initial begin
    bytes_t msg;
    int lens [] = '{0, 1, 3, 55, 56, 57, 63, 64, 65, 119, 120, 127, 128, 200};
    repeat (3) @(posedge clk);
    rst_n = 1;

    msg = str_bytes("abc");
    run(msg, 0);
    foreach (lens[k]) begin
      msg = {};
      repeat (lens[k]) msg.push_back(8'($urandom));
      run(msg, 1);
    end
    for (int n = 0; n < 30; n++) begin
      msg = {};
      repeat ($urandom_range(0, 300)) msg.push_back(8'($urandom));
      run(msg, 1);
    end
    stream_rate();
    check(extra_pad_msgs > 0, "extra padding block case exercised");
    check(stream_checks == 1, "stream rate case exercised");
    $display("extra padding block messages: %0d", extra_pad_msgs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
