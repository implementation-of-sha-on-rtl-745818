// tb_sha1_long_message: long-message workload through the padder and the core.
//
// Hashes the FIPS 180 long test message, one million bytes of 'a' (8,000,000 bits,
// 15,626 blocks), by connecting sha1_padder directly to sha1_core as the top level
// does, with bytes offered every clock. Checks the digest against the published value
// 34aa973c d4c4daa4 f61eeb2b dbad2731 6534016f, the padder's 64-bit length counter,
// the number of blocks the core took, and the sustained rate: with the core the slower
// stage, each block costs 82 clocks, the padder refilling its buffer in the meantime.
module tb_sha1_long_message;
  import sha1_pkg::*;

  localparam int unsigned N_BYTES  = 1_000_000;
  localparam int unsigned N_BLOCKS = (N_BYTES + 8) / 64 + 1;   // 15626

  logic    clk = 0, rst_n = 0;
  logic    in_valid = 0, in_ready, finish_valid = 0, finish_ready;
  logic    blk_valid, blk_last, blk_ready, pad_busy, core_busy, done, digest_valid;
  block_t  blk;
  digest_t digest;
  int checks = 0, failures = 0;
  int blocks = 0, cycle = 0;

  sha1_padder u_pad (.clk(clk), .rst_n(rst_n), .init(1'b0), .in_valid(in_valid),
                     .in_byte(8'h61), .in_ready(in_ready), .finish_valid(finish_valid),
                     .finish_ready(finish_ready), .blk_valid(blk_valid), .blk(blk),
                     .blk_last(blk_last), .blk_ready(blk_ready), .busy(pad_busy));
  sha1_core u_core (.clk(clk), .rst_n(rst_n), .init(1'b0), .blk_valid(blk_valid), .blk(blk),
                    .blk_last(blk_last), .blk_ready(blk_ready), .busy(core_busy), .done(done),
                    .digest_valid(digest_valid), .digest(digest));

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    cycle++;
    if (blk_valid && blk_ready) blocks++;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
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

  initial begin
    int sent = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    in_valid = 1;
    while (sent < N_BYTES) begin
      #1;
      if (in_ready) sent++;   // taken at the coming rising edge
      @(negedge clk);
    end
    in_valid = 0;
    finish_valid = 1;
    #1;
    while (!finish_ready) begin
      @(negedge clk);
      #1;
    end
    @(negedge clk);
    finish_valid = 0;
    check(u_pad.len_q == 64'(N_BYTES) * 8, "64-bit length counter holds 8,000,000");
    while (!digest_valid) @(negedge clk);
    check(digest === 160'h34aa973cd4c4daa4f61eeb2bdbad27316534016f, "million-'a' digest");
    check(blocks == N_BLOCKS, $sformatf("%0d blocks taken, expected %0d", blocks, N_BLOCKS));
    check(cycle <= 82 * N_BLOCKS + 200, $sformatf("%0d clocks for %0d blocks", cycle, blocks));
    $display("%0d blocks in %0d clocks", blocks, cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
