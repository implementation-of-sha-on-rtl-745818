// tb_sha1_msg_schedule: checks the 80 scheduled words of random blocks.
//
// A random block is loaded, then the scheduler is advanced once per clock and W_t is
// compared in each of the 80 rounds with the fully expanded schedule of the reference
// model. One block uses the FIPS 180 "abc" block, whose W_16 = 0xC2C4C6C0... is easy
// to recognise in a wave view. Also checks that W_t holds while advance is low.
module tb_sha1_msg_schedule;
  import sha1_pkg::*;
  import sha1_ref_pkg::ref_schedule;

  logic   clk = 0, rst_n = 0, load = 0, advance = 0;
  block_t blk;
  word_t  w;
  int checks = 0, failures = 0;

  sha1_msg_schedule dut (.clk(clk), .rst_n(rst_n), .load(load), .block(blk),
                         .advance(advance), .w(w));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_block(input block_t m);
    sha1_ref_pkg::word_t mm [16];
    sha1_ref_pkg::word_t exp [80];
    for (int i = 0; i < 16; i++) mm[i] = m[i];
    ref_schedule(mm, exp);
    @(negedge clk);
    blk = m; load = 1;
    @(negedge clk);
    load = 0;
    for (int t = 0; t < 80; t++) begin
      // hold for a cycle now and then: W_t must not move
      if (t % 17 == 5) begin
        advance = 0;
        @(negedge clk);
      end
      checks++;
      if (w !== exp[t]) begin
        failures++;
        $display("W mismatch t=%0d got %h exp %h", t, w, exp[t]);
      end
      advance = 1;
      @(negedge clk);
      advance = 0;
    end
  endtask

  initial begin
    block_t m;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 16; i++) m[i] = '0;
    m[0] = 32'h61626380; m[15] = 32'h00000018;
    run_block(m);
    for (int n = 0; n < 20; n++) begin
      for (int i = 0; i < 16; i++) m[i] = $urandom;
      run_block(m);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
