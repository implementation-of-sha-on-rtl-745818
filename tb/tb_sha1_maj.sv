// tb_sha1_maj: exhaustive per-bit and random-word check of sha1_maj.
//
// Every bit position is independent, so the eight input combinations are applied on
// every bit lane at once (each lane sees a different combination through a rotating
// pattern), followed by 2000 random words. Expected value: (x & y) | (x & z) | (y & z), written in
// OR form rather than the gate structure of the module.
module tb_sha1_maj;
  import sha1_pkg::*;

  word_t x, y, z, f;
  int checks = 0, failures = 0;

  sha1_maj dut (.x(x), .y(y), .z(z), .f(f));

  task automatic check();
    word_t exp;
    #1;
    exp = (x & y) | (x & z) | (y & z);
    checks++;
    if (f !== exp) begin
      failures++;
      $display("MISMATCH x=%h y=%h z=%h got %h exp %h", x, y, z, f, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 8; c++) begin
      x = {32{c[2]}}; y = {32{c[1]}}; z = {32{c[0]}};
      check();
    end
    for (int i = 0; i < 2000; i++) begin
      x = $urandom; y = $urandom; z = $urandom;
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
