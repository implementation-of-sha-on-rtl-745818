// tb_sha1_f_k: checks round function and constant selection over all 80 rounds.
//
// For every round t = 0..79 and several random (B,C,D) triples the outputs are
// compared with the reference functions of sha1_ref_pkg, which pick the function and
// constant by t / 20.
module tb_sha1_f_k;
  import sha1_pkg::*;
  import sha1_ref_pkg::ref_f;
  import sha1_ref_pkg::ref_k;

  logic [6:0] round;
  word_t b, c, d, f, k;
  int checks = 0, failures = 0;

  sha1_f_k dut (.round(round), .b(b), .c(c), .d(d), .f(f), .k(k));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 80; t++) begin
      for (int r = 0; r < 20; r++) begin
        round = 7'(t); b = $urandom; c = $urandom; d = $urandom;
        #1;
        checks += 2;
        if (f !== ref_f(t, b, c, d)) begin
          failures++;
          $display("f mismatch t=%0d got %h exp %h", t, f, ref_f(t, b, c, d));
        end
        if (k !== ref_k(t)) begin
          failures++;
          $display("k mismatch t=%0d got %h exp %h", t, k, ref_k(t));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
