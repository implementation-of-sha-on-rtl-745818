// sha1_f_k: per-round selection of the logical function f(t; B,C,D) and constant K_t.
//
// The 80 rounds fall into four groups of 20. The group picks the function and the
// constant:
//   rounds  0..19  Ch(B,C,D)      K = 5A827999
//   rounds 20..39  Parity(B,C,D)  K = 6ED9EBA1
//   rounds 40..59  Maj(B,C,D)     K = 8F1BBCDC
//   rounds 60..79  Parity(B,C,D)  K = CA62C1D6
// All three functions are evaluated in parallel and a multiplexer driven by the round
// group chooses one; both round groups that use Parity share one instance. Purely
// combinational. The round number is a 7-bit input; values above 79 give group 3.
// The round grouping and constants follow the original design; the shared Parity
// instance and the 7-bit round input are this design's choice.
module sha1_f_k
  import sha1_pkg::*;
(
  input  logic [6:0] round,  // t, 0..79
  input  word_t      b,
  input  word_t      c,
  input  word_t      d,
  output word_t      f,      // f(t; B,C,D)
  output word_t      k       // K_t
);
  typedef enum logic [1:0] {GRP_CH, GRP_PAR1, GRP_MAJ, GRP_PAR2} grp_e;

  grp_e  grp;
  word_t f_ch, f_par, f_maj;

  sha1_ch     u_ch  (.x(b), .y(c), .z(d), .f(f_ch));
  sha1_parity u_par (.x(b), .y(c), .z(d), .f(f_par));
  sha1_maj    u_maj (.x(b), .y(c), .z(d), .f(f_maj));

  always_comb begin
    if      (round < 7'd20) grp = GRP_CH;
    else if (round < 7'd40) grp = GRP_PAR1;
    else if (round < 7'd60) grp = GRP_MAJ;
    else                    grp = GRP_PAR2;

    unique case (grp)
      GRP_CH:   begin f = f_ch;  k = K0; end
      GRP_PAR1: begin f = f_par; k = K1; end
      GRP_MAJ:  begin f = f_maj; k = K2; end
      GRP_PAR2: begin f = f_par; k = K3; end
    endcase
  end
endmodule
