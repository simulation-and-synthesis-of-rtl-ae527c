// Systematic (15,7) EG-LDPC encoder.
//
// The seven information bits are copied to code bits 6..0 and the eight parity
// bits s1..s8 are placed in code bits 7..14 (s1 = code[7]). The parity is the
// remainder of a systematic cyclic encoding with generator
// g(x) = 1 + x^4 + x^6 + x^7 + x^8: code bit v[j] is the coefficient of
// x^(14-j), so the information bits are the coefficients of x^14..x^8 and
// m(x)*x^8 mod g(x) gives the coefficients of x^7..x^0, that is bits 7..14.
// The remainder is computed by the usual bit-serial long division, unrolled.
//
// Purely combinational. The 7-in/15-out interface and the s1..s8 outputs follow
// the published encoder waveform (info 1100110 -> code 001101111100110);
// the generator polynomial is the one whose parity checks include the
// decoder's check equations.
module eg_encoder
  import mldd_pkg::*;
(
  input  dataword_t     info,
  output codeword_t     code,
  output logic [N-K-1:0] s
);

  logic [N-K-1:0] rem;

  always_comb begin
    // rem[i] is the coefficient of x^i of the running remainder.
    rem = '0;
    // Feed the information bits from the highest power (x^14 = info[0]) down.
    for (int unsigned i = 0; i < K; i++) begin
      logic fb;
      fb  = info[i] ^ rem[N-K-1];
      rem = {rem[N-K-2:0], 1'b0};
      if (fb) rem = rem ^ GEN_POLY[N-K-1:0];
    end
    // Coefficient of x^p sits at code bit 14-p.
    for (int unsigned p = 0; p < N - K; p++) begin
      s[N-K-1-p] = rem[p];
    end
    code = {s, info};
  end

endmodule
