// XOR matrix of the one-step majority-logic decoder.
//
// Forms the J=4 check sums B1..B4 of the word held in the decoder register.
// Each check sum is the XOR of four code bits; all four contain bit 0, the bit
// under decoding, and no other bit appears in more than one of them, so the
// sums are orthogonal on bit 0. For a codeword (or any cyclic rotation of one)
// all four are 0. The bit positions come from mldd_pkg::CHECK_POS, which are
// the published check equations c3^c11^c12^c14, c1^c5^c13^c14, c0^c2^c6^c14
// and c7^c8^c10^c14 rewritten in this design's bit numbering (v[j] = c(14-j)).
//
// Purely combinational.
module xor_matrix
  import mldd_pkg::*;
(
  input  codeword_t word,
  output checks_t   chk
);

  always_comb begin
    for (int unsigned e = 0; e < J; e++) begin
      chk[e] = 1'b0;
      for (int unsigned t = 0; t < W; t++) begin
        chk[e] = chk[e] ^ word[CHECK_POS[e][t]];
      end
    end
  end

endmodule
