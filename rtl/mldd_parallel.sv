// Parallel majority-logic detector/decoder (MLDD).
//
// Instead of rotating the word through one XOR matrix N times, the N rotated
// copies of the word are wired up at once: copy p is the word rotated p places
// towards bit 0, so its bit 0 is code bit p and one XOR matrix plus one
// majority gate on it decide whether bit p is wrong. All N bits are thus
// corrected in the same cycle, and the N x 4 check sums, which are every
// parity check of the code, detect any error pattern that is not itself a
// codeword (every error of up to four bits) in that single iteration. Up to
// two errors are corrected.
//
// Interface: start marks code_in valid. One clock edge later done is high for
// one cycle with code_out (corrected word) and err (some check sum was 1). A
// new word may be started every cycle. Reset (synchronous, active low) clears
// done only.
//
// Deciding all bits in parallel in a single iteration with the same check
// equations as the serial decoder follows the published parallel MLDD; the
// registered output, which makes it a one-stage pipeline, is this design's
// choice.
module mldd_parallel
  import mldd_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  codeword_t code_in,
  output logic      done,
  output codeword_t code_out,
  output logic      err
);

  codeword_t corr;
  logic [N-1:0] any_chk;

  for (genvar p = 0; p < N; p++) begin : g_bit
    codeword_t rotated;
    checks_t   chk;

    always_comb begin
      for (int unsigned j = 0; j < N; j++) rotated[j] = code_in[(j + p) % N];
    end

    xor_matrix u_xor (
      .word(rotated),
      .chk (chk)
    );

    majority_gate #(.J(J)) u_maj (
      .chk(chk),
      .maj(corr[p])
    );

    assign any_chk[p] = |chk;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      done <= 1'b0;
    end else begin
      done <= start;
    end
  end

  always_ff @(posedge clk) begin
    if (start) begin
      code_out <= code_in ^ corr;
      err      <= |any_chk;
    end
  end

endmodule
