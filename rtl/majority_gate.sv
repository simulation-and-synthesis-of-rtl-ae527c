// Majority gate of the one-step majority-logic decoder.
//
// Outputs 1 when strictly more than half of the J check sums are 1. With J=4
// orthogonal check sums that means three or four: a wrong bit under decoding
// sets all four sums (or three, if a second error shares one of them), while
// errors elsewhere, at most two of them, set at most two sums. A 2-2 tie is
// therefore not corrected; correcting on a tie would flip good bits when two
// errors sit outside the bit under decoding.
//
// Purely combinational; the count is a small adder tree.
module majority_gate #(
  parameter int unsigned J = 4
) (
  input  logic [J-1:0] chk,
  output logic         maj
);

  logic [$clog2(J+1)-1:0] ones;

  always_comb begin
    ones = '0;
    for (int unsigned i = 0; i < J; i++) ones = ones + chk[i];
    maj = (2 * ones) > J;
  end

endmodule
