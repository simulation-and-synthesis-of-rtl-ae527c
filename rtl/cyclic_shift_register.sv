// Cyclic shift register of the serial majority-logic decoder.
//
// Holds the N-bit word under decoding. load copies d in. shift rotates the
// word one place towards bit 0: bit j takes bit j+1, and bit 0 (the bit under
// decoding) re-enters at bit N-1 through the correction XOR, flipped when corr
// is high. After N shifts every bit has passed bit 0 once and the word is back
// in its original order. load wins over shift.
//
// One clock edge per shift. The register, the rotation and the correction gate
// on the feedback follow the published serial decoder drawing; bit numbering
// is described in mldd_pkg.
module cyclic_shift_register #(
  parameter int unsigned N = 15
) (
  input  logic         clk,
  input  logic         load,
  input  logic [N-1:0] d,
  input  logic         shift,
  input  logic         corr,
  output logic [N-1:0] q
);

  always_ff @(posedge clk) begin
    if (load)       q <= d;
    else if (shift) q <= {q[0] ^ corr, q[N-1:1]};
  end

endmodule
