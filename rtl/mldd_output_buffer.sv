// Output buffer of the serial majority-logic detector/decoder.
//
// While finish is low the output is held at zero; when finish is high the
// decoded word is released. The decoder always finishes with its shift
// register rotated ROT places towards bit 0 (after ROT iterations for a clean
// word, after N+ROT for a corrected one), so the buffer reconnects the
// register stages in the original bit order: y[j] = q[(j - ROT) mod N].
//
// Purely combinational. The published decoder drives its outputs through
// tri-state buffers enabled by finish; with two-valued logic the disabled
// state is 0 here, and finish doubles as the valid flag.
module mldd_output_buffer #(
  parameter int unsigned N   = 15,
  parameter int unsigned ROT = 3
) (
  input  logic [N-1:0] q,
  input  logic         finish,
  output logic [N-1:0] y
);

  always_comb begin
    for (int unsigned j = 0; j < N; j++) begin
      y[j] = finish & q[(j + N - (ROT % N)) % N];
    end
  end

endmodule
