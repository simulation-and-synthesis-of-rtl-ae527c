// Reference model for the MLDD testbenches, written independently of the RTL.
//
// ref_encode uses the parity equations of the (15,7) code written out bit by
// bit (code bits 6..0 = information, bits 7..14 = parity s1..s8).
// ref_decode finds the nearest codeword by searching all 128 codewords, which
// is what a correct bounded-distance decoder must return for up to two errors.
package mldd_ref_pkg;

  function automatic logic [14:0] ref_encode(input logic [6:0] d);
    logic [14:0] c;
    c[6:0] = d;
    c[7]  = d[0] ^ d[4] ^ d[6];
    c[8]  = d[0] ^ d[1] ^ d[4] ^ d[5] ^ d[6];
    c[9]  = d[0] ^ d[1] ^ d[2] ^ d[4] ^ d[5];
    c[10] = d[1] ^ d[2] ^ d[3] ^ d[5] ^ d[6];
    c[11] = d[0] ^ d[2] ^ d[3];
    c[12] = d[1] ^ d[3] ^ d[4];
    c[13] = d[2] ^ d[4] ^ d[5];
    c[14] = d[3] ^ d[5] ^ d[6];
    return c;
  endfunction

  function automatic int popcount15(input logic [14:0] v);
    int n = 0;
    for (int i = 0; i < 15; i++) n += int'(v[i]);
    return n;
  endfunction

  function automatic bit is_codeword(input logic [14:0] w);
    return ref_encode(w[6:0]) == w;
  endfunction

  function automatic logic [14:0] ref_decode(input logic [14:0] w);
    logic [14:0] best = w;
    int bd = 16;
    for (int d = 0; d < 128; d++) begin
      logic [14:0] c = ref_encode(7'(d));
      int hd = popcount15(c ^ w);
      if (hd < bd) begin
        bd   = hd;
        best = c;
      end
    end
    return best;
  endfunction

  // Rotate towards bit 0 by k places: result[j] = w[(j+k) mod 15].
  function automatic logic [14:0] rot_down(input logic [14:0] w, input int k);
    logic [14:0] r;
    for (int j = 0; j < 15; j++) r[j] = w[(j + k) % 15];
    return r;
  endfunction

endpackage
