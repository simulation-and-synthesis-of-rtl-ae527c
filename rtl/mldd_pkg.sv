// Shared types and constants of the (15,7) EG-LDPC majority-logic memory
// decoder.
//
// Codeword bit v[j] of every vector in this design is the code symbol that a
// textbook drawing of the serial decoder labels c(14-j). With that numbering the
// information word sits in bits 6..0, the parity bits s1..s8 in bits 7..14, and
// the symbol under decoding (the one shared by all four check equations) is
// bit 0. The decoder register rotates towards bit 0 and bit 0 re-enters at
// bit 14 through the correction XOR.
//
// CHECK_POS lists, for each of the J=4 check equations, the four bit positions
// it adds modulo 2. These are the orthogonal check sums of the code; every
// cyclic rotation of them is again a parity check, which is what both the
// serial and the parallel decoder rely on.
package mldd_pkg;

  localparam int unsigned N = 15;  // code length
  localparam int unsigned K = 7;   // information bits
  localparam int unsigned J = 4;   // orthogonal check sums per bit
  localparam int unsigned W = 4;   // bits per check sum

  typedef logic [N-1:0] codeword_t;
  typedef logic [K-1:0] dataword_t;
  typedef logic [J-1:0] checks_t;

  // Check equations of the decoder, orthogonal on bit 0.
  localparam int unsigned CHECK_POS [J][W] = '{
    '{11, 3, 2, 0},
    '{13, 9, 1, 0},
    '{14, 12, 8, 0},
    '{ 7, 6, 4, 0}
  };

  // Generator polynomial g(x) = 1 + x^4 + x^6 + x^7 + x^8, bit i = coefficient
  // of x^i. Codeword bit v[j] is the coefficient of x^(14-j).
  localparam logic [N-K:0] GEN_POLY = 9'b1_1101_0001;

  // Number of iterations whose check results form the detection register.
  localparam int unsigned DET_ITERS = 3;

endpackage
