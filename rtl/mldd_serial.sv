// Serial one-step majority-logic detector/decoder (MLDD) with early finish.
//
// The word read from memory is loaded into a cyclic shift register. Each clock
// cycle the XOR matrix forms the four check sums orthogonal on bit 0, the
// majority gate decides whether bit 0 is wrong, and the register rotates one
// place with bit 0 corrected on its way round. The control unit records
// whether any check sum was set in the first three iterations: if none was,
// the word is error free and is released after those three cycles; otherwise
// the decoder goes on to correct the whole word (N+3 = 18 iterations). Any
// error of up to two bits is corrected and any error of up to four bits is
// detected.
//
// Interface: start with code_in while busy is low. done is high for one cycle,
// 3 cycles after the start edge for a clean word and 18 cycles after it for a
// word with errors; code_out, err (error detected) and iter (iterations used)
// are valid with done. code_out is 0 at other times.
//
// The structure (shift register, XOR matrix, majority gate, control, output
// buffers and correction gate) follows the published MLDD schematic and flow
// diagram; the cycle timing is this design's choice.
module mldd_serial
  import mldd_pkg::*;
#(
  localparam int unsigned IW = $clog2(N + DET_ITERS + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  codeword_t     code_in,
  output logic          busy,
  output logic          done,
  output codeword_t     code_out,
  output logic          err,
  output logic [IW-1:0] iter
);

  codeword_t q;
  checks_t   chk;
  logic      maj, load, shift;

  cyclic_shift_register #(.N(N)) u_csr (
    .clk  (clk),
    .load (load),
    .d    (code_in),
    .shift(shift),
    .corr (maj),
    .q    (q)
  );

  xor_matrix u_xor (
    .word(q),
    .chk (chk)
  );

  majority_gate #(.J(J)) u_maj (
    .chk(chk),
    .maj(maj)
  );

  mldd_control #(.N(N), .DET_ITERS(DET_ITERS)) u_ctrl (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (start),
    .chk_any(|chk),
    .load   (load),
    .shift  (shift),
    .busy   (busy),
    .finish (done),
    .err    (err),
    .iter   (iter)
  );

  mldd_output_buffer #(.N(N), .ROT(DET_ITERS)) u_buf (
    .q     (q),
    .finish(done),
    .y     (code_out)
  );

endmodule
