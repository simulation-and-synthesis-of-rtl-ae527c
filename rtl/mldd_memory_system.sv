// EG-LDPC protected memory with majority-logic detector/decoders.
//
// Write path: the 7-bit word is encoded into a (15,7) EG-LDPC codeword and
// stored in a 16-word memory. fault_mask is XORed into the codeword as it is
// written, to place upsets in memory on purpose (all zero in normal use).
//
// Read path: the codeword is read (one cycle) and handed to one of two
// decoders, picked per read by par_mode:
//  * par_mode = 0, serial MLDD: a clean word is released after 3 iterations,
//    a word with errors after a full serial decode of 18 iterations;
//  * par_mode = 1, parallel MLDD: every word is checked and corrected in one
//    iteration.
// Either way rd_valid pulses with data_out (the decoded 7-bit word),
// code_out (the decoded codeword), err_detected and dec_iters (iterations the
// decoder spent: 3 or 18 serial, 1 parallel).
//
// Timing, counted from the clock edge that samples rd_en (the memory read):
// the serial decoder loads the word on the next edge and rd_valid is high
// after 4 edges for a clean word and 19 for a word with errors; the parallel
// decoder works on the memory output directly and rd_valid is high after the
// next edge, 1 cycle after the read.
// rd_ready is low while the serial decoder is busy or about to start; parallel
// reads can be issued every cycle. Reset is synchronous and active low and
// leaves the memory contents alone.
//
// The chain encoder -> memory -> MLDD follows the published memory system;
// offering both decoders behind a mode input, the fault_mask input and the
// read handshake are this design's choices.
module mldd_memory_system
  import mldd_pkg::*;
#(
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned IW   = $clog2(N + DET_ITERS + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  logic          rd_en,
  input  logic [AW-1:0] addr,
  input  dataword_t     data_in,
  input  codeword_t     fault_mask,
  input  logic          par_mode,
  output logic          rd_ready,
  output logic          rd_valid,
  output dataword_t     data_out,
  output codeword_t     code_out,
  output logic          err_detected,
  output logic [IW-1:0] dec_iters
);

  codeword_t enc_code, mem_out;
  logic      rd_fire, pend, pend_par;

  logic      ser_busy, ser_done, ser_err;
  codeword_t ser_code;
  logic [IW-1:0] ser_iter;

  logic      par_done, par_err;
  codeword_t par_code;

  eg_encoder u_enc (
    .info(data_in),
    .code(enc_code),
    .s   ()
  );

  mldd_memory #(.DEPTH(DEPTH), .WIDTH(N)) u_mem (
    .clk     (clk),
    .write   (wr_en),
    .read    (rd_fire),
    .addr    (addr),
    .data_in (enc_code ^ fault_mask),
    .data_out(mem_out)
  );

  assign rd_ready = !ser_busy && !(pend && !pend_par);
  assign rd_fire  = rd_en && rd_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pend     <= 1'b0;
      pend_par <= 1'b0;
    end else begin
      pend     <= rd_fire;
      pend_par <= par_mode;
    end
  end

  mldd_serial u_ser (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (pend && !pend_par),
    .code_in (mem_out),
    .busy    (ser_busy),
    .done    (ser_done),
    .code_out(ser_code),
    .err     (ser_err),
    .iter    (ser_iter)
  );

  mldd_parallel u_par (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (pend && pend_par),
    .code_in (mem_out),
    .done    (par_done),
    .code_out(par_code),
    .err     (par_err)
  );

  always_comb begin
    rd_valid     = ser_done || par_done;
    code_out     = par_done ? par_code : ser_code;
    err_detected = par_done ? par_err : (ser_done && ser_err);
    dec_iters    = par_done ? IW'(1) : (ser_done ? ser_iter : '0);
    data_out     = code_out[K-1:0];
  end

  // The two decoders never finish in the same cycle: a serial decode takes
  // at least 3 cycles and blocks new reads while it runs.
  a_one_result: assert property (@(posedge clk) disable iff (!rst_n)
                                 !(ser_done && par_done));

endmodule
