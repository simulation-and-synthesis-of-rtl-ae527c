// Control unit of the serial majority-logic detector/decoder (MLDD).
//
// The decoder runs one iteration per clock cycle: the XOR matrix checks the
// word in the cyclic shift register, the majority gate decides on bit 0 and
// the register rotates one place, correcting bit 0 on the way. This unit
// counts the iterations in iter and keeps the detection register det: in
// iterations 0..DET_ITERS-1 it stores whether any check sum was 1.
//
//  * When iter reaches DET_ITERS (3) and det is all zero the word is taken as
//    error free and finish is raised at once: an error-free read costs three
//    iterations instead of a full decode. Every error of up to four bits sets
//    a check sum within these three iterations.
//  * Otherwise the rotation goes on until iter = N + DET_ITERS (18), so that
//    every bit has passed the majority gate. The register then stands rotated
//    by DET_ITERS places, exactly as after an early finish, and the output
//    buffer undoes this with fixed wiring.
//
// Interface: start (accepted while busy is low) makes load high in the same
// cycle; the word is in the register after that edge. shift is high in each
// decoding cycle. finish is high for one cycle, DET_ITERS or N+DET_ITERS
// cycles after the start edge; err (= det not zero) and iter are valid with
// it. Reset is synchronous and active low.
//
// The detection register, the three-iteration test and the N+3 end condition
// follow the published MLDD flow diagram, read as loading det in iterations
// 0, 1 and 2 and testing it when i reaches 3; the cycle timing is this
// design's choice.
module mldd_control #(
  parameter int unsigned N         = 15,
  parameter int unsigned DET_ITERS = 3,
  localparam int unsigned IW       = $clog2(N + DET_ITERS + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          chk_any,
  output logic          load,
  output logic          shift,
  output logic          busy,
  output logic          finish,
  output logic          err,
  output logic [IW-1:0] iter
);

  typedef enum logic {IDLE, RUN} state_t;

  state_t               state;
  logic [DET_ITERS-1:0] det;

  localparam logic [IW-1:0] ITER_DET = IW'(DET_ITERS);
  localparam logic [IW-1:0] ITER_END = IW'(N + DET_ITERS);

  always_comb begin
    busy   = (state == RUN);
    load   = (state == IDLE) && start;
    finish = busy && (((iter == ITER_DET) && (det == '0)) || (iter == ITER_END));
    shift  = busy && !finish;
    err    = (det != '0);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= IDLE;
      iter  <= '0;
      det   <= '0;
    end else begin
      if (load) begin
        state <= RUN;
        iter  <= '0;
        det   <= '0;
      end else if (finish) begin
        state <= IDLE;
      end else if (shift) begin
        iter <= iter + 1'b1;
        if (iter < ITER_DET) det[iter[$clog2(DET_ITERS+1)-1:0]] <= chk_any;
      end
    end
  end

endmodule
