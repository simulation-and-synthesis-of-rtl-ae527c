// Error-pattern sweep through mldd_memory_system at its default size.
//
// Every non-zero 15-bit error pattern (32767 of them) is written into memory
// as the fault mask of a random word and the word is read once through the
// serial MLDD and once through the parallel MLDD.
//  * Parallel: the error must be flagged unless the pattern is itself a
//    codeword (then no parity check can see it); patterns of one or two bits
//    must be corrected.
//  * Serial: every pattern of up to four bits must be flagged within the
//    three detection iterations (so the read takes the full 18 iterations);
//    patterns of one or two bits must be corrected. A word that passes the
//    three detection iterations must come out exactly as it was stored.
// The number of patterns of each weight that the serial early check misses is
// printed; those are the silent corruptions of five or more upsets. They must
// be exactly the 127 patterns that are codewords: for this code the twelve
// check sums of the three detection iterations already see every error that
// any parity check can see.
module tb_mldd_error_sweep;
  import mldd_ref_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        wr_en, rd_en, par_mode;
  logic [3:0]  addr;
  logic [6:0]  data_in, data_out;
  logic [14:0] fault_mask, code_out;
  logic        rd_ready, rd_valid, err_detected;
  logic [4:0]  dec_iters;

  int checks = 0, failures = 0;
  int missed_serial [16];
  int missed_parallel = 0, codeword_patterns = 0;

  mldd_memory_system dut (
    .clk(clk), .rst_n(rst_n), .wr_en(wr_en), .rd_en(rd_en), .addr(addr),
    .data_in(data_in), .fault_mask(fault_mask), .par_mode(par_mode),
    .rd_ready(rd_ready), .rd_valid(rd_valid), .data_out(data_out),
    .code_out(code_out), .err_detected(err_detected), .dec_iters(dec_iters));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: mask=%b data_out=%b err=%b", what, fault_mask, data_out, err_detected);
    end
  endtask

  task automatic read_back(input bit par);
    int n = 0;
    rd_en = 1; par_mode = par;
    @(posedge clk);
    #1 rd_en = 0;
    while (!rd_valid && n < 40) begin
      @(posedge clk);
      #1 n++;
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; rd_en = 0; par_mode = 0; addr = 0; data_in = 0; fault_mask = 0;
    foreach (missed_serial[i]) missed_serial[i] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int m = 1; m < (1 << 15); m++) begin
      automatic logic [14:0] e = 15'(m);
      automatic int          w = popcount15(e);
      automatic logic [6:0]  d = 7'($urandom);
      automatic logic [14:0] stored = ref_encode(d) ^ e;
      automatic bit          cw = is_codeword(e);
      if (cw) codeword_patterns++;
      addr = 4'(m); data_in = d; fault_mask = e; wr_en = 1;
      @(posedge clk);
      #1 wr_en = 0; fault_mask = '0;

      read_back(1'b1);
      check(rd_valid, "parallel result");
      check(err_detected == !cw, "parallel detection");
      if (!err_detected) missed_parallel++;
      if (w <= 2) check(data_out == d, "parallel correction");

      read_back(1'b0);
      check(rd_valid, "serial result");
      if (w <= 4) check(err_detected && dec_iters == 5'd18, "serial detection in three iterations");
      if (w <= 2) check(data_out == d, "serial correction");
      if (!err_detected) begin
        missed_serial[w]++;
        check(dec_iters == 5'd3 && code_out == stored, "serial early release unchanged");
      end
      @(posedge clk);
      #1;
    end
    for (int w = 1; w < 16; w++)
      $display("weight %0d: %0d patterns pass the serial three-iteration check", w, missed_serial[w]);
    $display("patterns that are codewords: %0d, missed by parallel check: %0d",
             codeword_patterns, missed_parallel);
    check(codeword_patterns == 127, "127 non-zero codewords");
    begin
      automatic int total = 0;
      foreach (missed_serial[i]) total += missed_serial[i];
      // the three serial detection iterations miss only undetectable patterns
      check(total == codeword_patterns, "serial misses only codeword patterns");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
