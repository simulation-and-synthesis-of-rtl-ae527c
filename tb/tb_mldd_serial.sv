// Testbench of mldd_serial.
//  * The published decoding example: 001101111100110 must pass through the
//    register states 000110111110011, 100011011111001, 110001101111100 and
//    finish after three iterations.
//  * Every one of the 128 codewords, clean: released 3 cycles after the start
//    edge, unchanged, err low.
//  * Every single and double error on random codewords: corrected to the
//    nearest codeword, err high, released after 18 cycles.
//  * Every error pattern of one to four bits (1940 patterns) on a random
//    codeword: must be detected within the first three iterations (err high).
module tb_mldd_serial;
  import mldd_ref_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        start, busy, done, err;
  logic [14:0] code_in, code_out;
  logic [4:0]  iter;
  int checks = 0, failures = 0;
  int n_early = 0, n_full = 0;

  mldd_serial dut (.clk(clk), .rst_n(rst_n), .start(start), .code_in(code_in),
                   .busy(busy), .done(done), .code_out(code_out), .err(err),
                   .iter(iter));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: in=%b out=%b err=%b", what, code_in, code_out, err);
    end
  endtask

  // Decode one word; returns the number of cycles from the start edge to done.
  task automatic decode(input logic [14:0] w, output int cyc);
    @(negedge clk);
    start   = 1;
    code_in = w;
    @(negedge clk);
    start   = 0;
    code_in = 15'($urandom);
    cyc     = 1;
    while (!done && cyc < 40) begin
      @(negedge clk);
      cyc++;
    end
    cyc = cyc - 1;
    if (cyc == 3) n_early++;
    if (cyc == 18) n_full++;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    start = 0; code_in = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // published example
    @(negedge clk);
    start = 1; code_in = 15'b001101111100110;
    @(negedge clk);
    start = 0;
    check(dut.q == 15'b001101111100110, "example loaded");
    @(negedge clk);
    check(dut.q == 15'b000110111110011, "example shift 1");
    @(negedge clk);
    check(dut.q == 15'b100011011111001, "example shift 2");
    @(negedge clk);
    check(dut.q == 15'b110001101111100, "example shift 3");
    check(done && !err && code_out == 15'b001101111100110, "example released");

    // clean codewords
    for (int d = 0; d < 128; d++) begin
      automatic logic [14:0] c = ref_encode(7'(d));
      decode(c, cyc);
      check(cyc == 3, $sformatf("clean word latency %0d", cyc));
      check(code_out == c && !err, "clean word");
      check(iter == 3, "clean iterations");
    end

    // all single and double errors
    for (int rep = 0; rep < 3; rep++) begin
      automatic logic [14:0] c = ref_encode(7'($urandom));
      for (int i = 0; i < 15; i++) begin
        for (int j = i; j < 15; j++) begin
          automatic logic [14:0] e = (15'(1) << i) | (15'(1) << j);
          decode(c ^ e, cyc);
          check(cyc == 18, $sformatf("error latency %0d", cyc));
          check(code_out == c, "corrected");
          check(code_out == ref_decode(c ^ e), "nearest codeword");
          check(err, "error flagged");
        end
      end
    end

    // detection of every pattern of up to four errors in three iterations
    begin
      automatic int patterns = 0;
      automatic logic [14:0] c = ref_encode(7'($urandom));
      for (int m = 1; m < (1 << 15); m++) begin
        if (popcount15(15'(m)) <= 4) begin
          patterns++;
          decode(c ^ 15'(m), cyc);
          check(err && cyc == 18, $sformatf("detect pattern %b", 15'(m)));
        end
      end
      check(patterns == 1940, "pattern count");
    end

    check(n_early > 0 && n_full > 0, "both finish paths used");
    $display("early finishes %0d, full decodes %0d", n_early, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
