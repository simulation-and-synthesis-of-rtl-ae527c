// Testbench of mldd_parallel.
//  * The published example: stored word 010101101001111 read back as
//    010101101001100 must be corrected to 010101101001111 with err high.
//  * All 128 codewords combined with every error pattern of up to two bits:
//    the output must be the nearest codeword, err high exactly when an error
//    was added, one cycle after start.
//  * Every pattern of three or four errors must be detected.
//  * Words are fed back to back, one per cycle, to check the pipelining.
module tb_mldd_parallel;
  import mldd_ref_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        start, done, err;
  logic [14:0] code_in, code_out;
  int checks = 0, failures = 0;

  // expected results in flight
  logic [14:0] exp_q [$];
  logic        experr_q [$];
  bit          detonly_q [$];

  mldd_parallel dut (.clk(clk), .rst_n(rst_n), .start(start), .code_in(code_in),
                     .done(done), .code_out(code_out), .err(err));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: out=%b err=%b", what, code_out, err);
    end
  endtask

  // Results are checked at each negedge: a word started in one cycle must be
  // done in the next.
  logic [14:0] want;
  logic        want_err;
  always @(negedge clk) begin
    if (rst_n) begin
      if (exp_q.size() > 0) begin
        want     = exp_q.pop_front();
        want_err = experr_q.pop_front();
        check(done, "done one cycle after start");
        if (!detonly_q.pop_front()) check(code_out == want, "corrected word");
        check(err == want_err, "error flag");
      end else begin
        check(!done, "no spurious done");
      end
    end
  end

  task automatic feed(input logic [14:0] w, input logic [14:0] exp, input bit exp_err,
                      input bit det_only = 1'b0);
    start   = 1;
    code_in = w;
    @(posedge clk);
    exp_q.push_back(exp);
    experr_q.push_back(exp_err);
    detonly_q.push_back(det_only);
    #1;
    start = 0;
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; code_in = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk);
    #1;
    feed(15'b010101101001100, 15'b010101101001111, 1'b1);
    for (int d = 0; d < 128; d++) begin
      automatic logic [14:0] c = ref_encode(7'(d));
      feed(c, c, 1'b0);
      for (int i = 0; i < 15; i++) begin
        for (int j = i; j < 15; j++) begin
          automatic logic [14:0] e = (15'(1) << i) | (15'(1) << j);
          feed(c ^ e, ref_decode(c ^ e), 1'b1);
        end
      end
    end
    // three and four errors: only detection is required
    begin
      automatic logic [14:0] c = ref_encode(7'($urandom));
      for (int m = 1; m < (1 << 15); m++) begin
        automatic int w = popcount15(15'(m));
        if (w == 3 || w == 4) feed(c ^ 15'(m), c, 1'b1, 1'b1);
      end
    end
    repeat (3) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
