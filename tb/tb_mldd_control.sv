// Testbench of mldd_control: the check-sum indication is driven per iteration.
// A run whose first three iterations show no error must finish 3 cycles after
// the start edge with err low; a run with an error indication in iteration 0,
// 1 or 2 must finish after N+3 = 18 cycles with err high. An indication after
// iteration 2 must not matter. The number of shift cycles is counted too.
module tb_mldd_control;
  logic       clk = 0, rst_n = 0;
  logic       start, chk_any;
  logic       load, shift, busy, finish, err;
  logic [4:0] iter;
  int checks = 0, failures = 0;

  mldd_control #(.N(15), .DET_ITERS(3)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .chk_any(chk_any), .load(load),
    .shift(shift), .busy(busy), .finish(finish), .err(err), .iter(iter));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s iter=%0d err=%b", what, iter, err);
    end
  endtask

  // err_iter: iteration whose check sums are non-zero, -1 for none
  task automatic run(input int err_iter, input int late_iter);
    automatic int cyc = 0, shifts = 0;
    automatic int exp_cyc = (err_iter >= 0 && err_iter < 3) ? 18 : 3;
    @(negedge clk);
    start = 1;
    #1;
    check(load, "load with start");
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!finish && cyc < 40) begin
      chk_any = (int'(iter) == err_iter) || (int'(iter) == late_iter);
      if (shift) shifts++;
      @(negedge clk);
      cyc++;
    end
    // finish visible during cycle cyc-1 after the start edge
    check(finish, "finish reached");
    check(cyc - 1 == exp_cyc, $sformatf("finish cycle %0d expected %0d", cyc - 1, exp_cyc));
    check(shifts == exp_cyc, "shift count");
    check(err == (exp_cyc == 18), "err flag");
    check(int'(iter) == exp_cyc, "iteration counter");
    chk_any = 0;
    @(negedge clk);
    check(!busy && !finish, "idle after finish");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; chk_any = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(!busy && !finish, "idle after reset");
    for (int n = 0; n < 200; n++) begin
      automatic int e = $urandom_range(6) - 1;  // -1..5
      automatic int l = $urandom_range(3) == 0 ? $urandom_range(17, 3) : -1;
      run(e, l);
    end
    // start while busy is ignored
    @(negedge clk);
    start = 1;
    @(negedge clk);
    chk_any = 1;
    @(negedge clk);
    check(!load && busy, "start ignored while busy");
    start = 0;
    chk_any = 0;
    while (!finish) @(negedge clk);
    check(int'(iter) == 18, "busy run ends at 18");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
