// Testbench of cyclic_shift_register: random loads, shifts with random
// correction and idle cycles are compared with a model; the published shift
// sequence 001101111100110 -> 000110111110011 -> 100011011111001 ->
// 110001101111100 is checked, and N shifts without correction must restore
// the loaded word.
module tb_cyclic_shift_register;
  logic        clk = 0;
  logic        load, shift, corr;
  logic [14:0] d, q, model;
  int checks = 0, failures = 0;

  cyclic_shift_register #(.N(15)) dut (.clk(clk), .load(load), .d(d),
                                       .shift(shift), .corr(corr), .q(q));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s q=%b model=%b", what, q, model);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0; shift = 0; corr = 0; d = 0;
    // published sequence
    @(negedge clk);
    load = 1; d = 15'b001101111100110;
    @(negedge clk);
    load = 0; shift = 1;
    @(negedge clk);
    check(q == 15'b000110111110011, "published shift 1");
    @(negedge clk);
    check(q == 15'b100011011111001, "published shift 2");
    @(negedge clk);
    check(q == 15'b110001101111100, "published shift 3");
    repeat (12) @(negedge clk);
    check(q == 15'b001101111100110, "15 shifts restore the word");
    shift = 0;
    // random operation
    model = q;
    for (int n = 0; n < 3000; n++) begin
      load  = ($urandom_range(9) == 0);
      shift = ($urandom_range(3) != 0);
      corr  = 1'($urandom);
      d     = 15'($urandom);
      if (load)       model = d;
      else if (shift) model = {model[0] ^ corr, model[14:1]};
      @(negedge clk);
      check(q == model, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
