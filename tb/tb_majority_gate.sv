// Testbench of majority_gate: all 16 combinations of four check sums; the
// output must be 1 exactly when three or four of them are 1.
module tb_majority_gate;
  logic [3:0] chk;
  logic       maj;
  int checks = 0, failures = 0;

  majority_gate #(.J(4)) dut (.chk(chk), .maj(maj));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int ones;
      chk  = 4'(v);
      ones = int'(chk[0]) + int'(chk[1]) + int'(chk[2]) + int'(chk[3]);
      #1;
      checks++;
      if (maj !== (ones >= 3)) begin
        failures++;
        $display("FAIL chk=%b maj=%b", chk, maj);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
