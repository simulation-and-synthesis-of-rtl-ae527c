// Testbench of eg_encoder: every one of the 128 information words is encoded
// and compared with the reference parity equations; the published example
// 1100110 -> 001101111100110 (s1..s8 = 1,1,1,0,1,1,0,0) is checked on its own.
module tb_eg_encoder;
  import mldd_ref_pkg::*;

  logic [6:0]  info;
  logic [14:0] code;
  logic [7:0]  s;
  int checks = 0, failures = 0;

  eg_encoder dut (.info(info), .code(code), .s(s));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: info=%b code=%b", what, info, code);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    info = 7'b1100110;
    #1;
    check(code == 15'b001101111100110, "published encoder example");
    check(s == 8'b00110111, "published s1..s8");
    for (int d = 0; d < 128; d++) begin
      info = 7'(d);
      #1;
      check(code == ref_encode(info), "codeword");
      check(s == code[14:7], "parity outputs");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
