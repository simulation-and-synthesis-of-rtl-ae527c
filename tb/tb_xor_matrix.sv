// Testbench of xor_matrix: random words are checked against the four published
// check equations written on symbols c0..c14 (c_i = word[14-i]); every
// rotation of every codeword must give four zero check sums.
module tb_xor_matrix;
  import mldd_ref_pkg::*;

  logic [14:0] word;
  logic [3:0]  chk;
  int checks = 0, failures = 0;

  xor_matrix dut (.word(word), .chk(chk));

  function automatic logic c(input int i);
    return word[14 - i];
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic [3:0] exp;
      word = 15'($urandom);
      #1;
      exp[0] = c(3) ^ c(11) ^ c(12) ^ c(14);
      exp[1] = c(1) ^ c(5) ^ c(13) ^ c(14);
      exp[2] = c(0) ^ c(2) ^ c(6) ^ c(14);
      exp[3] = c(7) ^ c(8) ^ c(10) ^ c(14);
      checks++;
      if (chk !== exp) begin
        failures++;
        $display("FAIL word=%b chk=%b exp=%b", word, chk, exp);
      end
    end
    for (int d = 0; d < 128; d++) begin
      for (int k = 0; k < 15; k++) begin
        word = rot_down(ref_encode(7'(d)), k);
        #1;
        checks++;
        if (chk !== 4'b0) begin
          failures++;
          $display("FAIL codeword rotation %b gives %b", word, chk);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
