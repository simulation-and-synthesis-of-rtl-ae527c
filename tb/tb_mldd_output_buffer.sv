// Testbench of mldd_output_buffer: with finish low the output must be 0; with
// finish high a word rotated 3 places towards bit 0 must come out in its
// original order.
module tb_mldd_output_buffer;
  import mldd_ref_pkg::*;

  logic [14:0] q, y, orig;
  logic        finish;
  int checks = 0, failures = 0;

  mldd_output_buffer #(.N(15), .ROT(3)) dut (.q(q), .finish(finish), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      orig   = 15'($urandom);
      q      = rot_down(orig, 3);
      finish = 1'b1;
      #1;
      checks++;
      if (y !== orig) begin
        failures++;
        $display("FAIL q=%b y=%b expected %b", q, y, orig);
      end
      finish = 1'b0;
      #1;
      checks++;
      if (y !== 15'b0) begin
        failures++;
        $display("FAIL output not disabled: %b", y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
