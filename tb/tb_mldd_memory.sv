// Testbench of mldd_memory: fills all 16 words, reads them back in random
// order against a shadow array, checks the one-cycle read latency, that
// data_out holds while read is low, and that a read in the same cycle as a
// write to the same address returns the old word.
module tb_mldd_memory;
  logic        clk = 0;
  logic        write, read;
  logic [3:0]  addr;
  logic [14:0] data_in, data_out;
  logic [14:0] shadow [16];
  int checks = 0, failures = 0;

  mldd_memory dut (.clk(clk), .write(write), .read(read), .addr(addr),
                   .data_in(data_in), .data_out(data_out));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s addr=%0d data_out=%b", what, addr, data_out);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    write = 0; read = 0; addr = 0; data_in = 0;
    for (int a = 0; a < 16; a++) begin
      @(negedge clk);
      write = 1; addr = 4'(a); data_in = 15'($urandom); shadow[a] = data_in;
    end
    @(negedge clk);
    write = 0;
    for (int n = 0; n < 200; n++) begin
      logic [14:0] held;
      automatic int a = $urandom_range(15);
      @(negedge clk);
      read = 1; addr = 4'(a);
      @(negedge clk);
      read = 0;
      check(data_out == shadow[a], "read back");
      held = data_out;
      addr = 4'($urandom);
      @(negedge clk);
      check(data_out == held, "hold while read low");
      if (n % 10 == 0) begin
        // write and read the same address in one cycle
        @(negedge clk);
        write = 1; read = 1; addr = 4'(a); data_in = 15'($urandom);
        @(negedge clk);
        write = 0; read = 0;
        check(data_out == shadow[a], "read-during-write returns old word");
        shadow[a] = data_in;
        @(negedge clk);
        read = 1;
        @(negedge clk);
        read = 0;
        check(data_out == shadow[a], "new word after write");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
