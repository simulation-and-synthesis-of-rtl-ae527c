// End-to-end testbench of mldd_memory_system at its default size (16 words).
//
// Words are written through the encoder with fault masks of 0 to 4 bits
// (address 2 holds the published example: data 1001111 stored with its two
// low bits flipped, 010101101001100). Random reads in both decoder modes are
// then checked against a scoreboard: decoded data (for up to two faults),
// error flag, iterations used and latency from the read edge (serial: 4 clean,
// 19 with errors; parallel: 1). Reads are attempted while the serial decoder is
// busy, parallel reads are issued back to back, words are rewritten during
// decoding and the mode is switched between reads. Each of these mechanisms is
// counted and must occur.
module tb_mldd_memory_system;
  import mldd_ref_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        wr_en, rd_en, par_mode;
  logic [3:0]  addr;
  logic [6:0]  data_in, data_out;
  logic [14:0] fault_mask, code_out;
  logic        rd_ready, rd_valid, err_detected;
  logic [4:0]  dec_iters;

  int checks = 0, failures = 0;
  int cyc = 0;

  // mechanism counters
  int n_early = 0, n_full = 0, n_par_clean = 0, n_par_corr = 0;
  int n_stall = 0, n_switch = 0, n_b2b = 0, n_detect_only = 0, n_wr_during = 0;

  typedef struct {
    logic [6:0] data;
    bit         correctable;
    bit         err;
    bit         par;
    int         issue;
  } exp_t;
  exp_t exp_q [$];

  logic [6:0]  sh_info [16];
  logic [14:0] sh_mask [16];

  mldd_memory_system dut (
    .clk(clk), .rst_n(rst_n), .wr_en(wr_en), .rd_en(rd_en), .addr(addr),
    .data_in(data_in), .fault_mask(fault_mask), .par_mode(par_mode),
    .rd_ready(rd_ready), .rd_valid(rd_valid), .data_out(data_out),
    .code_out(code_out), .err_detected(err_detected), .dec_iters(dec_iters));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d %s: data_out=%b err=%b iters=%0d", cyc, what,
               data_out, err_detected, dec_iters);
    end
  endtask

  // scoreboard
  always @(negedge clk) begin
    if (rst_n && rd_valid) begin
      if (exp_q.size() == 0) begin
        check(1'b0, "result without a read");
      end else begin
        automatic exp_t e = exp_q.pop_front();
        automatic int lat = cyc - e.issue;
        automatic int want_lat = e.par ? 1 : (e.err ? 19 : 4);
        automatic int want_it  = e.par ? 1 : (e.err ? 18 : 3);
        if (e.correctable) check(data_out == e.data, "decoded data");
        if (e.correctable) check(code_out == ref_encode(e.data), "decoded codeword");
        check(err_detected == e.err, "error flag");
        check(int'(dec_iters) == want_it, "iterations used");
        check(lat == want_lat, $sformatf("latency %0d, expected %0d", lat, want_lat));
        if (!e.par && !e.err) n_early++;
        if (!e.par && e.err) n_full++;
        if (e.par && !e.err) n_par_clean++;
        if (e.par && e.err && e.correctable) n_par_corr++;
        if (e.err && !e.correctable) n_detect_only++;
      end
    end
  end

  function automatic logic [14:0] rand_mask(input int w);
    logic [14:0] m = '0;
    while (popcount15(m) < w) m[$urandom_range(14)] = 1'b1;
    return m;
  endfunction

  task automatic write_word(input int a, input logic [6:0] d, input logic [14:0] m);
    wr_en = 1; addr = 4'(a); data_in = d; fault_mask = m;
    @(posedge clk);
    sh_info[a] = d;
    sh_mask[a] = m;
    #1;
    wr_en = 0; fault_mask = '0;
  endtask

  // Try to read address a in the given mode; waits while rd_ready is low.
  bit last_par = 0, last_was_par_issue = 0;
  int last_issue = -10;
  task automatic read_word(input int a, input bit par);
    rd_en = 1; addr = 4'(a); par_mode = par;
    #0;
    while (!rd_ready) begin
      n_stall++;
      @(posedge clk);
      #1;
    end
    @(posedge clk);
    #1;
    begin
      exp_t e;
      int w = popcount15(sh_mask[a]);
      e.data        = sh_info[a];
      e.correctable = (w <= 2);
      e.err         = (w != 0);
      e.par         = par;
      e.issue       = cyc;
      exp_q.push_back(e);
      if (par != last_par) n_switch++;
      if (par && last_was_par_issue && last_issue == cyc - 1) n_b2b++;
      last_par = par;
      last_was_par_issue = par;
      last_issue = cyc;
    end
    rd_en = 0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; rd_en = 0; par_mode = 0; addr = 0; data_in = 0; fault_mask = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    check(rd_ready && !rd_valid, "idle after reset");

    // fill the memory
    for (int a = 0; a < 16; a++) begin
      automatic int w;
      if (a < 2) w = 0;
      else if (a < 8) w = (a - 2) % 3;      // 0, 1 or 2 faults
      else if (a < 14) w = 1 + (a % 2);
      else w = a - 11;                      // 3 and 4 faults
      write_word(a, 7'($urandom), rand_mask(w));
    end
    // the published parallel decoding example at address 2
    write_word(2, 7'b1001111, 15'b000000000000011);
    check(dut.u_mem.tmp_ram[2] == 15'b010101101001100, "published example stored");

    // one read of every address in each mode
    for (int a = 0; a < 16; a++) read_word(a, 1'b0);
    for (int a = 0; a < 16; a++) read_word(a, 1'b1);

    // random traffic
    for (int n = 0; n < 600; n++) begin
      automatic int a = $urandom_range(15);
      case ($urandom_range(9))
        0: begin
          // rewrite a word, possibly while a decode is running
          if (dut.u_ser.busy) n_wr_during++;
          write_word(a, 7'($urandom), rand_mask($urandom_range(3) == 0 ? $urandom_range(4) : 0));
        end
        1, 2, 3, 4: read_word(a, 1'b1);
        default: read_word(a, 1'b0);
      endcase
    end
    // drain
    while (exp_q.size() != 0) @(posedge clk);
    repeat (3) @(posedge clk);

    $display("serial early finishes %0d, serial full decodes %0d", n_early, n_full);
    $display("parallel clean %0d, parallel corrected %0d, detected only %0d",
             n_par_clean, n_par_corr, n_detect_only);
    $display("read stalls %0d, mode switches %0d, back-to-back parallel %0d, writes during decode %0d",
             n_stall, n_switch, n_b2b, n_wr_during);
    check(n_early > 0, "serial early finish happened");
    check(n_full > 0, "serial full decode happened");
    check(n_par_clean > 0, "parallel clean read happened");
    check(n_par_corr > 0, "parallel correction happened");
    check(n_detect_only > 0, "3-4 fault detection happened");
    check(n_stall > 0, "read stall happened");
    check(n_switch > 0, "mode switch happened");
    check(n_b2b > 0, "back-to-back parallel reads happened");
    check(n_wr_during > 0, "write during decode happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
