// Self-checking testbench of hw_reset_detect at the default 80 clocks (2 us).
//
// The data line is kept active (random transitions) and silenced for random
// stretches of 1 to 200 clocks.  A model counts quiet edges: hw_reset must
// be high exactly from the 80th consecutive edge without a transition until
// the edge after the next transition.  Both outcomes, reset and no reset, are
// required to occur.  Directed checks then measure the 80-period threshold,
// one period short of it, the release, and the rst_n clear.
module tb_hw_reset_detect;
  logic clk = 0, rst_n = 1, d = 0, hw_reset;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  hw_reset_detect dut (.clk, .rst_n, .data_in(d), .hw_reset);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int quiet_m = 0, bad = 0, n_resets = 0;
  bit prev = 0, exp_r = 0, started = 0;
  always @(posedge clk) if (rst_n) begin
    if (started && hw_reset != exp_r) begin
      if (bad < 5) $display("  quiet %0d hw_reset %b", quiet_m, hw_reset);
      bad++;
    end
    if (d != prev) begin quiet_m = 0; exp_r = 0; end
    else begin
      quiet_m++;
      if (quiet_m >= 80) begin
        if (!exp_r) n_resets++;
        exp_r = 1;
      end
    end
    prev = d;
    started = 1;
  end

  initial begin
    #5000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int short_q;
    short_q = 0;
    #1 rst_n = 0;   // falling edge: apply the asynchronous reset
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      int len;
      len = 1 + $urandom % 200;
      if (len < 80) short_q++;
      repeat (len) @(negedge clk);
      d = ~d;
      repeat (1 + $urandom % 5) begin @(negedge clk); if ($urandom % 2) d = ~d; end
    end
    repeat (90) @(negedge clk);
    // directed: the reset rises 80 clock periods (2 us) after the clock edge
    // that saw the last transition, and one period less is not enough
    for (int rep = 0; rep < 3; rep++) begin
      int cnt;
      d = ~d;
      cnt = 0;
      do begin @(posedge clk); #1; cnt++; end while (!hw_reset && cnt < 200);
      check(cnt - 1 == 80, $sformatf("reset after %0d quiet periods, expected 80", cnt - 1));
      @(negedge clk); d = ~d;
      @(posedge clk); #1;
      check(!hw_reset, "first transition releases the reset");
      @(negedge clk);
      d = ~d;
      repeat (79) @(posedge clk);
      #1 check(!hw_reset, "79 quiet periods give no reset");
      @(negedge clk); d = ~d;
      repeat (2) @(negedge clk);
    end
    // the rst_n pin clears the flag
    repeat (100) @(negedge clk);
    check(hw_reset, "reset raised before rst_n test");
    rst_n = 0; #1;
    check(!hw_reset, "rst_n clears the reset flag");
    @(negedge clk); rst_n = 1;
    check(bad == 0, $sformatf("hw_reset follows the quiet-time model (%0d mismatches)", bad));
    check(n_resets > 0 && short_q > 0, $sformatf("%0d resets, %0d short silences", n_resets, short_q));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
