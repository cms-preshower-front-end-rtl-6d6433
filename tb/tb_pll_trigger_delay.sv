// Self-checking testbench of pll_trigger_delay.
//
// For every delay setting 0 to 15 a random bit stream is applied; the output
// sampled at each clock edge must equal the input sampled `delay` edges
// earlier (delay 0: the input itself).
module tb_pll_trigger_delay;
  logic clk = 0, rst_n = 1, t1_in = 0, t1_out;
  logic [3:0] delay = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  pll_trigger_delay dut (.clk, .rst_n, .delay, .t1_in, .t1_out);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  bit hist[$];       // hist[0] = input at the current edge, hist[k] = k edges ago
  int bad = 0, valid = 0;
  always @(posedge clk) if (rst_n) begin
    int k;
    k = int'(delay);
    hist.push_front(t1_in);
    if (hist.size() > 20) void'(hist.pop_back());
    if (valid > 16 && t1_out != hist[k]) bad++;
    valid++;
  end

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0;   // falling edge: apply the asynchronous reset
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int d = 0; d < 16; d++) begin
      delay = 4'(d);
      valid = 0;
      bad = 0;
      for (int i = 0; i < 300; i++) begin
        t1_in = $urandom % 2;
        @(negedge clk);
      end
      check(bad == 0, $sformatf("delay %0d: %0d mismatches", d, bad));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
