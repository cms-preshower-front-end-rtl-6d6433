// Self-checking testbench of t1_decoder.
//
// A random stream of the four T1 commands, separated by random idle gaps
// (including none), is sent.  For each command the testbench expects exactly
// one pulse on the matching output, and it must be seen at the third clock
// edge after the edge that sampled the first bit; any other pulse is an
// error.  Counts of each command type are checked at the end.
module tb_t1_decoder;
  import preshower_pkg::*;
  logic clk = 0, rst_n = 1, t1 = 0;
  logic lv1a, test_pulse, fe_reset, bc0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  t1_decoder dut (.clk, .rst_n, .t1, .lv1a, .test_pulse, .fe_reset, .bc0);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // expected output vector {lv1a, test_pulse, fe_reset, bc0} per edge index
  logic [3:0] expect_at[int];
  int cyc = 0, bad = 0, seen[4] = '{0, 0, 0, 0};
  always @(posedge clk) begin
    logic [3:0] got, want;
    cyc++;
    got  = {lv1a, test_pulse, fe_reset, bc0};
    want = expect_at.exists(cyc) ? expect_at[cyc] : 4'b0000;
    if (got != want) begin
      if (bad < 5) $display("  edge %0d got %b want %b", cyc, got, want);
      bad++;
    end
    for (int i = 0; i < 4; i++) if (got[3 - i]) seen[i]++;
  end

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] codes[4];
    int sent[4];
    codes = '{T1_LV1A, T1_TEST, T1_RESET, T1_BC0};
    sent = '{0, 0, 0, 0};
    #1 rst_n = 0;   // falling edge: apply the asynchronous reset
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    for (int n = 0; n < 2000; n++) begin
      int k;
      k = $urandom % 4;
      // first bit is sampled at edge cyc+1; the pulse is visible after
      // edge cyc+4, i.e. it is sampled high at edge cyc+5
      expect_at[cyc + 5] = 4'b1000 >> k;
      sent[k]++;
      for (int b = 2; b >= 0; b--) begin
        t1 = codes[k][b];
        @(negedge clk);
      end
      t1 = 0;
      repeat ($urandom % 4) @(negedge clk);
    end
    repeat (10) @(negedge clk);
    check(bad == 0, $sformatf("pulses at the expected edges (%0d mismatches)", bad));
    for (int i = 0; i < 4; i++)
      check(seen[i] == sent[i] && sent[i] > 0, $sformatf("command %0d: %0d sent, %0d decoded", i, sent[i], seen[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
