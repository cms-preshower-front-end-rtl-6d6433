// Self-checking testbench of sync_fifo.
//
// Two instances: the default 1600-word, 12-bit K-chip input buffer, and a
// 5-word one whose depth is not a power of two.  A queue model predicts the
// show-ahead read data, count, empty and full.  Phases: fill to full (the
// extra write must be dropped), drain, random traffic with simultaneous
// reads and writes, a read of an empty FIFO (ignored) and the clear input.
module tb_sync_fifo;
  logic clk = 0, rst_n = 1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // default-size instance
  logic        clr = 0, wr = 0, rd = 0;
  logic [11:0] wd = 0, rdd;
  logic [10:0] cnt;
  logic        emp, ful;
  sync_fifo dut (.clk, .rst_n, .clr, .wr_en(wr), .wr_data(wd), .rd_en(rd),
                 .rd_data(rdd), .count(cnt), .empty(emp), .full(ful));

  // small instance
  logic        s_wr = 0, s_rd = 0;
  logic [7:0]  s_wd = 0, s_rdd;
  logic [2:0]  s_cnt;
  logic        s_emp, s_ful;
  sync_fifo #(.WIDTH(8), .DEPTH(5)) dut5 (.clk, .rst_n, .clr(1'b0), .wr_en(s_wr), .wr_data(s_wd),
                 .rd_en(s_rd), .rd_data(s_rdd), .count(s_cnt), .empty(s_emp), .full(s_ful));

  logic [11:0] m[$];
  logic [7:0]  m5[$];
  int bad = 0, bad5 = 0;

  // at each falling edge: apply the operation of the last rising edge to the
  // model, then compare (inputs change 1 ns after the falling edge)
  always @(negedge clk) if (rst_n) begin
    bit pop, pop5;
    if (clr) m.delete();
    else begin
      pop = rd && m.size() > 0;
      if (wr && m.size() < 1600) m.push_back(wd);
      if (pop) void'(m.pop_front());
    end
    pop5 = s_rd && m5.size() > 0;
    if (s_wr && m5.size() < 5) m5.push_back(s_wd);
    if (pop5) void'(m5.pop_front());
    if (cnt != m.size() || emp != (m.size() == 0) || ful != (m.size() == 1600) ||
        (m.size() > 0 && rdd != m[0])) begin
      if (bad < 5) $display("  mismatch: count %0d/%0d rd %h", cnt, m.size(), rdd);
      bad++;
    end
    if (s_cnt != m5.size() || s_emp != (m5.size() == 0) || s_ful != (m5.size() == 5) ||
        (m5.size() > 0 && s_rdd != m5[0])) bad5++;
  end

  task automatic tick();
    @(negedge clk);
    #1;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0;   // falling edge: apply the asynchronous reset
    repeat (3) tick();
    rst_n = 1;
    check(emp && !ful && cnt == 0, "empty after reset");
    // fill to full and one more
    for (int i = 0; i < 1601; i++) begin
      wr = 1; wd = 12'($urandom);
      tick();
    end
    wr = 0;
    check(ful && cnt == 1600, "full at 1600 words");
    // drain
    rd = 1;
    repeat (1600) tick();
    rd = 0;
    check(emp, "empty after draining");
    rd = 1; tick(); rd = 0;     // read of an empty FIFO
    check(emp && cnt == 0, "read of empty FIFO ignored");
    // random traffic on both
    for (int i = 0; i < 20000; i++) begin
      wr = ($urandom % 4) != 0; rd = ($urandom % 3) != 0; wd = 12'($urandom);
      s_wr = $urandom % 2; s_rd = $urandom % 2; s_wd = 8'($urandom);
      tick();
    end
    wr = 1; rd = 0; s_wr = 0; s_rd = 0;
    repeat (50) tick();
    wr = 0;
    clr = 1; tick(); clr = 0;
    check(emp && cnt == 0, "clear empties the FIFO");
    tick();
    check(bad == 0, $sformatf("1600-word FIFO matches the model (%0d mismatches)", bad));
    check(bad5 == 0, $sformatf("5-word FIFO matches the model (%0d mismatches)", bad5));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
