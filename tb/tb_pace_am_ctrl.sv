// Self-checking testbench of pace_am_ctrl at the default sizes.
//
// A reference write pointer (160 columns, advancing every clock in RUN,
// cleared by ReSync) gives the column each trigger must tag: the one written
// `latency` clocks before the trigger edge.  A monitor decodes the readout:
// for every column the Data_Valid run must last 72 clocks (36 samples of 2
// clocks), ana_ch must count the samples, ana_col must stay on the column,
// the serial address (MSB first, first 8 samples) must be the column's, and
// queued columns must be separated by exactly 4 idle clocks (5 between
// events, one clock being spent fetching the next tag).  Also checked:
// several latencies and pointer wrap-around, SLEEP ignoring triggers,
// ReSync, and an overflow of the 8-entry pointer FIFO (fifo_full, dropped
// triggers, the next event's first column address replaced by 8'hFF).
module tb_pace_am_ctrl;
  import preshower_pkg::*;
  logic clk = 0, rst_n = 1, resync_n = 1, lv1 = 0;
  logic [1:0] mode = 0;
  logic [7:0] latency = 0;
  logic data_valid, col_addr, fifo_full, ana_valid;
  logic [7:0] ana_col;
  logic [5:0] ana_ch;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  pace_am_ctrl dut (.clk, .rst_n, .resync_n, .lv1, .mode, .latency, .data_valid, .col_addr,
                    .fifo_full, .ana_valid, .ana_col, .ana_ch);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // reference write pointer and expected columns
  int wptr_m = 0, full_seen = 0;
  typedef struct { logic [7:0] addr; logic [7:0] col; } col_t;
  col_t exp_c[$];
  bit err_next = 0;       // scenario flag: next accepted event carries the error code
  bit drop_lv1 = 0;       // scenario flag: this trigger is expected to be dropped
  always @(posedge clk) begin
    if (fifo_full) full_seen++;
    if (mode == 2'd2 && resync_n) begin
      if (lv1 && !drop_lv1) begin
        int tag;
        tag = (wptr_m - int'(latency) + 320) % 160;
        for (int s = 0; s < 3; s++) begin
          col_t c;
          c.col  = 8'((tag + s) % 160);
          c.addr = (s == 0 && err_next) ? 8'hFF : c.col;
          exp_c.push_back(c);
        end
        err_next = 0;
      end
      wptr_m = (wptr_m + 1) % 160;
    end else wptr_m = 0;
  end

  // readout monitor
  int idx = 0, gap = 0, gap_exp = 4, bad = 0, bad_gap = 0, ncols = 0;
  logic [7:0] sh, col0;
  bit in_col = 0, checking_gap = 0;
  always @(posedge clk) if (rst_n) begin
    if (data_valid) begin
      if (!in_col) begin
        in_col = 1; idx = 0; sh = 0; col0 = ana_col;
        if (checking_gap && gap != gap_exp) bad_gap++;
      end
      if (idx % 2 == 0 && idx < 16) sh = {sh[6:0], col_addr};
      if (!ana_valid || ana_ch != 6'(idx / 2) || ana_col != col0) bad++;
      idx++;
    end else begin
      if (in_col) begin
        col_t e;
        in_col = 0;
        ncols++;
        e = exp_c.size() > 0 ? exp_c.pop_front() : '{8'h00, 8'h00};
        if (idx != 72 || sh != e.addr || col0 != e.col) begin
          if (bad < 5) $display("  column %0d: len %0d addr %h/%h col %0d/%0d", ncols, idx, sh, e.addr, col0, e.col);
          bad++;
        end
        gap = 1;
        gap_exp = (ncols % 3 == 0) ? 5 : 4;   // one more clock to fetch the next event
        checking_gap = exp_c.size() > 0;   // more queued: the gap must be minimal
      end else gap++;
      if (ana_valid) bad++;
    end
  end

  task automatic pulse_lv1();
    @(negedge clk); lv1 = 1; @(negedge clk); lv1 = 0;
  endtask

  task automatic wait_idle();
    int guard;
    guard = 0;
    while ((exp_c.size() > 0 || in_col) && guard < 20000) begin @(negedge clk); guard++; end
    repeat (5) @(negedge clk);
  endtask

  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c0;
    #1 rst_n = 0;   // falling edge: apply the asynchronous reset
    repeat (3) @(negedge clk);
    rst_n = 1;
    // SLEEP: triggers ignored
    latency = 8'd20;
    pulse_lv1();
    repeat (300) @(negedge clk);
    check(ncols == 0, "no readout in SLEEP");
    mode = 2'd2;
    // single events at several latencies, including wrap-around of the tag
    for (int i = 0; i < 6; i++) begin
      latency = 8'($urandom % 160);
      repeat ($urandom % 200) @(negedge clk);
      pulse_lv1();
      wait_idle();
    end
    check(ncols == 18 && bad == 0, $sformatf("single events: %0d columns, %0d errors", ncols, bad));
    // queued events: columns back to back with 4-clock gaps
    latency = 8'd150;
    for (int i = 0; i < 5; i++) begin pulse_lv1(); repeat (7) @(negedge clk); end
    wait_idle();
    check(ncols == 33 && bad == 0 && bad_gap == 0,
          $sformatf("queued events: %0d columns, %0d errors, %0d wrong gaps", ncols, bad, bad_gap));
    // ReSync restarts the write pointer
    @(negedge clk); resync_n = 0; @(negedge clk); resync_n = 1;
    repeat (37) @(negedge clk);
    pulse_lv1();
    wait_idle();
    check(ncols == 36 && bad == 0, "after ReSync");
    // overflow of the pointer FIFO
    latency = 8'd10;
    c0 = ncols;
    for (int i = 0; i < 12; i++) begin
      @(negedge clk);
      lv1 = 1; drop_lv1 = (i >= 9); err_next = (i == 1);
      @(negedge clk);
      lv1 = 0; drop_lv1 = 0;
    end
    wait_idle();
    check(full_seen > 0, "fifo_full raised");
    check(ncols - c0 == 27 && bad == 0,
          $sformatf("overflow: %0d columns (27 expected), %0d errors", ncols - c0, bad));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
