// Self-checking testbench of kchip_hsl_if.
//
// The output buffer is a sync_fifo of {last, word} entries, filled by the
// testbench with packets of random length (2 to 60 words) at a random rate;
// pkt_ready counts complete packets as in the K-chip.  Checked: the link
// carries exactly the words written, in order; no packet starts before its
// last word is in the buffer; a packet leaves at one word per clock without
// gaps; the link starts one clock after a packet is complete if it was idle;
// link_data is zero between packets; pkt_done pulses once per packet.
module tb_kchip_hsl_if;
  logic clk = 0, rst_n = 1, clr = 0;
  logic wr = 0, o_empty, o_pop, o_last, pkt_done, link_valid;
  logic [16:0] wd = 0, head;
  logic [15:0] link_data;
  logic [9:0]  o_count;
  logic        o_full;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  sync_fifo #(.WIDTH(17), .DEPTH(512)) u_buf (.clk, .rst_n, .clr, .wr_en(wr), .wr_data(wd),
    .rd_en(o_pop), .rd_data(head), .count(o_count), .empty(o_empty), .full(o_full));

  int pkt_cnt = 0;
  always @(posedge clk) pkt_cnt <= pkt_cnt + int'(wr && wd[16]) - int'(pkt_done);

  kchip_hsl_if dut (.clk, .rst_n, .clr, .pkt_ready(pkt_cnt != 0), .o_empty, .o_head(head[15:0]),
                    .o_last(head[16]), .o_pop, .pkt_done, .link_data, .link_valid);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [15:0] sent[$];
  int complete_words = 0;  // words written up to and including the last complete packet
  int out_words = 0, bad_data = 0, early = 0, gaps = 0, idle_nz = 0, n_done = 0, n_pkts = 0;
  int last_done_at = -10, slow_start = 0, cyc = 0;
  bit in_pkt = 0, was_idle = 1;
  int cur_len = 0;
  int lens[$];
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (pkt_done) n_done++;
    if (link_valid) begin
      logic [15:0] e;
      e = sent.size() > 0 ? sent.pop_front() : 16'hxxxx;
      if (link_data != e) bad_data++;
      out_words++;
      if (out_words > complete_words) early++;
      if (!in_pkt) begin in_pkt = 1; cur_len = lens.pop_front(); end
      cur_len--;
      if (cur_len == 0) in_pkt = 0;
    end else begin
      if (in_pkt) gaps++;
      if (link_data != 0) idle_nz++;
    end
  end

  initial begin
    #3000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total;
    #1 rst_n = 0;   // falling edge: apply the asynchronous reset
    repeat (3) @(negedge clk);
    rst_n = 1;
    // one packet into an idle link: first word one clock after the last is written
    for (int i = 0; i < 5; i++) begin
      wr = 1; wd = {i == 4, 16'(16'h100 + i)}; sent.push_back(16'(16'h100 + i));
      @(negedge clk);
      if (i == 4) begin complete_words = 5; lens.push_back(5); n_pkts++; end
    end
    wr = 0;
    @(negedge clk);
    check(link_valid && link_data == 16'h100, "idle link starts on the clock after the packet is complete");
    repeat (10) @(negedge clk);
    // random packets at a random fill rate
    total = 5;
    for (int p = 0; p < 300; p++) begin
      int len;
      len = 2 + $urandom % 59;
      for (int i = 0; i < len; i++) begin
        while (($urandom % 4) == 0 || o_full) begin wr = 0; @(negedge clk); end
        wr = 1; wd = {i == len - 1, 16'($urandom)};
        sent.push_back(wd[15:0]);
        @(negedge clk);
        wr = 0;
      end
      total += len;
      complete_words = total;
      lens.push_back(len);
      n_pkts++;
    end
    wr = 0;
    repeat (200) @(negedge clk);
    check(out_words == total, $sformatf("all %0d words sent (%0d)", total, out_words));
    check(bad_data == 0, $sformatf("words in order (%0d wrong)", bad_data));
    check(early == 0, $sformatf("no packet started before it was complete (%0d)", early));
    check(gaps == 0, $sformatf("one word per clock inside packets (%0d gaps)", gaps));
    check(idle_nz == 0, "link_data zero between packets");
    check(n_done == n_pkts, $sformatf("pkt_done once per packet (%0d of %0d)", n_done, n_pkts));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
