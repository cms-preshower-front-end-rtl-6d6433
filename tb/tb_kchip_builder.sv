// Self-checking testbench of kchip_builder.
//
// The builder is surrounded by the K-chip's buffers, sync_fifo instances at
// the K-chip's sizes: four 1600-word input FIFOs, four column-address queues
// and the trigger FIFO, all filled directly by the testbench.  The output
// buffer is replaced by a random full signal, so the builder is stalled on
// about a third of the clocks.  Packets written (o_we while not full) are
// compared with tb_pkg::build_pkt.  Cases: normal events, an event that is
// waited for until its last sample arrives, an empty (ignored-trigger)
// entry, an out-of-sequence channel (pos_set), a 2-2 split of the column
// addresses (all four out of sequence), the PACE error code
// (perr_set) and a link-test packet after STRSRT.  With o_full low the
// builder must write one word per clock: 336 clocks for a full packet.
module tb_kchip_builder;
  import preshower_pkg::*;
  import tb_pkg::*;
  logic clk = 0, rst_n = 1, clr = 0, test_mode = 0, strsrt = 0;
  logic [15:0] ec_now = 16'h0042;
  logic [11:0] bc_now = 12'h7A1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  // trigger FIFO
  trig_entry_t t_wd, t_head;
  logic t_we = 0, t_empty, t_full, t_pop;
  logic [4:0] t_count;
  sync_fifo #(.WIDTH(TRIG_W), .DEPTH(16)) u_trig (.clk, .rst_n, .clr, .wr_en(t_we), .wr_data(t_wd),
    .rd_en(t_pop), .rd_data(t_head), .count(t_count), .empty(t_empty), .full(t_full));

  logic [3:0] d_we = 0, c_we = 0, d_pop, c_pop;
  logic [3:0][11:0] d_wd, d_head;
  logic [3:0][7:0]  c_wd, c_head, c_count;
  logic [3:0][10:0] d_count;
  for (genvar i = 0; i < 4; i++) begin : g_ch
    logic [5:0] cq_count;
    logic de, df, ce, cf;
    sync_fifo #(.WIDTH(12), .DEPTH(1600)) u_d (.clk, .rst_n, .clr, .wr_en(d_we[i]), .wr_data(d_wd[i]),
      .rd_en(d_pop[i]), .rd_data(d_head[i]), .count(d_count[i]), .empty(de), .full(df));
    sync_fifo #(.WIDTH(8), .DEPTH(48)) u_c (.clk, .rst_n, .clr, .wr_en(c_we[i]), .wr_data(c_wd[i]),
      .rd_en(c_pop[i]), .rd_data(c_head[i]), .count(cq_count), .empty(ce), .full(cf));
    assign c_count[i] = 8'(cq_count);
  end

  logic o_full = 0, o_we, o_last, busy, perr_set;
  logic [15:0] o_wd;
  logic [3:0] pos_set;
  kchip_builder dut (.clk, .rst_n, .clr, .test_mode, .strsrt, .kid(8'hA6), .ec_now, .bc_now,
    .trig_head(t_head), .trig_empty(t_empty), .trig_pop(t_pop),
    .d_head, .d_count, .d_pop, .c_head, .c_count, .c_pop,
    .o_full, .o_we, .o_wd, .o_last, .pos_set, .perr_set, .busy);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [15:0] cur[$];
  logic [15:0] pkts[$][$];
  int first_at = 0, cyc = 0, lens_clk[$];
  bit stall_en = 0;
  logic [3:0] pos_seen = 0;
  bit perr_seen = 0;
  always @(posedge clk) begin
    cyc++;
    if (o_we && !o_full) begin
      if (cur.size() == 0) first_at = cyc;
      cur.push_back(o_wd);
      if (o_last) begin
        pkts.push_back(cur);
        lens_clk.push_back(cyc - first_at + 1);
        cur.delete();
      end
    end
    pos_seen |= pos_set;
    perr_seen |= perr_set;
  end
  always @(negedge clk) o_full <= stall_en && ($urandom % 3 == 0);

  typedef struct { logic [7:0] addr[3][4]; int dcol[3][4]; bit empty; bit test;
                   logic [7:0] ec8; logic [11:0] bc; } exp_t;
  exp_t exp_q[$];
  logic [11:0] tdata[4][108];

  // queue one trigger and, unless empty, its column addresses and data
  task automatic add_event(input int base, input int bad_ch, input bit perr, input bit empty, input bit data_now);
    exp_t e;
    static int ec = 0;
    ec++;
    e.empty = empty; e.test = 0; e.ec8 = 8'(ec); e.bc = 12'(ec * 37);
    for (int s = 0; s < 3; s++)
      for (int p = 0; p < 4; p++) begin
        e.dcol[s][p] = (base + s + ((p == bad_ch || (bad_ch == -2 && p >= 2)) ? 7 : 0)) % 160;
        e.addr[s][p] = (perr && s == 0) ? 8'hFF : 8'(e.dcol[s][p]);
      end
    exp_q.push_back(e);
    @(negedge clk);
    t_we = 1; t_wd = '{empty: empty, ec: 16'(ec), bc: 12'(ec * 37)};
    @(negedge clk);
    t_we = 0;
    if (!empty && data_now) push_data(e, 108);
  endtask

  task automatic push_data(input exp_t e, input int nwords);
    for (int s = 0; s < 3; s++) begin
      @(negedge clk);
      c_we = 4'hF;
      for (int p = 0; p < 4; p++) c_wd[p] = e.addr[s][p];
      @(negedge clk);
      c_we = 0;
    end
    for (int k = 0; k < nwords; k++) begin
      @(negedge clk);
      d_we = 4'hF;
      for (int p = 0; p < 4; p++) d_wd[p] = adc_code(p, e.dcol[k / 36][p], k % 36);
    end
    @(negedge clk);
    d_we = 0;
  endtask

  task automatic compare(input int n, input string tag);
    logic [15:0] ref_pkt[$];
    int guard = 0;
    while (pkts.size() < n && guard < 20000) begin @(posedge clk); guard++; end
    check(pkts.size() >= n, $sformatf("%s: %0d packets", tag, pkts.size()));
    for (int i = 0; i < n && pkts.size() > 0; i++) begin
      logic [15:0] got[$];
      exp_t e;
      int bad;
      bad = 0;
      got = pkts.pop_front();
      e = exp_q.pop_front();
      build_pkt(ref_pkt, e.ec8, 4'h6, e.bc, e.addr, e.dcol, e.empty, e.test, tdata);
      for (int w = 0; w < got.size() && w < ref_pkt.size(); w++)
        if (got[w] !== ref_pkt[w]) begin
          if (bad < 3) $display("  %s word %0d got %h exp %h", tag, w, got[w], ref_pkt[w]);
          bad++;
        end
      check(got.size() == ref_pkt.size() && bad == 0,
            $sformatf("%s: packet %0d, %0d words (exp %0d), %0d wrong", tag, i, got.size(), ref_pkt.size(), bad));
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp_t e;
    #1 rst_n = 0;   // falling edge: apply the asynchronous reset
    repeat (3) @(negedge clk);
    rst_n = 1;
    // one event without stalls: 336 words in 336 clocks
    add_event(10, -1, 0, 0, 1);
    compare(1, "plain");
    check(lens_clk.pop_front() == 336, "one word per clock without stalls");
    // the builder waits for the last sample
    add_event(20, -1, 0, 0, 0);
    e = exp_q[$];
    push_data(e, 107);
    repeat (50) @(negedge clk);
    check(pkts.size() == 0 && cur.size() == 0, "no build before the event is complete");
    @(negedge clk);
    d_we = 4'hF;
    for (int p = 0; p < 4; p++) d_wd[p] = adc_code(p, e.dcol[2][p], 35);
    @(negedge clk);
    d_we = 0;
    compare(1, "wait");
    void'(lens_clk.pop_front());
    // with stalls: normal, empty, POS, PACE error
    stall_en = 1;
    add_event(30, -1, 0, 0, 1);
    add_event(0, -1, 0, 1, 1);
    add_event(155, 1, 0, 0, 1);
    add_event(60, -1, 1, 0, 1);
    compare(4, "stalled");
    check(pos_seen == 4'b0010, $sformatf("pos_set for channel B (%b)", pos_seen));
    check(perr_seen, "perr_set for the error code");
    // two pairs of agreeing channels: each agrees with only one other, so
    // all four are out of sequence
    pos_seen = 0;
    add_event(90, -2, 0, 0, 1);
    compare(1, "two pairs");
    check(pos_seen == 4'b1111, $sformatf("pos_set for all channels of a 2-2 split (%b)", pos_seen));
    // link-test mode
    stall_en = 0;
    test_mode = 1;
    for (int p = 0; p < 4; p++)
      for (int k = 0; k < 108; k++) tdata[p][k] = 12'($urandom);
    for (int k = 0; k < 108; k++) begin
      @(negedge clk);
      d_we = 4'hF;
      for (int p = 0; p < 4; p++) d_wd[p] = tdata[p][k];
    end
    @(negedge clk);
    d_we = 0;
    repeat (20) @(negedge clk);
    check(pkts.size() == 0 && cur.size() == 0, "link test waits for STRSRT");
    e.empty = 0; e.test = 1; e.ec8 = ec_now[7:0]; e.bc = bc_now;
    exp_q.push_back(e);
    strsrt = 1; @(negedge clk); strsrt = 0;
    compare(1, "link-test");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
