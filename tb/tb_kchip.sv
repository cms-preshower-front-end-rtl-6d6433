// Self-checking testbench of the K-chip at its default sizes.
//
// Four emulated PACE channels (Data_Valid, serial column address, and an ADC
// model) deliver events; a link monitor collects packets and compares them
// word by word with tb_pkg::build_pkt.  Covered: normal events, trigger
// queueing (several triggers before their data), out-of-sequence column
// addresses with the POS bits and CLPOS, an ignored trigger (PACE FIFO_full)
// giving an empty packet, the high watermark, back-to-back link throughput, link-test
// mode through FIFODATA/STRSRT with read-back, and the counter registers.
module tb_kchip;
  import tb_pkg::*;

  logic clk = 0, rst_n = 1, gen_reset = 0, lv1 = 0, bc0 = 0;
  logic [3:0] dv = 0, col_ser = 0, pace_full = 0;
  logic [3:0][11:0] adc_data;
  logic [3:0] ana_valid = 0;
  logic [3:0][7:0] ana_col = '0;
  logic [3:0][5:0] ana_ch = '0;
  logic scl, m_oe, s_oe, sda;
  logic [15:0] link_data;
  logic link_valid;

  int checks = 0, failures = 0;
  localparam logic [6:0] KADDR = 7'h40;

  always #5 clk = ~clk;
  assign sda = !(m_oe | s_oe);

  kchip dut (.clk, .rst_n, .gen_reset, .lv1, .bc0, .dv, .col_ser, .pace_full, .adc_data,
             .i2c_addr(KADDR), .scl, .sda_in(sda), .sda_oe(s_oe), .link_data, .link_valid);

  for (genvar p = 0; p < 4; p++) begin : g_adc
    adc_model #(.PACE_ID(p)) u_adc (.clk, .ana_valid(ana_valid[p]), .ana_col(ana_col[p]),
                                    .ana_ch(ana_ch[p]), .dout(adc_data[p]));
  end

  i2c_bfm #(.HALF(60)) bfm (.scl, .sda_oe(m_oe), .sda);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- reference counters ----------------
  int bc_m = 0, ec_m = 0;
  always @(posedge clk) begin
    if (gen_reset) begin bc_m <= 0; ec_m <= 0; end
    else begin
      bc_m <= (bc0 || bc_m == 3559) ? 0 : bc_m + 1;
      if (lv1) ec_m <= ec_m + 1;
    end
  end

  // ---------------- link monitor ----------------
  logic [15:0] rx[$];
  logic [15:0] pkts[$][$];
  int          gaps_in_pkt = 0;
  int          cyc = 0, first_v = -1, last_v = -1;
  bit          in_pkt = 0;
  always @(posedge clk) begin
    if (link_valid) begin
      rx.push_back(link_data);
      in_pkt = 1;
      if (link_data == T_EOF && rx.size() >= 6) begin
        pkts.push_back(rx);
        rx.delete();
        in_pkt = 0;
      end
    end else if (in_pkt) gaps_in_pkt++;
    cyc++;
    if (link_valid) begin
      if (first_v < 0) first_v = cyc;
      last_v = cyc;
    end
  end

  // ---------------- PACE emulation ----------------
  task automatic play_event(input logic [7:0] addr[3][4], input int dcol[3][4]);
    for (int s = 0; s < 3; s++) begin
      for (int c = 0; c < 72; c++) begin
        @(negedge clk);
        for (int p = 0; p < 4; p++) begin
          int k = c / 2;
          dv[p]        = 1'b1;
          col_ser[p]   = (k < 8) ? addr[s][p][7 - k] : 1'b0;
          ana_valid[p] = 1'b1;
          ana_col[p]   = 8'(dcol[s][p]);
          ana_ch[p]    = 6'(k);
        end
      end
      for (int g = 0; g < 4; g++) begin
        @(negedge clk);
        dv = '0; col_ser = '0; ana_valid = '0;
      end
    end
  endtask

  typedef struct { logic [7:0] addr[3][4]; int dcol[3][4]; bit empty; bit test;
                   logic [7:0] ec8; logic [11:0] bc; } exp_t;
  exp_t exp_q[$];
  logic [11:0] tdata[4][108];
  logic [3:0]  kid_val = 4'h5;
  int          last_bc = 0;

  task automatic trigger(input bit flag_full);
    exp_t e;
    @(negedge clk);
    lv1 = 1'b1;
    pace_full = flag_full ? 4'b0010 : 4'b0000;
    e.bc  = 12'(bc_m);
    last_bc = bc_m;
    e.ec8 = 8'(ec_m + 1);
    e.empty = flag_full;
    e.test = 0;
    exp_q.push_back(e);
    @(negedge clk);
    lv1 = 1'b0;
    pace_full = '0;
  endtask

  function automatic void set_cols(ref exp_t e, input int base, input int bad_ch, input int bad_off);
    for (int s = 0; s < 3; s++)
      for (int p = 0; p < 4; p++) begin
        e.dcol[s][p] = (base + s + ((p == bad_ch) ? bad_off : 0)) % 160;
        e.addr[s][p] = 8'(e.dcol[s][p]);
      end
  endfunction

  int n_checked = 0;
  task automatic check_packets(input int n, input string tag);
    logic [15:0] ref_pkt[$];
    int guard = 0;
    while (pkts.size() < n && guard < 40000) begin @(posedge clk); guard++; end
    check(pkts.size() >= n, {tag, ": packets arrived"});
    for (int i = 0; i < n && pkts.size() > 0 && exp_q.size() > 0; i++) begin
      logic [15:0] got[$];
      exp_t e;
      int bad = 0;
      got = pkts.pop_front();
      e = exp_q.pop_front();
      build_pkt(ref_pkt, e.ec8, kid_val, e.bc, e.addr, e.dcol, e.empty, e.test, tdata);
      check(got.size() == ref_pkt.size(), $sformatf("%s: packet %0d length %0d expected %0d", tag, n_checked, got.size(), ref_pkt.size()));
      for (int w = 0; w < got.size() && w < ref_pkt.size(); w++)
        if (got[w] !== ref_pkt[w]) begin
          if (bad < 4) $display("  %s pkt %0d word %0d got %h exp %h", tag, n_checked, w, got[w], ref_pkt[w]);
          bad++;
        end
      check(bad == 0, $sformatf("%s: packet %0d contents", tag, n_checked));
      n_checked++;
    end
  endtask

  logic [7:0] rd;
  bit ok;
  int t0, t_first;

  initial begin
    #200000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp_t e;
    #1 rst_n = 0;   // falling edge: apply the asynchronous reset
    repeat (5) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    gen_reset = 1; @(negedge clk); gen_reset = 0;

    // slow control: KID
    bfm.write(KADDR, 8'd2, 8'h35, ok); check(ok, "KID write acked");
    bfm.read(KADDR, 8'd2, rd, ok);     check(ok && rd == 8'h35, "KID read back");
    kid_val = 4'h5;

    // ---- 1: one normal event, check 336-word packet at one word per clock
    trigger(0);
    set_cols(exp_q[$], 17, -1, 0);
    e = exp_q[$];
    play_event(e.addr, e.dcol);
    t0 = $time;
    check_packets(1, "normal");
    check(gaps_in_pkt == 0, "packet streamed one word per clock");

    // ---- 2: three triggers queued before any data, one of them out of sequence
    trigger(0); set_cols(exp_q[$], 40, -1, 0);
    trigger(0); set_cols(exp_q[$], 80, 2, 5);
    trigger(0); set_cols(exp_q[$], 158, -1, 0);   // wraps 158,159,0
    for (int i = 0; i < 3; i++) begin
      e = exp_q[i];
      play_event(e.addr, e.dcol);
    end
    check_packets(3, "queued");
    bfm.read(KADDR, 8'd4, rd, ok);
    check(ok && rd[5] == 1'b1 && rd[7] == 1'b1 && rd[6] == 0 && rd[4:3] == 0, $sformatf("STATUS POS2 set (%h)", rd));
    bfm.write(KADDR, 8'd1, 8'h80, ok);               // CLPOS
    bfm.read(KADDR, 8'd4, rd, ok);
    check(ok && rd[6:3] == 4'h0, $sformatf("CLPOS clears POS (%h)", rd));

    // ---- 3: ignored trigger while a PACE is full: 6-word empty packet
    trigger(1);
    check_packets(1, "empty");
    bfm.read(KADDR, 8'd4, rd, ok);
    check(ok && rd[2] && rd[7], $sformatf("STATUS trigger-ignored bit (%h)", rd));

    // ---- 4: high watermark: 14 triggers with no data yet; the 14th is ignored
    for (int i = 0; i < 14; i++) begin
      trigger(0);
      repeat (3) @(negedge clk);
    end
    exp_q[13].empty = 1;
    for (int i = 0; i < 13; i++) set_cols(exp_q[i], 3 * i, -1, 0);
    first_v = -1;
    for (int i = 0; i < 13; i++) begin
      e = exp_q[i];
      play_event(e.addr, e.dcol);
    end
    check_packets(14, "watermark");
    // the link is the bottleneck here: 13 full packets and one empty one must
    // leave back to back, at most 3 idle clocks between packets
    check(last_v - first_v + 1 <= 13 * 336 + 6 + 14 * 3,
          $sformatf("back-to-back packets: %0d clocks for %0d words", last_v - first_v + 1, 13 * 336 + 6));
    check(gaps_in_pkt == 0, "no gaps inside any packet");

    // ---- counters
    bfm.read(KADDR, 8'd8, rd, ok);  check(ok && rd == 8'(ec_m >> 8), "EVCNT_H");
    bfm.read(KADDR, 8'd9, rd, ok);  check(ok && rd == 8'(ec_m), $sformatf("EVCNT_L %h vs %0d", rd, ec_m));
    bfm.read(KADDR, 8'd10, rd, ok); check(ok && rd == 8'(last_bc >> 8), "BNCHCNT_H");
    bfm.read(KADDR, 8'd11, rd, ok); check(ok && rd == 8'(last_bc), $sformatf("BNCHCNT_L %h vs %0d", rd, last_bc));

    // ---- 5: link-test mode
    bfm.write(KADDR, 8'd0, 8'h80, ok); check(ok, "CONFIG test mode");
    for (int p = 0; p < 4; p++) begin
      bfm.write(KADDR, 8'd5, 8'(p), ok);
      if (p == 0) begin   // one extra word, read back through FIFODATA
        bfm.write(KADDR, 8'd6, 8'h0A, ok);
        bfm.write(KADDR, 8'd7, 8'hBC, ok);
      end
      for (int k = 0; k < 108; k++) begin
        tdata[p][k] = 12'((p << 10) ^ (k * 37) ^ 12'h3C5);
        bfm.write(KADDR, 8'd6, {4'h0, tdata[p][k][11:8]}, ok);
        bfm.write(KADDR, 8'd7, tdata[p][k][7:0], ok);
      end
    end
    bfm.write(KADDR, 8'd5, 8'd0, ok);
    bfm.read(KADDR, 8'd6, rd, ok); check(ok && rd == 8'h0A, $sformatf("FIFODATA_H read-back %h", rd));
    bfm.read(KADDR, 8'd7, rd, ok); check(ok && rd == 8'hBC, $sformatf("FIFODATA_L read-back %h", rd));
    for (int s = 0; s < 3; s++) for (int p = 0; p < 4; p++) begin e.addr[s][p] = 0; e.dcol[s][p] = 0; end
    e.empty = 0;
    e.test = 1; e.ec8 = 8'(ec_m);
    exp_q.push_back(e);
    @(negedge clk);
    bfm.write(KADDR, 8'd1, 8'h01, ok);               // STRSRT
    exp_q[$].bc = 12'(dut.u_build.cur.bc);
    check_packets(1, "link-test");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
