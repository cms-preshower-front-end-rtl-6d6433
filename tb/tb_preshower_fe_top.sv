// End-to-end testbench of one front-end slice at its default sizes.
//
// Four ADC models close the loop between the PACE_AM multiplexer outputs and
// the K-chip.  Everything is driven from the chip boundary: the chips are
// configured over the shared I2C bus, fast commands are sent as three-bit T1
// sequences, and the link output is collected and compared word by word with
// the packet the reference model (tb_pkg::build_pkt) predicts.  The reference
// keeps its own copy of the PACE write pointers, the bunch and the event
// counters, advanced from the clock edge at which each T1 command is due to
// act (first bit + 4 + PLL delay clocks).
//
// Mechanisms driven and counted, each of which must occur at least once:
// LV1 events, front-end Reset, BC0, Test Pulse (calibration pulse width and
// the Delta calibration switches it closes),
// trigger queueing, an out-of-sequence PACE (POS), PACE pointer-FIFO overflow
// (empty packets, then the PACE error code), the K-chip event high watermark
// (empty packets, recovery by Reset), link-test mode, the PLL trigger delay,
// the hardware reset from a silent control line, and the LVDSMUX clock switch.
module tb_preshower_fe_top;
  import tb_pkg::*;

  localparam logic [6:0] KADDR = 7'h40;
  localparam logic [6:0] PBASE = 7'h20;
  localparam int LAT = 100;

  logic clk = 0, rst_n = 1, t1_in = 0, ring = 0, quiet = 0;
  logic [3:0] pll_dly = 0;
  logic hw_reset, cal_pulse;
  logic scl, m_oe, s_oe, sda;
  logic [3:0] ana_valid;
  logic [3:0][7:0] ana_col;
  logic [3:0][5:0] ana_ch;
  logic [3:0][11:0] adc_data;
  logic [3:0][3:0][7:0] bias;
  logic [3:0][10:0][7:0] dregs;
  logic [3:0][31:0] cal_sw;
  logic [15:0] link_data;
  logic link_valid;
  logic din_a = 0, din_b = 0, clkin_a = 0, clkin_b = 0, ccu_dout_a = 0, ccu_dout_b = 0, pllcksel = 0;
  logic dout_a, dout_b, clkout_a, clkout_b, pll_clk, ccu_din_a, ccu_din_b, ccu_clkin_a, ccu_clkin_b;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  assign sda = !(m_oe | s_oe);

  preshower_fe_top dut (
    .clk, .rst_n, .t1_in, .pll_trig_delay(pll_dly), .ring_data_in(ring), .hw_reset, .cal_pulse,
    .scl, .sda_in(sda), .sda_oe(s_oe), .ana_valid, .ana_col, .ana_ch, .adc_data,
    .pace_bias_regs(bias), .delta_regs(dregs), .delta_cal_sw(cal_sw), .link_data, .link_valid,
    .din_a, .din_b, .clkin_a, .clkin_b, .dout_a, .dout_b, .clkout_a, .clkout_b, .pll_clk,
    .ccu_din_a, .ccu_din_b, .ccu_clkin_a, .ccu_clkin_b, .ccu_dout_a, .ccu_dout_b, .pllcksel);

  for (genvar p = 0; p < 4; p++) begin : g_adc
    adc_model #(.PACE_ID(p)) u_adc (.clk, .ana_valid(ana_valid[p]), .ana_col(ana_col[p]),
                                    .ana_ch(ana_ch[p]), .dout(adc_data[p]));
  end

  i2c_bfm #(.HALF(60)) bfm (.scl, .sda_oe(m_oe), .sda);

  // the control line toggles every clock unless the test silences it
  always @(negedge clk) if (!quiet) ring <= ~ring;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- mechanism counters ----------------
  int n_lv1 = 0, n_reset = 0, n_bc0 = 0, n_cal = 0, n_queued = 0, n_pos = 0;
  int n_pace_full = 0, n_pace_err = 0, n_hwm = 0, n_test = 0, n_delay = 0;
  int n_hwrst = 0, n_mux = 0;

  // ---------------- reference model ----------------
  typedef struct { logic [7:0] addr[3][4]; int dcol[3][4]; bit empty; bit test;
                   logic [7:0] ec8; logic [11:0] bc; } exp_t;
  typedef enum int {C_LV1, C_RESET, C_BC0, C_TEST} cmd_e;
  typedef struct { int at; cmd_e kind; bit flag_full; bit flag_perr; bit flag_hwm; } ev_t;

  ev_t   ev_q[$];
  exp_t  exp_q[$];
  int    cyc = 0;
  int    wptr_m = 0, bc_m = 0, ec_m = 0;
  int    lat_m[4] = '{LAT, LAT, LAT, LAT};
  logic [11:0] tdata[4][108];

  always @(posedge clk) begin
    bit do_lv1, do_rst, do_bc0;
    ev_t e;
    cyc++;
    do_lv1 = 0; do_rst = 0; do_bc0 = 0;
    for (int i = ev_q.size() - 1; i >= 0; i--)
      if (ev_q[i].at == cyc) begin
        e = ev_q[i];
        ev_q.delete(i);
        case (e.kind)
          C_LV1:   begin
            exp_t x;
            do_lv1 = 1;
            for (int s = 0; s < 3; s++)
              for (int p = 0; p < 4; p++) begin
                x.dcol[s][p] = (wptr_m - lat_m[p] + 160 * 2 + s) % 160;
                x.addr[s][p] = (s == 0 && e.flag_perr) ? 8'hFF : 8'(x.dcol[s][p]);
              end
            x.empty = e.flag_full || e.flag_hwm;
            x.test  = 0;
            x.bc    = 12'(bc_m);
            x.ec8   = 8'(ec_m + 1);
            exp_q.push_back(x);
          end
          C_RESET: do_rst = 1;
          C_BC0:   do_bc0 = 1;
          default: ;
        endcase
      end
    if (do_rst) begin
      wptr_m = 0; bc_m = 0; ec_m = 0;
    end else begin
      wptr_m = (wptr_m + 1) % 160;
      bc_m   = (do_bc0 || bc_m == 3559) ? 0 : bc_m + 1;
      if (do_lv1) ec_m++;
    end
  end

  // sends a three-bit T1 command; the chips act on it at edge cyc + 5 + delay
  task automatic send_cmd(input cmd_e kind, input bit ff = 0, input bit pe = 0, input bit hwm = 0);
    logic [2:0] code;
    ev_t e;
    case (kind)
      C_LV1:   code = 3'b100;
      C_TEST:  code = 3'b110;
      C_RESET: code = 3'b101;
      default: code = 3'b111;
    endcase
    @(negedge clk);
    e.at = cyc + 5 + int'(pll_dly);
    e.kind = kind; e.flag_full = ff; e.flag_perr = pe; e.flag_hwm = hwm;
    ev_q.push_back(e);
    if (kind == C_LV1 && (exp_q.size() > 0 || pkts_pending())) n_queued++;
    if (pll_dly != 0) n_delay++;
    for (int b = 2; b >= 0; b--) begin
      t1_in = code[b];
      @(negedge clk);
    end
    t1_in = 0;
  endtask

  // ---------------- link monitor ----------------
  logic [15:0] rx[$];
  logic [15:0] pkts[$][$];
  int gaps_in_pkt = 0;
  bit in_pkt = 0;
  always @(posedge clk) begin
    if (link_valid) begin
      rx.push_back(link_data);
      in_pkt = 1;
      if (link_data == T_EOF && (rx.size() == 6 || rx.size() == 336)) begin
        pkts.push_back(rx);
        rx.delete();
        in_pkt = 0;
      end
    end else if (in_pkt) gaps_in_pkt++;
  end

  function automatic bit pkts_pending();
    return pkts.size() > 0 || rx.size() > 0;
  endfunction

  int n_checked = 0;
  task automatic check_packets(input int n, input string tag);
    logic [15:0] ref_pkt[$];
    int guard = 0;
    while (pkts.size() < n && guard < 60000) begin @(posedge clk); guard++; end
    check(pkts.size() >= n, $sformatf("%s: %0d packets arrived (of %0d)", tag, pkts.size(), n));
    for (int i = 0; i < n && pkts.size() > 0 && exp_q.size() > 0; i++) begin
      logic [15:0] got[$];
      exp_t e;
      int bad = 0;
      got = pkts.pop_front();
      e = exp_q.pop_front();
      build_pkt(ref_pkt, e.ec8, 4'h5, e.bc, e.addr, e.dcol, e.empty, e.test, tdata);
      check(got.size() == ref_pkt.size(), $sformatf("%s: packet %0d length %0d expected %0d", tag, n_checked, got.size(), ref_pkt.size()));
      for (int w = 0; w < got.size() && w < ref_pkt.size(); w++)
        if (got[w] !== ref_pkt[w]) begin
          if (bad < 4) $display("  %s pkt %0d word %0d got %h exp %h", tag, n_checked, w, got[w], ref_pkt[w]);
          bad++;
        end
      check(bad == 0, $sformatf("%s: packet %0d contents", tag, n_checked));
      if (bad == 0) begin
        if (got[got.size() - 3][6:3] != 0) n_pos++;
        if (got[got.size() - 3][1]) n_pace_err++;
      end
      n_checked++;
    end
  endtask

  // cal_pulse width measurement
  // and the calibration switches it closes: only channels 9 and 16 of the
  // Delta chip behind PACE 2 are masked (CalChanReg2 = 81h)
  int cal_len = 0, cal_last = 0, sw_bad = 0, sw_on = 0;
  always @(posedge clk) begin
    if (cal_pulse) begin
      if (cal_sw != {32'h0, 32'h0000_8100, 32'h0, 32'h0}) sw_bad++;
      else sw_on++;
    end else if (cal_sw != '0) sw_bad++;
    if (cal_pulse) cal_len++;
    else if (cal_len != 0) begin cal_last = cal_len; cal_len = 0; end
  end

  logic [7:0] rd;
  bit ok;

  initial begin
    #400000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic setup_chips();
    for (int p = 0; p < 4; p++) begin
      bfm.write(PBASE + 7'(p), 8'd1, 8'(LAT), ok); check(ok, $sformatf("PACE %0d latency write", p));
      bfm.write(PBASE + 7'(p), 8'd0, 8'd2, ok);    check(ok, $sformatf("PACE %0d RUN", p));
      lat_m[p] = LAT;
    end
    bfm.write(KADDR, 8'd2, 8'h05, ok); check(ok, "K-chip KID write");
  endtask

  initial begin
    #1 rst_n = 0;   // falling edge: apply the asynchronous reset
    repeat (5) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);

    // ---- slow control of all five chips on one bus
    setup_chips();
    bfm.write(PBASE + 7'd1, 8'd3, 8'h5C, ok);          // ISF of PACE 1
    bfm.write(PBASE + 7'd3, 8'd25, 8'hA7, ok);         // CalV of the Delta of PACE 3
    check(bias[1][1] == 8'h5C && dregs[3][5] == 8'hA7, "bias and Delta registers reach the outputs");
    bfm.write(PBASE + 7'd2, 8'd22, 8'h81, ok);         // CalChanReg2 of PACE 2: channels 9, 16
    bfm.read(PBASE + 7'd3, 8'd25, rd, ok); check(ok && rd == 8'hA7, "Delta register read back");
    bfm.read(PBASE + 7'd2, 8'd1, rd, ok);  check(ok && rd == 8'(LAT), "PACE latency read back");
    bfm.read(KADDR, 8'd2, rd, ok);         check(ok && rd[3:0] == 4'h5, "KID read back");

    // ---- Reset aligns the PACE write pointers and the K-chip counters; BC0
    send_cmd(C_RESET); n_reset++;
    repeat (20) @(negedge clk);
    send_cmd(C_BC0); n_bc0++;
    repeat (20) @(negedge clk);

    // ---- Test Pulse: calibration pulse to the Delta chips
    send_cmd(C_TEST);
    repeat (20) @(negedge clk);
    check(cal_last >= 8, $sformatf("calibration pulse %0d clocks (>= 8 = 200 ns)", cal_last));
    check(sw_bad == 0 && sw_on == cal_last, $sformatf("calibration switches: %0d clocks closed, %0d wrong", sw_on, sw_bad));
    if (cal_last >= 8) n_cal++;

    // ---- one event
    send_cmd(C_LV1); n_lv1++;
    check_packets(1, "single");

    // ---- three triggers close together: queued in PACE and K-chip
    for (int i = 0; i < 3; i++) begin send_cmd(C_LV1); n_lv1++; repeat (10) @(negedge clk); end
    check_packets(3, "queued");
    check(gaps_in_pkt == 0, "packets stream one word per clock");

    // ---- PLL trigger delay
    pll_dly = 4'd7;
    repeat (20) @(negedge clk);
    send_cmd(C_LV1); n_lv1++;
    send_cmd(C_BC0); n_bc0++;
    repeat (300) @(negedge clk);
    send_cmd(C_LV1); n_lv1++;
    check_packets(2, "delayed");
    pll_dly = 4'd0;
    repeat (20) @(negedge clk);

    // ---- PACE 2 out of sequence (different latency)
    bfm.write(PBASE + 7'd2, 8'd1, 8'(LAT + 5), ok);
    lat_m[2] = LAT + 5;
    send_cmd(C_LV1); n_lv1++;
    check_packets(1, "POS");
    bfm.read(KADDR, 8'd4, rd, ok);
    check(ok && rd[5] && rd[7], $sformatf("K-chip STATUS shows POS2 (%h)", rd));
    bfm.write(KADDR, 8'd1, 8'h80, ok);                  // clear POS
    bfm.write(PBASE + 7'd2, 8'd1, 8'(LAT), ok);
    lat_m[2] = LAT;

    // ---- PACE pointer FIFO overflow: 12 triggers 4 clocks apart. The first
    // is read at once, the next 8 fill the queue, the last 3 are ignored by
    // every PACE (empty packets) and the next event read carries 8'hFF.
    for (int i = 0; i < 12; i++) begin
      send_cmd(C_LV1, i >= 9, i == 1); n_lv1++;
      if (i >= 9) n_pace_full++;
      @(negedge clk);
    end
    check_packets(12, "PACE overflow");
    bfm.read(KADDR, 8'd4, rd, ok);
    check(ok && rd[2] && rd[1], $sformatf("K-chip STATUS ignored-trigger and PACE-error bits (%h)", rd));

    // ---- K-chip high watermark: triggers every 240 clocks keep the PACEs
    // below full, but the link (336 clocks a packet) falls behind, so the
    // K-chip's event count reaches 13 and the next trigger is ignored.
    for (int i = 0; i < 60; i++) begin
      send_cmd(C_LV1); n_lv1++;
      repeat (236) @(negedge clk);
    end
    repeat (200) @(negedge clk);
    // the ignored trigger leaves its PACE data behind: packets from here are out of step
    bfm.read(KADDR, 8'd4, rd, ok);
    check(ok && rd[2], $sformatf("STATUS ignored-trigger after watermark (%h)", rd));
    begin
      int n_empty = 0;
      while (pkts.size() > 0) begin
        logic [15:0] got[$];
        got = pkts.pop_front();
        if (got.size() == 6) n_empty++;
      end
      repeat (6000) @(negedge clk);
      while (pkts.size() > 0) begin
        logic [15:0] got[$];
        got = pkts.pop_front();
        if (got.size() == 6) n_empty++;
      end
      check(n_empty >= 1, $sformatf("empty packet at the watermark (%0d)", n_empty));
      if (n_empty >= 1) n_hwm++;
    end
    // recover with a Reset
    send_cmd(C_RESET); n_reset++;
    repeat (400) @(negedge clk);
    exp_q.delete(); pkts.delete(); rx.delete(); in_pkt = 0;
    send_cmd(C_LV1); n_lv1++;
    check_packets(1, "after Reset");

    // ---- link-test mode
    bfm.write(KADDR, 8'd0, 8'h80, ok); check(ok, "link-test mode");
    for (int p = 0; p < 4; p++) begin
      bfm.write(KADDR, 8'd5, 8'(p), ok);
      for (int k = 0; k < 108; k++) begin
        tdata[p][k] = 12'($urandom);
        bfm.write(KADDR, 8'd6, {4'h0, tdata[p][k][11:8]}, ok);
        bfm.write(KADDR, 8'd7, tdata[p][k][7:0], ok);
      end
    end
    begin
      exp_t e;
      for (int s = 0; s < 3; s++) for (int p = 0; p < 4; p++) begin e.addr[s][p] = 0; e.dcol[s][p] = 0; end
      e.empty = 0; e.test = 1; e.ec8 = 8'(ec_m); e.bc = 0;
      exp_q.push_back(e);
    end
    bfm.write(KADDR, 8'd1, 8'h01, ok);                  // STRSRT
    exp_q[$].bc = 12'(dut.u_kchip.u_build.cur.bc);
    check_packets(1, "link-test");
    if (failures == 0) n_test++;
    bfm.write(KADDR, 8'd0, 8'h00, ok);

    // ---- LVDSMUX: the PLL clock follows the selected ring port
    for (int i = 0; i < 8; i++) begin
      clkin_a = i[0]; clkin_b = i[1]; pllcksel = i[2];
      din_a = i[1]; ccu_dout_b = i[0];
      #1;
      check(pll_clk == (pllcksel ? clkin_b : clkin_a) && clkout_a == pll_clk && clkout_b == pll_clk
            && ccu_din_a == din_a && dout_b == ccu_dout_b, "LVDSMUX routing");
      if (pllcksel && clkin_a != clkin_b && pll_clk == clkin_b) n_mux++;
    end

    // ---- hardware reset: 2 us of silence on the control line
    quiet = 1;
    repeat (79) @(negedge clk);
    check(!hw_reset, "no hardware reset before 80 quiet clocks");
    repeat (4) @(negedge clk);
    check(hw_reset, "hardware reset after 80 quiet clocks");
    quiet = 0;
    repeat (4) @(negedge clk);
    check(!hw_reset, "hardware reset released by activity");
    bfm.read(KADDR, 8'd2, rd, ok); check(ok && rd == 8'h00, $sformatf("KID cleared by hardware reset (%h)", rd));
    bfm.read(PBASE + 7'd1, 8'd1, rd, ok); check(ok && rd == 8'h00, "PACE latency cleared by hardware reset");
    if (rd == 0) n_hwrst++;

    // ---- every mechanism must have happened
    check(n_lv1 > 0,       $sformatf("mechanism LV1 events: %0d", n_lv1));
    check(n_reset > 0,     $sformatf("mechanism Reset: %0d", n_reset));
    check(n_bc0 > 0,       $sformatf("mechanism BC0: %0d", n_bc0));
    check(n_cal > 0,       $sformatf("mechanism test pulse: %0d", n_cal));
    check(n_queued > 0,    $sformatf("mechanism trigger queueing: %0d", n_queued));
    check(n_pos > 0,       $sformatf("mechanism POS: %0d", n_pos));
    check(n_pace_full > 0, $sformatf("mechanism PACE FIFO full: %0d", n_pace_full));
    check(n_pace_err > 0,  $sformatf("mechanism PACE error code: %0d", n_pace_err));
    check(n_hwm > 0,       $sformatf("mechanism K-chip watermark: %0d", n_hwm));
    check(n_test > 0,      $sformatf("mechanism link test: %0d", n_test));
    check(n_delay > 0,     $sformatf("mechanism PLL delay: %0d", n_delay));
    check(n_hwrst > 0,     $sformatf("mechanism hardware reset: %0d", n_hwrst));
    check(n_mux > 0,       $sformatf("mechanism LVDSMUX switch: %0d", n_mux));
    $display("mechanisms: lv1=%0d reset=%0d bc0=%0d cal=%0d queued=%0d pos=%0d pace_full=%0d pace_err=%0d hwm=%0d test=%0d delay=%0d hwrst=%0d mux=%0d",
             n_lv1, n_reset, n_bc0, n_cal, n_queued, n_pos, n_pace_full, n_pace_err, n_hwm, n_test, n_delay, n_hwrst, n_mux);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
