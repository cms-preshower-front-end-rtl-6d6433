// Self-checking testbench of pace_am (I2C slave, register map, control).
//
// Every register of the map (0-5 and 20-30) is written over I2C with a
// random value and read back; the bias and Delta outputs must show the
// values, and an unmapped address must read 0.  Then the chip is put in RUN
// with a latency through the registers, the write pointer is aligned with a
// ReSync pulse, and a trigger must produce three columns whose serial
// addresses and multiplexer columns are the tagged one and the next two.
// A second device address on the same bus must not disturb the chip.
module tb_pace_am;
  logic clk = 0, rst_n = 1, resync_n = 1, lv1 = 0;
  logic scl, m_oe, s_oe, sda;
  logic data_valid, col_addr, fifo_full, ana_valid;
  logic [7:0] ana_col;
  logic [5:0] ana_ch;
  logic [3:0][7:0] bias;
  logic [10:0][7:0] dregs;
  int checks = 0, failures = 0;
  localparam logic [6:0] DEV = 7'h21;
  always #5 clk = ~clk;
  assign sda = !(m_oe | s_oe);

  pace_am dut (.clk, .rst_n, .resync_n, .lv1, .dev_addr(DEV), .scl, .sda_in(sda), .sda_oe(s_oe),
               .data_valid, .col_addr, .fifo_full, .ana_valid, .ana_col, .ana_ch,
               .bias_regs(bias), .delta_regs(dregs));
  i2c_bfm #(.HALF(60)) bfm (.scl, .sda_oe(m_oe), .sda);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // column monitor: serial address and multiplexer column of each column
  logic [7:0] addrs[$], cols[$];
  int idx = 0;
  logic [7:0] sh;
  always @(posedge clk) if (rst_n) begin
    if (data_valid) begin
      if (idx == 0) cols.push_back(ana_col);
      if (idx % 2 == 0 && idx < 16) sh = {sh[6:0], col_addr};
      if (idx == 15) addrs.push_back(sh);
      idx++;
    end else idx = 0;
  end

  initial begin
    #20000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] v[31];
    logic [7:0] d;
    bit ok;
    int bad, cyc0, tag;
    #1 rst_n = 0;   // falling edge: apply the asynchronous reset
    repeat (3) @(negedge clk);
    rst_n = 1;
    bfm.read(DEV, 8'd0, d, ok); check(ok && d == 8'h00, "Control register 0 after reset (SLEEP)");
    // all registers; Control keeps SLEEP (bits 1:0 = 0) for now
    bad = 0;
    for (int a = 0; a < 31; a++) begin
      if (a > 5 && a < 20) continue;
      v[a] = 8'($urandom);
      if (a == 0) v[a][1:0] = 2'b00;
      bfm.write(DEV, 8'(a), v[a], ok);
      if (!ok) bad++;
    end
    for (int a = 0; a < 31; a++) begin
      if (a > 5 && a < 20) continue;
      bfm.read(DEV, 8'(a), d, ok);
      if (!ok || d != v[a]) begin $display("  reg %0d read %h exp %h", a, d, v[a]); bad++; end
    end
    check(bad == 0, $sformatf("register write/read (%0d errors)", bad));
    bad = 0;
    for (int i = 0; i < 4; i++) if (bias[i] != v[2 + i]) bad++;
    for (int i = 0; i < 11; i++) if (dregs[i] != v[20 + i]) bad++;
    check(bad == 0, "bias and Delta outputs");
    bfm.read(DEV, 8'd12, d, ok); check(ok && d == 8'h00, "unmapped register reads 0");
    bfm.write(DEV ^ 7'h03, 8'd1, 8'h00, ok); check(!ok, "other device not acknowledged");
    bfm.read(DEV, 8'd1, d, ok); check(d == v[1], "latency unchanged by the other device");
    // RUN with latency 45, pointer aligned by ReSync
    bfm.write(DEV, 8'd1, 8'd45, ok);
    bfm.write(DEV, 8'd0, 8'd2, ok);
    @(negedge clk); resync_n = 0; @(negedge clk); resync_n = 1;
    // the ReSync edge clears the pointer; it then advances once per clock
    repeat (30) @(negedge clk);
    // pointer is 30 at the next edge; tag = 30 - 45 mod 160 = 145
    lv1 = 1; @(negedge clk); lv1 = 0;
    tag = 145;
    repeat (400) @(negedge clk);
    check(addrs.size() == 3 && cols.size() == 3, $sformatf("three columns read (%0d)", addrs.size()));
    if (addrs.size() == 3)
      for (int s = 0; s < 3; s++)
        check(addrs[s] == 8'((tag + s) % 160) && cols[s] == 8'((tag + s) % 160),
              $sformatf("column %0d: address %0d, mux column %0d, expected %0d", s, addrs[s], cols[s], (tag + s) % 160));
    // back to SLEEP: triggers ignored
    bfm.write(DEV, 8'd0, 8'd0, ok);
    lv1 = 1; @(negedge clk); lv1 = 0;
    repeat (400) @(negedge clk);
    check(addrs.size() == 3, "SLEEP ignores triggers");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
