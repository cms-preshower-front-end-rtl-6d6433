// Self-checking testbench of i2c_slave.
//
// The slave (device address 7'h4A) is connected to a 256-byte register file
// kept in the testbench, which returns the addressed byte one clock after
// reg_re, as the chips' register blocks do.  An I2C master model sends
// single-byte writes and combined-format reads (write of the register
// address, repeated START, read of one byte).  Checked: every write appears
// as exactly one reg_we with the right address and data, reads return the
// stored value, a transfer to another device address is not acknowledged and
// causes no register access, and back-to-back transfers work.
module tb_i2c_slave;
  logic clk = 0, rst_n = 1;
  logic scl, m_oe, s_oe, sda;
  logic [7:0] reg_addr, reg_wdata, reg_rdata;
  logic reg_we, reg_re;
  int checks = 0, failures = 0;
  localparam logic [6:0] DEV = 7'h4A;

  always #5 clk = ~clk;
  assign sda = !(m_oe | s_oe);

  i2c_slave dut (.clk, .rst_n, .dev_addr(DEV), .scl, .sda_in(sda), .sda_oe(s_oe),
                 .reg_addr, .reg_wdata, .reg_we, .reg_re, .reg_rdata);
  i2c_bfm #(.HALF(60)) bfm (.scl, .sda_oe(m_oe), .sda);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [7:0] mem [256];
  logic [7:0] rq;
  int n_we = 0, n_re = 0;
  logic [7:0] last_wa, last_wd;
  always @(posedge clk) begin
    if (reg_we) begin mem[reg_addr] <= reg_wdata; n_we++; last_wa = reg_addr; last_wd = reg_wdata; end
    if (reg_re) begin rq <= mem[reg_addr]; n_re++; end
  end
  assign reg_rdata = rq;

  initial begin
    #20000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] shadow [256];
    logic [7:0] d, a, v;
    bit ok;
    int bad_w, bad_r, we0;
    for (int i = 0; i < 256; i++) begin mem[i] = 8'(i * 7); shadow[i] = 8'(i * 7); end
    rq = 0;
    #1 rst_n = 0;   // falling edge: apply the asynchronous reset
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    bad_w = 0; bad_r = 0;
    for (int n = 0; n < 60; n++) begin
      a = 8'($urandom); v = 8'($urandom);
      we0 = n_we;
      bfm.write(DEV, a, v, ok);
      shadow[a] = v;
      if (!ok || n_we != we0 + 1 || last_wa != a || last_wd != v) bad_w++;
      a = 8'($urandom);
      bfm.read(DEV, a, d, ok);
      if (!ok || d != shadow[a]) begin
        if (bad_r < 4) $display("  read %h got %h exp %h ok %b", a, d, shadow[a], ok);
        bad_r++;
      end
    end
    check(bad_w == 0, $sformatf("writes: %0d bad", bad_w));
    check(bad_r == 0, $sformatf("reads: %0d bad", bad_r));
    // wrong device address
    we0 = n_we;
    bfm.write(DEV ^ 7'h01, 8'h10, 8'h55, ok);
    check(!ok, "other device address not acknowledged");
    check(n_we == we0 && mem[8'h10] == shadow[8'h10], "no write for another device");
    bfm.read(DEV ^ 7'h20, 8'h10, d, ok);
    check(!ok, "read for another device not acknowledged");
    // the slave still answers afterwards
    bfm.write(DEV, 8'h10, 8'hC3, ok);
    bfm.read(DEV, 8'h10, d, ok);
    check(ok && d == 8'hC3, "transfer after a foreign one");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
