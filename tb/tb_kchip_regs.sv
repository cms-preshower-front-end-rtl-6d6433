// Self-checking testbench of kchip_regs, driven through its register strobes
// (reg_we / reg_re, one clock each, read data valid on the next clock).
// Checked: CONFIG, KID and FIFOMAP read/write, ECONFIG reading 0, STRSRT,
// FIFODATA writes and reads only in link-test mode, the 16-bit read latching
// of FIFODATA, EVCNT and BNCHCNT, the sticky STATUS bits with GERR, CLPOS
// clearing POS only, and the General Reset clearing STATUS.
module tb_kchip_regs;
  import preshower_pkg::*;
  logic clk = 0, rst_n = 1, clr = 0;
  logic [7:0] reg_addr = 0, reg_wdata = 0, reg_rdata;
  logic reg_we = 0, reg_re = 0;
  logic test_mode, strsrt, fifo_wr, fifo_rd;
  logic [7:0] kid, status;
  logic [2:0] fifo_map;
  logic [15:0] fifo_wdata, fifo_rdata = 16'hA55A, evcnt = 0, bnchcnt = 0;
  logic [3:0] pos_set = 0;
  logic ign_set = 0, perr_set = 0, ifovf_set = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  kchip_regs dut (.clk, .rst_n, .clr, .reg_addr, .reg_wdata, .reg_we, .reg_re, .reg_rdata,
                  .test_mode, .kid, .strsrt, .fifo_map, .fifo_wr, .fifo_wdata, .fifo_rd,
                  .fifo_rdata, .evcnt, .bnchcnt, .pos_set, .ign_set, .perr_set, .ifovf_set, .status);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int n_strsrt = 0, n_wr = 0, n_rd = 0;
  logic [15:0] last_fw;
  always @(posedge clk) begin
    if (strsrt) n_strsrt++;
    if (fifo_wr) begin n_wr++; last_fw = fifo_wdata; end
    if (fifo_rd) n_rd++;
  end

  task automatic wr(input logic [7:0] a, input logic [7:0] d);
    @(negedge clk);
    reg_addr = a; reg_wdata = d; reg_we = 1;
    @(negedge clk);
    reg_we = 0;
  endtask

  task automatic rd(input logic [7:0] a, output logic [7:0] d);
    @(negedge clk);
    reg_addr = a; reg_re = 1;
    @(negedge clk);
    reg_re = 0;
    d = reg_rdata;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] d;
    #1 rst_n = 0;   // falling edge: apply the asynchronous reset
    repeat (3) @(negedge clk);
    rst_n = 1;
    rd(KREG_STATUS, d); check(d == 0 && !test_mode, "STATUS and mode clear after reset");
    wr(KREG_KID, 8'h9C); rd(KREG_KID, d); check(d == 8'h9C && kid == 8'h9C, "KID read/write");
    wr(KREG_FIFOMAP, 8'hFB); rd(KREG_FIFOMAP, d); check(d == 8'h03 && fifo_map == 3'd3, "FIFOMAP keeps 3 bits");
    rd(KREG_ECONFIG, d); check(d == 8'h00, "ECONFIG reads 0");
    // normal mode: FIFO access and STRSRT are disabled
    wr(KREG_FIFOD_H, 8'h12); wr(KREG_FIFOD_L, 8'h34); wr(KREG_ECONFIG, 8'h01);
    rd(KREG_FIFOD_H, d);
    check(n_wr == 0 && n_strsrt == 0 && n_rd == 0 && d == 8'h00, "FIFODATA and STRSRT inactive in normal mode");
    // link-test mode
    wr(KREG_CONFIG, 8'h80); rd(KREG_CONFIG, d); check(d == 8'h80 && test_mode, "CONFIG Mode bit");
    wr(KREG_FIFOD_H, 8'h0B); wr(KREG_FIFOD_L, 8'hCD);
    check(n_wr == 1 && last_fw == 16'h0BCD, $sformatf("FIFODATA write pushes {H,L} (%h)", last_fw));
    wr(KREG_ECONFIG, 8'h01); check(n_strsrt == 1, "STRSRT pulse in link-test mode");
    rd(KREG_FIFOD_H, d); check(d == 8'hA5 && n_rd == 1, "FIFODATA_H read pops and returns the high byte");
    fifo_rdata = 16'h0000;
    rd(KREG_FIFOD_L, d); check(d == 8'h5A && n_rd == 1, "FIFODATA_L returns the latched low byte");
    wr(KREG_CONFIG, 8'h00);
    // counters with latching
    evcnt = 16'h1234; bnchcnt = 16'h0ABC;
    rd(KREG_EVCNT_H, d); check(d == 8'h12, "EVCNT_H");
    evcnt = 16'h1300;
    rd(KREG_EVCNT_L, d); check(d == 8'h34, "EVCNT_L latched at the EVCNT_H read");
    rd(KREG_BNCH_H, d); check(d == 8'h0A, "BNCHCNT_H");
    rd(KREG_BNCH_L, d); check(d == 8'hBC, "BNCHCNT_L");
    // sticky errors
    @(negedge clk); pos_set = 4'b0100; ign_set = 1; @(negedge clk); pos_set = 0; ign_set = 0;
    rd(KREG_STATUS, d); check(d == 8'b1010_0100, $sformatf("POS2 and ignored-trigger sticky with GERR (%b)", d));
    @(negedge clk); perr_set = 1; ifovf_set = 1; @(negedge clk); perr_set = 0; ifovf_set = 0;
    rd(KREG_STATUS, d); check(d == 8'b1010_0111, $sformatf("PACE-error and overflow bits (%b)", d));
    wr(KREG_ECONFIG, 8'h80);
    rd(KREG_STATUS, d); check(d == 8'b1000_0111, $sformatf("CLPOS clears POS only (%b)", d));
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    rd(KREG_STATUS, d); check(d == 8'h00, "General Reset clears STATUS");
    rd(KREG_KID, d); check(d == 8'h9C, "General Reset keeps the configuration");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
