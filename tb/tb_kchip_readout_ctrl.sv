// Self-checking testbench of kchip_readout_ctrl.
//
// An emulated PACE output (Data_Valid, the serial column address and the
// ADC model with its two-clock pipeline) sends columns; the testbench
// collects data_we words and col_we addresses and compares them with the
// ADC test pattern of each column and with the address sent.  Also checked:
// a column cut short when Data_Valid drops early, columns separated by
// gaps of 1 to 6 clocks, and the clear input abandoning a column.
module tb_kchip_readout_ctrl;
  import tb_pkg::*;
  logic clk = 0, rst_n = 1, clr = 0, dv = 0, col_ser = 0;
  logic ana_valid = 0;
  logic [7:0] ana_col = 0;
  logic [5:0] ana_ch = 0;
  logic [11:0] adc;
  logic data_we, col_we;
  logic [11:0] data_wd;
  logic [7:0] col_wd;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  adc_model #(.PACE_ID(1)) u_adc (.clk, .ana_valid, .ana_col, .ana_ch, .dout(adc));
  kchip_readout_ctrl dut (.clk, .rst_n, .clr, .dv, .col_ser, .adc_data(adc),
                          .data_we, .data_wd, .col_we, .col_wd);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [11:0] words[$];
  logic [7:0]  cols[$];
  always @(posedge clk) if (rst_n) begin
    if (data_we) words.push_back(data_wd);
    if (col_we) cols.push_back(col_wd);
  end

  task automatic send_col(input logic [7:0] addr, input int nsamp, input int gap);
    for (int c = 0; c < 2 * nsamp; c++) begin
      @(negedge clk);
      dv = 1; ana_valid = 1; ana_col = addr; ana_ch = 6'(c / 2);
      col_ser = (c / 2 < 8) ? addr[7 - c / 2] : 1'b0;
    end
    for (int g = 0; g < gap; g++) begin
      @(negedge clk);
      dv = 0; ana_valid = 0; col_ser = 0;
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] a[$];
    int bad;
    #1 rst_n = 0;   // falling edge: apply the asynchronous reset
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    // full columns with random addresses and gaps
    for (int n = 0; n < 40; n++) begin
      a.push_back(8'($urandom % 160));
      send_col(a[$], 36, 1 + $urandom % 6);
    end
    repeat (6) @(negedge clk);
    check(cols.size() == 40 && words.size() == 40 * 36,
          $sformatf("40 columns: %0d addresses, %0d words", cols.size(), words.size()));
    bad = 0;
    for (int n = 0; n < 40 && n < cols.size(); n++) begin
      if (cols[n] != a[n]) bad++;
      for (int k = 0; k < 36 && 36 * n + k < words.size(); k++)
        if (words[36 * n + k] != adc_code(1, int'(a[n]), k)) bad++;
    end
    check(bad == 0, $sformatf("addresses and ADC words (%0d wrong)", bad));
    // the address 8'hFF (PACE error code) is passed on unchanged
    cols.delete(); words.delete();
    send_col(8'hFF, 36, 4);
    repeat (4) @(negedge clk);
    check(cols.size() == 1 && cols[0] == 8'hFF, "error code address passed on");
    // short column: Data_Valid drops after 20 samples
    cols.delete(); words.delete();
    send_col(8'd77, 20, 6);
    check(cols.size() == 1 && cols[0] == 8'd77 && words.size() == 20,
          $sformatf("short column: %0d words", words.size()));
    // clear in the middle of a column, then a full column
    cols.delete(); words.delete();
    fork
      send_col(8'd33, 36, 0);
      begin repeat (5) @(negedge clk); clr = 1; @(negedge clk); clr = 0; end
    join
    dv = 0; ana_valid = 0;
    repeat (4) @(negedge clk);
    cols.delete(); words.delete();
    send_col(8'd90, 36, 4);
    repeat (4) @(negedge clk);
    check(cols.size() == 1 && cols[0] == 8'd90 && words.size() == 36 && words[0] == adc_code(1, 90, 0),
          "clean column after clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
