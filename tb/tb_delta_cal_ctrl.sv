// Self-checking testbench of delta_cal_ctrl.
//
// Walks a single mask bit through all 32 channels, then applies random masks
// with the calibration pulse high and low.  The expected switch state of
// channel k+1 is bit (k mod 8) of mask register k/8 while the pulse is high,
// and open while it is low.
module tb_delta_cal_ctrl;
  logic           cal_pulse = 0;
  logic [3:0][7:0] cal_mask = '0;
  logic [31:0]    cal_sw;
  int checks = 0, failures = 0;

  delta_cal_ctrl dut (.cal_pulse, .cal_mask, .cal_sw);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [31:0] expect_sw(input logic p, input logic [3:0][7:0] m);
    logic [31:0] e;
    for (int r = 0; r < 4; r++)
      for (int b = 0; b < 8; b++)
        e[8 * r + b] = p & m[r][b];
    return e;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // one channel at a time, pulse high: exactly that switch closes
    for (int ch = 1; ch <= 32; ch++) begin
      cal_mask = '0;
      cal_mask[(ch - 1) / 8][(ch - 1) % 8] = 1'b1;
      cal_pulse = 1'b1;
      #1;
      check(cal_sw == (32'd1 << (ch - 1)), $sformatf("channel %0d alone: %h", ch, cal_sw));
      cal_pulse = 1'b0;
      #1;
      check(cal_sw == '0, $sformatf("channel %0d, pulse low: %h", ch, cal_sw));
    end
    // random masks and pulse levels
    for (int i = 0; i < 200; i++) begin
      for (int r = 0; r < 4; r++) cal_mask[r] = 8'($urandom);
      cal_pulse = 1'($urandom);
      #1;
      check(cal_sw == expect_sw(cal_pulse, cal_mask),
            $sformatf("mask %h pulse %b: %h", cal_mask, cal_pulse, cal_sw));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
