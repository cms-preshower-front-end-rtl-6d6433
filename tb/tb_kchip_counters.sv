// Self-checking testbench of kchip_counters at the default orbit length.
//
// A reference model of the bunch counter (3560 crossings per orbit, cleared
// by BC0) and of the event counter (one per LV1, 16 bits) is compared every
// clock.  The run covers more than two full orbits without BC0, random BC0
// and LV1 pulses, the clear input, and the 16-bit wrap of the event counter.
module tb_kchip_counters;
  logic clk = 0, rst_n = 1, clr = 0, bc0 = 0, lv1 = 0;
  logic [11:0] bc;
  logic [15:0] ec;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  kchip_counters dut (.clk, .rst_n, .clr, .bc0, .lv1, .bc, .ec);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int bc_m = 0, ec_m = 0, bad = 0, wraps = 0;
  always @(posedge clk) if (rst_n) begin
    if (bc != 12'(bc_m) || ec != 16'(ec_m)) begin
      if (bad < 5) $display("  bc %0d/%0d ec %0d/%0d", bc, bc_m, ec, ec_m);
      bad++;
    end
    if (clr) begin bc_m = 0; ec_m = 0; end
    else begin
      if (!bc0 && bc_m == 3559) wraps++;
      bc_m = (bc0 || bc_m == 3559) ? 0 : bc_m + 1;
      if (lv1) ec_m = (ec_m + 1) % 65536;
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
    #1 rst_n = 0;   // falling edge: apply the asynchronous reset
    repeat (3) @(negedge clk);
    rst_n = 1;
    check(bc == 0 && ec == 0, "zero after reset");
    repeat (3559) @(negedge clk);
    check(bc == 12'd3559, $sformatf("last crossing of the orbit is 3559 (%0d)", bc));
    @(negedge clk);
    check(bc == 0, "wraps to 0 after 3560 crossings");
    repeat (4000) @(negedge clk);
    for (int i = 0; i < 20000; i++) begin
      bc0 = ($urandom % 1000) == 0;
      lv1 = ($urandom % 3) == 0;
      clr = ($urandom % 5000) == 0;
      @(negedge clk);
    end
    bc0 = 0; clr = 0;
    // event-counter wrap
    lv1 = 1;
    repeat (70000) @(negedge clk);
    lv1 = 0;
    @(negedge clk);
    check(wraps >= 2, $sformatf("orbit wrapped %0d times", wraps));
    check(bad == 0, $sformatf("counters match the model (%0d mismatches)", bad));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
