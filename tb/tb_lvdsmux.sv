// Self-checking testbench of lvdsmux: every combination of the seven inputs
// is applied and each output compared with its expected source.
module tb_lvdsmux;
  logic din_a, din_b, clkin_a, clkin_b, ccu_dout_a, ccu_dout_b, pllcksel;
  logic dout_a, dout_b, clkout_a, clkout_b, pll_clk, ccu_din_a, ccu_din_b, ccu_clkin_a, ccu_clkin_b;
  int checks = 0, failures = 0;

  lvdsmux dut (.din_a, .din_b, .clkin_a, .clkin_b, .dout_a, .dout_b, .clkout_a, .clkout_b,
               .pll_clk, .ccu_din_a, .ccu_din_b, .ccu_clkin_a, .ccu_clkin_b,
               .ccu_dout_a, .ccu_dout_b, .pllcksel);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 128; v++) begin
      logic sel_clk;
      {din_a, din_b, clkin_a, clkin_b, ccu_dout_a, ccu_dout_b, pllcksel} = 7'(v);
      #10;
      sel_clk = pllcksel ? clkin_b : clkin_a;
      check(pll_clk == sel_clk && clkout_a == sel_clk && clkout_b == sel_clk,
            $sformatf("clock selection, inputs %b", 7'(v)));
      check(ccu_din_a == din_a && ccu_din_b == din_b && ccu_clkin_a == clkin_a &&
            ccu_clkin_b == clkin_b && dout_a == ccu_dout_a && dout_b == ccu_dout_b,
            $sformatf("ring routing, inputs %b", 7'(v)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
