// LVDSMUX: redundancy router between a CCU and the two ring ports.
//
// Every CCU in the control ring has a primary port A and a secondary port B,
// each a data line and a clock(+trigger) line.  The LVDSMUX buffers both
// ports' inputs to the CCU, drives both ports' outputs from the CCU, and
// selects with the CCU's PLLCKSEL which port's clock goes to the PLL and on
// to the next CCU (pllcksel = 0: port A, this polarity is this design's
// choice).  Purely combinational; LVDS levels are not modelled.
module lvdsmux (
  // ring side
  input  logic din_a,
  input  logic din_b,
  input  logic clkin_a,
  input  logic clkin_b,
  output logic dout_a,
  output logic dout_b,
  output logic clkout_a,
  output logic clkout_b,
  output logic pll_clk,
  // CCU side
  output logic ccu_din_a,
  output logic ccu_din_b,
  output logic ccu_clkin_a,
  output logic ccu_clkin_b,
  input  logic ccu_dout_a,
  input  logic ccu_dout_b,
  input  logic pllcksel
);
  logic clk_sel;

  assign ccu_din_a   = din_a;
  assign ccu_din_b   = din_b;
  assign ccu_clkin_a = clkin_a;
  assign ccu_clkin_b = clkin_b;
  assign dout_a      = ccu_dout_a;
  assign dout_b      = ccu_dout_b;

  assign clk_sel  = pllcksel ? clkin_b : clkin_a;
  assign pll_clk  = clk_sel;
  assign clkout_a = clk_sel;
  assign clkout_b = clk_sel;

endmodule
