// One readout slice of a Preshower front-end motherboard.
//
// Four PACE_AM chips (the digital part; the analog pipeline, the Delta chip's analog part
// and the ADCs are outside) feed one K-chip, which builds event packets for
// one high-speed link.  The fast-control path comes from the control ring:
// the PLL regenerates the T1 trigger line (its programmable delay of 0-15
// clocks is modelled here by pll_trigger_delay) and the CCU's trigger decoder
// turns three-bit T1 commands into LV1 (to every PACE and the K-chip), Reset
// (PACE ReSync and K-chip General Reset), Test Pulse (stretched to
// CAL_PULSE_CYCLES clocks, at least 200 ns, on cal_pulse for the Delta chip)
// and BC0 (K-chip bunch counter).  While cal_pulse is high, delta_cal_sw[i]
// closes the calibration switches of the channels selected by the CalChanReg
// masks of the Delta chip behind PACE i.  The optical receiver's reset detector
// raises a hardware reset after 2 us of silence on the control data line;
// it is combined with the rst_n pin.  The LVDSMUX routes the ring's A/B ports
// around the CCU, whose ring logic is outside this RTL.
//
// Interfaces: every ADC is outside; ana_valid/ana_col/ana_ch say which analog
// cell PACE i presents, and the digitised sample must come back on
// adc_data[i] ADC_LAT (2) clocks later.  One I2C bus serves all five chips:
// K-chip at KCHIP_I2C_ADDR, PACE i at PACE_I2C_BASE + i; sda_oe is the
// wired-AND pull-down of all slaves.  link_data/link_valid go to the
// serializer.  Parameters other than the addresses only shrink buffers for
// faster simulation; their defaults are the design's sizes.
module preshower_fe_top #(
  parameter logic [6:0]  KCHIP_I2C_ADDR   = 7'h40,
  parameter logic [6:0]  PACE_I2C_BASE    = 7'h20,
  parameter int unsigned CAL_PULSE_CYCLES = 8,
  parameter int unsigned IN_DEPTH         = 1600,
  parameter int unsigned EVT_HWM          = 13,
  parameter int unsigned PACE_QDEPTH      = 8,
  parameter int unsigned QUIET_CYCLES     = 80
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // fast control
  input  logic                  t1_in,
  input  logic [3:0]            pll_trig_delay,
  input  logic                  ring_data_in,
  output logic                  hw_reset,
  output logic                  cal_pulse,
  // slow control
  input  logic                  scl,
  input  logic                  sda_in,
  output logic                  sda_oe,
  // analog side
  output logic [3:0]            ana_valid,
  output logic [3:0][7:0]       ana_col,
  output logic [3:0][5:0]       ana_ch,
  input  logic [3:0][11:0]      adc_data,
  output logic [3:0][3:0][7:0]  pace_bias_regs,
  output logic [3:0][10:0][7:0] delta_regs,
  output logic [3:0][31:0]      delta_cal_sw,
  // readout link
  output logic [15:0]           link_data,
  output logic                  link_valid,
  // control ring through the LVDSMUX
  input  logic                  din_a,
  input  logic                  din_b,
  input  logic                  clkin_a,
  input  logic                  clkin_b,
  output logic                  dout_a,
  output logic                  dout_b,
  output logic                  clkout_a,
  output logic                  clkout_b,
  output logic                  pll_clk,
  output logic                  ccu_din_a,
  output logic                  ccu_din_b,
  output logic                  ccu_clkin_a,
  output logic                  ccu_clkin_b,
  input  logic                  ccu_dout_a,
  input  logic                  ccu_dout_b,
  input  logic                  pllcksel
);
  import preshower_pkg::*;

  logic chip_rst_n;
  logic t1_del, lv1a, test_pulse, fe_reset, bc0;

  hw_reset_detect #(.QUIET_CYCLES(QUIET_CYCLES)) u_hwrst (
    .clk, .rst_n, .data_in(ring_data_in), .hw_reset);

  assign chip_rst_n = rst_n && !hw_reset;

  pll_trigger_delay u_pll_dly (
    .clk, .rst_n(chip_rst_n), .delay(pll_trig_delay), .t1_in, .t1_out(t1_del));

  t1_decoder u_t1 (
    .clk, .rst_n(chip_rst_n), .t1(t1_del), .lv1a, .test_pulse, .fe_reset, .bc0);

  // calibration pulse stretcher
  logic [$clog2(CAL_PULSE_CYCLES+1)-1:0] cal_cnt;
  always_ff @(posedge clk or negedge chip_rst_n) begin
    if (!chip_rst_n)              cal_cnt <= '0;
    else if (test_pulse)          cal_cnt <= $bits(cal_cnt)'(CAL_PULSE_CYCLES);
    else if (cal_cnt != '0)       cal_cnt <= cal_cnt - 1'b1;
  end
  assign cal_pulse = (cal_cnt != '0);

  lvdsmux u_mux (
    .din_a, .din_b, .clkin_a, .clkin_b, .dout_a, .dout_b, .clkout_a, .clkout_b, .pll_clk,
    .ccu_din_a, .ccu_din_b, .ccu_clkin_a, .ccu_clkin_b, .ccu_dout_a, .ccu_dout_b, .pllcksel);

  // PACE chips
  logic [3:0] dv, col_ser, pace_full, pace_sda_oe;
  logic       k_sda_oe;

  for (genvar i = 0; i < 4; i++) begin : g_pace
    pace_am #(.QDEPTH(PACE_QDEPTH)) u_pace (
      .clk, .rst_n(chip_rst_n), .resync_n(!fe_reset), .lv1(lv1a),
      .dev_addr(PACE_I2C_BASE + 7'(i)), .scl, .sda_in, .sda_oe(pace_sda_oe[i]),
      .data_valid(dv[i]), .col_addr(col_ser[i]), .fifo_full(pace_full[i]),
      .ana_valid(ana_valid[i]), .ana_col(ana_col[i]), .ana_ch(ana_ch[i]),
      .bias_regs(pace_bias_regs[i]), .delta_regs(delta_regs[i]));

    // calibration switches of the Delta chip behind PACE i (CalChanReg1-4)
    delta_cal_ctrl u_cal (
      .cal_pulse, .cal_mask(delta_regs[i][4:1]), .cal_sw(delta_cal_sw[i]));
  end

  kchip #(.IN_DEPTH(IN_DEPTH), .EVT_HWM(EVT_HWM)) u_kchip (
    .clk, .rst_n(chip_rst_n), .gen_reset(fe_reset), .lv1(lv1a), .bc0,
    .dv, .col_ser, .pace_full, .adc_data,
    .i2c_addr(KCHIP_I2C_ADDR), .scl, .sda_in, .sda_oe(k_sda_oe),
    .link_data, .link_valid);

  assign sda_oe = k_sda_oe | (|pace_sda_oe);

endmodule
