// Digital part of the PACE_AM chip: I2C slave, register map and control
// logic.
//
// One I2C line reaches the registers of both chips of the PACE chipset:
//   0  Control Reg (PACE_AM)  bits 1:0 mode: 0 SLEEP, 1 RESET, 2 RUN
//   1  Latency                trigger latency in clocks
//   2-5 IreadAmp, ISF, Vadj, IoutBuf   bias settings (to the analog part)
//   20 Control Reg (Delta), 21-24 CalChanReg1-4 (calibration masks),
//   25 CalV, 26-30 Iin, DeltaPC, LccRef, Ishaper, ShaperRef
// The Delta registers are held here and brought out on delta_regs[0..10]
// (address 20 + index) for the Delta chip.  All registers are 8 bits,
// read/write, reset to 0 by the hardware reset, so the chip powers up in
// SLEEP.  The addresses follow the chipset's register map; the bit fields
// (mode encoding) are this design's.  See pace_am_ctrl for the timing of the
// readout outputs.
module pace_am #(
  parameter int unsigned QDEPTH = 8,
  parameter int unsigned GAP    = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            resync_n,
  input  logic            lv1,
  // slow control
  input  logic [6:0]      dev_addr,
  input  logic            scl,
  input  logic            sda_in,
  output logic            sda_oe,
  // to the K-chip
  output logic            data_valid,
  output logic            col_addr,
  output logic            fifo_full,
  // to the analog multiplexer / ADC
  output logic            ana_valid,
  output logic [7:0]      ana_col,
  output logic [5:0]      ana_ch,
  // settings for the analog parts
  output logic [3:0][7:0]  bias_regs,
  output logic [10:0][7:0] delta_regs
);
  import preshower_pkg::*;

  logic [7:0] reg_addr, reg_wdata, reg_rdata, rdata_q;
  logic       reg_we, reg_re;
  logic [7:0] ctrl_r, lat_r;

  i2c_slave u_i2c (
    .clk, .rst_n, .dev_addr, .scl, .sda_in, .sda_oe,
    .reg_addr, .reg_wdata, .reg_we, .reg_re, .reg_rdata);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl_r     <= '0;
      lat_r      <= '0;
      bias_regs  <= '0;
      delta_regs <= '0;
    end else if (reg_we) begin
      if (reg_addr == 8'd0) ctrl_r <= reg_wdata;
      if (reg_addr == 8'd1) lat_r  <= reg_wdata;
      for (int i = 0; i < 4; i++)
        if (reg_addr == 8'(2 + i)) bias_regs[i] <= reg_wdata;
      for (int i = 0; i < 11; i++)
        if (reg_addr == 8'(20 + i)) delta_regs[i] <= reg_wdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rdata_q <= '0;
    else if (reg_re) begin
      rdata_q <= 8'h00;
      if (reg_addr == 8'd0) rdata_q <= ctrl_r;
      if (reg_addr == 8'd1) rdata_q <= lat_r;
      for (int i = 0; i < 4; i++)
        if (reg_addr == 8'(2 + i)) rdata_q <= bias_regs[i];
      for (int i = 0; i < 11; i++)
        if (reg_addr == 8'(20 + i)) rdata_q <= delta_regs[i];
    end
  end
  assign reg_rdata = rdata_q;

  pace_am_ctrl #(.NCOL(NCOL), .NCHAN(NSAMP), .NSLICE(NSLOT), .QDEPTH(QDEPTH), .GAP(GAP)) u_ctrl (
    .clk, .rst_n, .resync_n, .lv1, .mode(ctrl_r[1:0]), .latency(lat_r),
    .data_valid, .col_addr, .fifo_full, .ana_valid, .ana_col, .ana_ch);

endmodule
