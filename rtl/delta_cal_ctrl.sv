// Calibration switch control of one Delta chip (the digital part of its
// calibration pulse circuit).
//
// The Delta chip can inject a charge into selected channels for calibration:
// a capacitor charged from the CalV DAC is connected to the channel input by a
// switch while Cal_Pulse is high.  Which of the 32 channels take part is set by
// a mask held in four 8-bit registers, CalChanReg1..4 (register addresses
// 21-24, channels 1-8, 9-16, 17-24 and 25-32).  This block closes the switch of
// every masked channel while cal_pulse is high and keeps all switches open
// otherwise.
//
// Interface: cal_mask[r] is CalChanReg(r+1); cal_sw[k] drives the switch of
// channel k+1 (1 = connected).  The path is combinational, so the switches
// follow cal_pulse with no clock of delay; the phase of the pulse against the
// sampling clock is set upstream.
//
// From the document: the register addresses, their channel groups and the
// role of Cal_Pulse.  This design's own choices: bit b of CalChanReg(r+1)
// selects channel 8*r + b + 1 (the bit order is not given), and the switch is
// a plain AND of mask and pulse.  The charging DAC and the switches themselves
// are analog and not modelled.
module delta_cal_ctrl (
  input  logic           cal_pulse,
  input  logic [3:0][7:0] cal_mask,
  output logic [31:0]    cal_sw
);

  always_comb begin
    for (int k = 0; k < 32; k++)
      cal_sw[k] = cal_pulse && cal_mask[k / 8][k % 8];
  end

endmodule
