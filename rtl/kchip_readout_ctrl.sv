// Readout control of one K-chip input channel.
//
// A PACE reads out an event as three columns.  For each column it raises
// Data_Valid for 36 samples, each held for two LHC clocks (the PACE
// multiplexer runs at 20 MHz), and sends the 8-bit column address serially,
// most significant bit first, one bit per sample during the first eight
// samples.  This block follows Data_Valid: the first clock of Data_Valid is
// phase 0 of sample 0, and on phase 1 of every sample it takes the column
// address bit and schedules a write of the ADC word.  The ADC has a pipeline
// of ADC_LAT clocks, so the ADC word for a sample is written ADC_LAT clocks
// after its phase-1 clock.  After the 8th sample the assembled column address
// is written to the column-address queue.  A column ends after NSAMP samples
// or when Data_Valid drops.  The sample phase rule and the MSB-first bit order
// are this design's reading of the readout timing diagrams.
module kchip_readout_ctrl #(
  parameter int unsigned NSAMP   = 36,
  parameter int unsigned ADC_LAT = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clr,
  input  logic        dv,
  input  logic        col_ser,
  input  logic [11:0] adc_data,
  output logic        data_we,
  output logic [11:0] data_wd,
  output logic        col_we,
  output logic [7:0]  col_wd
);
  logic             dv_q;
  logic             phase;
  logic [5:0]       samp;
  logic [7:0]       col_sh;
  logic             strobe;
  logic [ADC_LAT-1:0] dly;

  // phase 1 of a sample inside the column
  assign strobe = dv && dv_q && phase && (samp < 6'(NSAMP));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dv_q   <= 1'b0;
      phase  <= 1'b0;
      samp   <= '0;
      col_sh <= '0;
      col_we <= 1'b0;
      col_wd <= '0;
      dly    <= '0;
    end else if (clr) begin
      dv_q   <= 1'b0;
      phase  <= 1'b0;
      samp   <= '0;
      col_sh <= '0;
      col_we <= 1'b0;
      dly    <= '0;
    end else begin
      dv_q   <= dv;
      col_we <= 1'b0;
      dly    <= (dly << 1) | ADC_LAT'(strobe);
      if (dv && !dv_q) begin
        // first clock of a column: phase 0 of sample 0
        phase <= 1'b1;
        samp  <= '0;
      end else if (dv) begin
        phase <= ~phase;
        if (strobe) begin
          samp <= samp + 1'b1;
          if (samp < 6'd8) col_sh <= {col_sh[6:0], col_ser};
          if (samp == 6'd7) begin
            col_we <= 1'b1;
            col_wd <= {col_sh[6:0], col_ser};
          end
        end
      end else begin
        phase <= 1'b0;
      end
    end
  end

  assign data_we = dly[ADC_LAT-1];
  assign data_wd = adc_data;

endmodule
