// Behavioural model of the 12-bit pipelined ADC between a PACE and the
// K-chip, for simulation only.  It is clocked every LHC clock and, like the
// two-stage pipelined converter it stands for, delivers the code of the cell
// sampled at edge n after edge n+2.  The "analog" value is the test pattern
// tb_pkg::adc_code of the cell the PACE multiplexer presents; with no cell
// presented the output is 0.
module adc_model #(
  parameter int PACE_ID = 0
) (
  input  logic        clk,
  input  logic        ana_valid,
  input  logic [7:0]  ana_col,
  input  logic [5:0]  ana_ch,
  output logic [11:0] dout
);
  logic [11:0] stage1 = '0;
  logic [11:0] stage2 = '0;

  always @(posedge clk) begin
    stage1 <= ana_valid ? tb_pkg::adc_code(PACE_ID, int'(ana_col), int'(ana_ch)) : 12'h000;
    stage2 <= stage1;
  end
  assign dout = stage2;

endmodule
