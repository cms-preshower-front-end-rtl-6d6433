// Programmable trigger delay of the PLL.
//
// The PLL regenerates the trigger line separately from the clock and can
// shift it by a whole number of clock periods, 0 to MAX_DELAY (15).  Built as
// a shift register of MAX_DELAY stages with a tap selected by delay: with
// delay = d the output follows the input d clocks later (d = 0 is a straight
// combinational path).  delay values above MAX_DELAY are clamped.  The
// sub-nanosecond clock phase shifter and the triple-voted SEU protection of the
// real chip are not part of this model.
module pll_trigger_delay #(
  parameter int unsigned MAX_DELAY = 15
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] delay,
  input  logic       t1_in,
  output logic       t1_out
);
  logic [MAX_DELAY:1] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sr <= '0;
    else        sr <= {sr[MAX_DELAY-1:1], t1_in};
  end

  always_comb begin
    if (delay == 4'd0)                       t1_out = t1_in;
    else if (32'(delay) > MAX_DELAY)         t1_out = sr[MAX_DELAY];
    else                                     t1_out = sr[delay];
  end

endmodule
