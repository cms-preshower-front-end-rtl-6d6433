// Bunch counter and event counter of the K-chip.
//
// The bunch counter counts the 40 MHz LHC clock continuously and wraps after
// BX_PER_ORBIT crossings (3560 per orbit of 89 us); the BC0 command reloads
// it to zero (this reload is this design's choice).  The event counter counts
// level-1 triggers, 16 bits wide; the link header carries its low byte.  The
// General Reset (clr) clears both.  Outputs are registered: on the cycle lv1
// is high, bc is the crossing of the trigger and ec is still the count before
// it, so a trigger is tagged with {ec + 1, bc}.
module kchip_counters #(
  parameter int unsigned BX_PER_ORBIT = 3560
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clr,
  input  logic        bc0,
  input  logic        lv1,
  output logic [11:0] bc,
  output logic [15:0] ec
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bc <= '0;
      ec <= '0;
    end else if (clr) begin
      bc <= '0;
      ec <= '0;
    end else begin
      if (bc0 || bc == 12'(BX_PER_ORBIT - 1)) bc <= '0;
      else                                    bc <= bc + 1'b1;
      if (lv1) ec <= ec + 1'b1;
    end
  end

endmodule
