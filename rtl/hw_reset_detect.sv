// Hardware-reset detector of the optical receiver.
//
// The control link signals a hardware reset by leaving its data line without
// transitions for more than 2 us.  This block watches the (already digital)
// data line: a counter of quiet clocks restarts on every transition; once it
// has seen QUIET_CYCLES quiet clocks (80 at 40 MHz = 2 us) hw_reset goes high
// and stays high until the next transition of the data line, on which it
// drops in the following clock.  The transition-based definition of "quiet"
// and the release on the first transition are this design's reading.
module hw_reset_detect #(
  parameter int unsigned QUIET_CYCLES = 80
) (
  input  logic clk,
  input  logic rst_n,
  input  logic data_in,
  output logic hw_reset
);
  localparam int unsigned CW = $clog2(QUIET_CYCLES + 1);

  logic          d_q;
  logic [CW-1:0] quiet;
  logic          edge_seen;

  assign edge_seen = data_in ^ d_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_q      <= 1'b0;
      quiet    <= '0;
      hw_reset <= 1'b0;
    end else begin
      d_q <= data_in;
      if (edge_seen) begin
        quiet    <= '0;
        hw_reset <= 1'b0;
      end else if (quiet != CW'(QUIET_CYCLES - 1)) begin
        quiet <= quiet + 1'b1;
      end else begin
        hw_reset <= 1'b1;
      end
    end
  end

endmodule
