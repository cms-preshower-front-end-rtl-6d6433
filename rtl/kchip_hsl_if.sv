// High-speed-link interface of the K-chip.
//
// Streams packets from the output buffer to the serializer.  Output is
// enabled only once a whole packet, CRC and EOF included, is in the buffer
// (pkt_ready).  From then on one 16-bit word per clock leaves on link_data
// with link_valid high, until the word flagged last (EOF) has gone.  Between
// packets link_valid is low and link_data is zero.  The link runs without
// flow control: nothing can stop a packet once it has started.  link_data and
// link_valid are registered; the word popped at edge n is on the link after
// that edge.  pkt_done pulses when the last word of a packet is popped.
module kchip_hsl_if (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clr,
  input  logic        pkt_ready,
  input  logic        o_empty,
  input  logic [15:0] o_head,
  input  logic        o_last,
  output logic        o_pop,
  output logic        pkt_done,
  output logic [15:0] link_data,
  output logic        link_valid
);
  logic streaming;
  logic send;

  assign send     = (streaming || pkt_ready) && !o_empty;
  assign o_pop    = send;
  assign pkt_done = send && o_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      streaming  <= 1'b0;
      link_data  <= '0;
      link_valid <= 1'b0;
    end else if (clr) begin
      streaming  <= 1'b0;
      link_data  <= '0;
      link_valid <= 1'b0;
    end else begin
      link_valid <= send;
      link_data  <= send ? o_head : 16'h0000;
      if (send) streaming <= !o_last;
    end
  end

endmodule
