// Running CRC-16 over 16-bit link words.
//
// The K-chip appends a CRC-16 to every packet, computed over every word of the
// packet except the start-of-frame and end-of-frame words.  This module holds
// the running remainder: init clears it to 0 (taking priority over en), en
// folds data in at the clock edge.  The polynomial is the usual CRC-16,
// x^16 + x^15 + x^2 + 1, words fed most significant bit first without
// reflection; the initial value 0 and the bit order are this design's choice.
module crc16 (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init,
  input  logic        en,
  input  logic [15:0] data,
  output logic [15:0] crc
);
  import preshower_pkg::*;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    crc <= '0;
    else if (init) crc <= '0;
    else if (en)   crc <= crc16_word(crc, data);
  end

endmodule
