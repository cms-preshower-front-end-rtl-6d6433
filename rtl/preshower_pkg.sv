// Shared types and constants of the Preshower front-end readout slice.
//
// The numbers that come from the readout architecture are: 12-bit ADC
// samples, 36 multiplexed channels per PACE column (32 strips + 4 dummy),
// 3 time slices per event, 160 analog pipeline columns, 4 PACE chips per
// K-chip, 16-bit link words, and the three-bit T1 command codes.  The SOF/EOF
// words, the control-field and status-word bit meanings and the PACE mode
// encoding are this design's own choices, collected here so that the
// testbenches and any receiver share one definition.
package preshower_pkg;

  localparam int unsigned N_PACE      = 4;    // PACE chips per K-chip
  localparam int unsigned NSAMP       = 36;   // samples per PACE column
  localparam int unsigned NSLOT       = 3;    // time slices per event
  localparam int unsigned NCOL        = 160;  // analog pipeline depth
  localparam int unsigned ADC_W       = 12;   // ADC resolution
  localparam int unsigned COL_W       = 8;    // column address width
  localparam int unsigned WORD_W      = 16;   // link word width

  // Words in one time slot: 2 column-address words + 36*4*12/16 data words.
  localparam int unsigned SLOT_DATA_WORDS = NSAMP * N_PACE * ADC_W / WORD_W;  // 108
  localparam int unsigned SLOT_WORDS      = 2 + SLOT_DATA_WORDS;              // 110
  localparam int unsigned PKT_WORDS       = 3 + NSLOT * SLOT_WORDS + 3;       // 336
  localparam int unsigned EMPTY_PKT_WORDS = 6;                                // header + trailer

  localparam logic [15:0] SOF_WORD = 16'hFCFC;
  localparam logic [15:0] EOF_WORD = 16'hFDFD;

  // Column address the PACE sends after it had to ignore a trigger.
  localparam logic [7:0] PACE_ERR_COL = 8'hFF;

  // Control field bits (header word 1, bits 15:8): the packet type.  All zero
  // is a normal event; error flags found while building travel in the
  // trailer's status word.
  localparam int unsigned CTL_TEST  = 0;
  localparam int unsigned CTL_EMPTY = 2;

  // Per-event status word (trailer word 0).
  typedef struct packed {
    logic [7:0] zero;       // 15:8
    logic       err;        // 7  any error in this event
    logic [3:0] pos;        // 6:3 out-of-sequence channel 3..0
    logic       empty;      // 2  trigger ignored, no payload
    logic       pace_err;   // 1  a PACE sent its error column code
    logic       test;       // 0  link-test packet
  } evt_status_t;

  // Entry of the K-chip trigger FIFO.
  typedef struct packed {
    logic        empty;     // trigger was ignored (high watermark / PACE full)
    logic [15:0] ec;        // event counter after this trigger
    logic [11:0] bc;        // bunch counter at the trigger
  } trig_entry_t;

  localparam int unsigned TRIG_W = $bits(trig_entry_t);

  // PACE_AM modes (Control Reg bits 1:0).
  typedef enum logic [1:0] {
    PACE_SLEEP = 2'd0,
    PACE_RESET = 2'd1,
    PACE_RUN   = 2'd2
  } pace_mode_e;

  // T1 command patterns (first bit always 1).
  localparam logic [2:0] T1_LV1A  = 3'b100;
  localparam logic [2:0] T1_TEST  = 3'b110;
  localparam logic [2:0] T1_RESET = 3'b101;
  localparam logic [2:0] T1_BC0   = 3'b111;

  // K-chip register addresses (Table of internal registers).
  localparam logic [7:0] KREG_CONFIG   = 8'd0;
  localparam logic [7:0] KREG_ECONFIG  = 8'd1;
  localparam logic [7:0] KREG_KID      = 8'd2;
  localparam logic [7:0] KREG_STATUS   = 8'd4;
  localparam logic [7:0] KREG_FIFOMAP  = 8'd5;
  localparam logic [7:0] KREG_FIFOD_H  = 8'd6;
  localparam logic [7:0] KREG_FIFOD_L  = 8'd7;
  localparam logic [7:0] KREG_EVCNT_H  = 8'd8;
  localparam logic [7:0] KREG_EVCNT_L  = 8'd9;
  localparam logic [7:0] KREG_BNCH_H   = 8'd10;
  localparam logic [7:0] KREG_BNCH_L   = 8'd11;

  // CRC-16, polynomial x^16 + x^15 + x^2 + 1, one 16-bit word, MSB first.
  function automatic logic [15:0] crc16_word(input logic [15:0] crc_in, input logic [15:0] data);
    logic [15:0] c;
    c = crc_in;
    for (int i = 15; i >= 0; i--) begin
      if (c[15] ^ data[i]) c = {c[14:0], 1'b0} ^ 16'h8005;
      else                 c = {c[14:0], 1'b0};
    end
    return c;
  endfunction

endpackage
