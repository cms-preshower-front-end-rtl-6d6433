// Control logic of the PACE_AM analog-memory chip.
//
// The analog pipeline has NCOL = 160 columns, written one per 40 MHz clock by
// a circular write pointer while the chip is in RUN mode.  A level-1 trigger
// tags the column written `latency` clocks earlier and queues it in the
// pointer FIFO (QDEPTH events).  The readout sequencer takes one tagged event
// at a time and reads NSLICE = 3 consecutive columns (the tagged one and the
// two after it).  For each column it raises data_valid for NCHAN = 36
// samples (32 strips + 4 dummy channels), two clocks per sample, and sends
// the 8-bit column address serially on col_addr, MSB first, one bit per
// sample during the first 8 samples.  Between the columns of an event
// data_valid stays low for GAP clocks, between queued events for GAP + 1
// (one clock to fetch the next tag).  An event is read 3 x (72 + GAP) = 228
// clocks after the clock that fetched it.  ana_valid/ana_col/ana_ch say which
// analog cell the output multiplexer is presenting to the ADC.
//
// Errors: fifo_full is high while the pointer FIFO is full; a trigger that
// arrives then is ignored and the next column sent carries the address
// 8'hFF instead of its own, the error code seen by the K-chip.
// Modes: SLEEP and RESET hold pointers, queue and sequencer in reset, and so
// does ReSync (active low) in any mode.  Column count, channel count, slice
// count and the serial column address follow the PACE description; queue
// depth, gap length, slice choice, bit order and error code are this
// design's choices.
module pace_am_ctrl #(
  parameter int unsigned NCOL   = 160,
  parameter int unsigned NCHAN  = 36,
  parameter int unsigned NSLICE = 3,
  parameter int unsigned QDEPTH = 8,
  parameter int unsigned GAP    = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       resync_n,
  input  logic       lv1,
  input  logic [1:0] mode,
  input  logic [7:0] latency,
  output logic       data_valid,
  output logic       col_addr,
  output logic       fifo_full,
  output logic       ana_valid,
  output logic [7:0] ana_col,
  output logic [5:0] ana_ch
);
  import preshower_pkg::*;

  typedef enum logic [1:0] {Q_IDLE, Q_COL, Q_GAP} seq_e;

  logic        run, hold;
  logic [7:0]  wptr;
  logic [7:0]  tag_in, q_head;
  logic        q_empty, q_full, q_pop, q_push;
  logic [$clog2(QDEPTH+1)-1:0] q_count;

  seq_e        seq;
  logic [7:0]  cur_tag;
  logic [1:0]  slice;
  logic [6:0]  cnt;      // clock within a column: sample = cnt[6:1]
  logic [3:0]  gcnt;
  logic        err_pend, send_err;
  logic [7:0]  col_now, col_tx;
  logic [5:0]  samp;

  assign run  = (mode == PACE_RUN) && resync_n;
  assign hold = !run;

  // tagged column = write pointer - latency (mod NCOL)
  assign tag_in = (wptr >= latency) ? wptr - latency : 8'(wptr + 8'(NCOL) - latency);
  assign q_push = run && lv1 && !q_full;
  assign q_pop  = (seq == Q_IDLE) && !q_empty && run;

  sync_fifo #(.WIDTH(8), .DEPTH(QDEPTH)) u_ptrq (
    .clk, .rst_n, .clr(hold), .wr_en(q_push), .wr_data(tag_in),
    .rd_en(q_pop), .rd_data(q_head), .count(q_count), .empty(q_empty), .full(q_full));

  assign fifo_full = q_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    wptr <= '0;
    else if (hold) wptr <= '0;
    else           wptr <= (wptr == 8'(NCOL - 1)) ? '0 : wptr + 1'b1;
  end

  // readout sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seq <= Q_IDLE; cur_tag <= '0; slice <= '0; cnt <= '0; gcnt <= '0;
      err_pend <= 1'b0; send_err <= 1'b0;
    end else if (hold) begin
      seq <= Q_IDLE; cur_tag <= '0; slice <= '0; cnt <= '0; gcnt <= '0;
      err_pend <= 1'b0; send_err <= 1'b0;
    end else begin
      if (lv1 && q_full) err_pend <= 1'b1;
      unique case (seq)
        Q_IDLE: if (q_pop) begin
          cur_tag <= q_head;
          slice   <= '0;
          cnt     <= '0;
          seq     <= Q_COL;
          if (err_pend && !(lv1 && q_full)) err_pend <= 1'b0;
          send_err <= err_pend;
        end
        Q_COL: begin
          if (cnt == 7'(2 * NCHAN - 1)) begin
            cnt      <= '0;
            gcnt     <= '0;
            seq      <= Q_GAP;
            send_err <= 1'b0;
          end else cnt <= cnt + 1'b1;
        end
        Q_GAP: begin
          if (gcnt == 4'(GAP - 1)) begin
            if (slice == 2'(NSLICE - 1)) seq <= Q_IDLE;
            else begin
              slice <= slice + 1'b1;
              seq   <= Q_COL;
            end
          end else gcnt <= gcnt + 1'b1;
        end
        default: seq <= Q_IDLE;
      endcase
    end
  end

  always_comb begin
    logic [8:0] c;
    c       = 9'(cur_tag) + 9'(slice);
    col_now = (c >= 9'(NCOL)) ? 8'(c - 9'(NCOL)) : c[7:0];
  end

  assign samp       = cnt[6:1];
  assign col_tx     = send_err ? PACE_ERR_COL : col_now;
  assign data_valid = (seq == Q_COL);
  assign col_addr   = (seq == Q_COL) && (samp < 6'd8) && col_tx[3'd7 - samp[2:0]];
  assign ana_valid  = (seq == Q_COL);
  assign ana_col    = col_now;
  assign ana_ch     = samp;

endmodule
