// K-chip control logic, input multiplexer and 12-to-16-bit packer.
//
// Builds one link packet per trigger into the output buffer:
//   word 0         SOF
//   word 1         {control field, event counter[7:0]}
//   word 2         {K-chip ID[3:0], bunch counter[11:0]}
//   3 time slots:  {colA, colB}, {colC, colD}, then 108 data words holding
//                  the samples in the order A1 B1 C1 D1 A2 ... D36, packed
//                  MSB first, four 12-bit samples in three 16-bit words
//   status word    (preshower_pkg::evt_status_t)
//   CRC word       CRC-16 over words 1 .. status
//   EOF
// giving 336 words.  A trigger that the K-chip had to ignore (entry flagged
// empty) gives a 6-word packet, header + trailer, with no payload and nothing
// read from the input FIFOs.
//
// Normal mode: a build starts when the trigger FIFO is not empty and every
// channel holds a complete event (3 column addresses, 108 samples), so a
// build never waits for input.  Link-test mode: the trigger FIFO is left
// alone; a build starts after an STRSRT strobe once every input FIFO holds
// 108 words, with zero column addresses and the current counters in the
// header.  Each word is written when the output buffer is not full; when it
// is full the builder stalls.  While the column addresses of a slot are
// written the four are compared: a channel whose address is shared by fewer
// than two of the other three is out of sequence (pos_set), and an address
// of NCOL or more is the PACE error code (perr_set).
// Layout and the rules above follow the packet description; bit packing
// order, SOF/EOF values, control and status bit meanings are this design's.
module kchip_builder #(
  parameter int unsigned CNT_W = 11,   // width of the FIFO count inputs
  parameter int unsigned NCOL  = 160
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clr,
  input  logic                    test_mode,
  input  logic                    strsrt,
  input  logic [7:0]              kid,
  input  logic [15:0]             ec_now,
  input  logic [11:0]             bc_now,
  // trigger FIFO
  input  preshower_pkg::trig_entry_t trig_head,
  input  logic                    trig_empty,
  output logic                    trig_pop,
  // input FIFOs and column-address queues
  input  logic [3:0][11:0]        d_head,
  input  logic [3:0][CNT_W-1:0]   d_count,
  output logic [3:0]              d_pop,
  input  logic [3:0][7:0]         c_head,
  input  logic [3:0][7:0]         c_count,
  output logic [3:0]              c_pop,
  // output buffer
  input  logic                    o_full,
  output logic                    o_we,
  output logic [15:0]             o_wd,
  output logic                    o_last,
  // error reporting
  output logic [3:0]              pos_set,
  output logic                    perr_set,
  output logic                    busy
);
  import preshower_pkg::*;

  typedef enum logic [2:0] {
    S_IDLE, S_HDR, S_COL, S_DATA, S_STAT, S_CRC, S_EOF
  } state_e;

  state_e      state;
  logic [1:0]  hw;        // header word index / col word index / data word in group
  logic [5:0]  grp;       // sample index 0..35
  logic [1:0]  slot;
  trig_entry_t cur;
  logic        cur_test;
  logic [3:0]  evt_pos;
  logic        evt_perr;
  logic        strsrt_pend;
  logic [15:0] crc;
  logic        crc_init, crc_en;

  logic        go;
  logic        advance;
  logic        have_event, have_test_data;
  logic [7:0]  ctl;
  logic [47:0] group_bits;
  logic [3:0]  pos_now;
  logic        perr_now;
  evt_status_t st_word;

  always_comb begin
    have_event     = 1'b1;
    have_test_data = 1'b1;
    for (int i = 0; i < 4; i++) begin
      if (d_count[i] < CNT_W'(SLOT_DATA_WORDS)) begin
        have_event     = 1'b0;
        have_test_data = 1'b0;
      end
      if (c_count[i] < 8'(NSLOT)) have_event = 1'b0;
    end
  end

  // out-of-sequence and PACE error detection on the four column heads
  always_comb begin
    perr_now = 1'b0;
    for (int i = 0; i < 4; i++) begin
      int eq;
      eq = 0;
      for (int j = 0; j < 4; j++)
        if (j != i && c_head[j] == c_head[i]) eq++;
      pos_now[i] = (eq < 2);
      if (32'(c_head[i]) >= NCOL) perr_now = 1'b1;
    end
  end

  assign group_bits = {d_head[0], d_head[1], d_head[2], d_head[3]};

  always_comb begin
    ctl = '0;
    ctl[CTL_TEST]  = cur_test;
    ctl[CTL_EMPTY] = cur.empty;
    st_word = '{zero: 8'h00, err: (|evt_pos) | evt_perr | cur.empty,
                pos: evt_pos, empty: cur.empty, pace_err: evt_perr, test: cur_test};
  end

  assign go = (state == S_IDLE) &&
              (test_mode ? (strsrt_pend && have_test_data)
                         : (!trig_empty && (trig_head.empty || have_event)));
  assign trig_pop = go && !test_mode;

  // output word for the current state
  always_comb begin
    o_we   = 1'b0;
    o_wd   = '0;
    o_last = 1'b0;
    unique case (state)
      S_IDLE: ;
      S_HDR: begin
        o_we = 1'b1;
        case (hw)
          2'd0:    o_wd = SOF_WORD;
          2'd1:    o_wd = {ctl, cur.ec[7:0]};
          default: o_wd = {kid[3:0], cur.bc};
        endcase
      end
      S_COL: begin
        o_we = 1'b1;
        if (!cur_test) o_wd = (hw == 2'd0) ? {c_head[0], c_head[1]} : {c_head[2], c_head[3]};
      end
      S_DATA: begin
        o_we = 1'b1;
        case (hw)
          2'd0:    o_wd = group_bits[47:32];
          2'd1:    o_wd = group_bits[31:16];
          default: o_wd = group_bits[15:0];
        endcase
      end
      S_STAT: begin o_we = 1'b1; o_wd = st_word; end
      S_CRC:  begin o_we = 1'b1; o_wd = crc; end
      S_EOF:  begin o_we = 1'b1; o_wd = EOF_WORD; o_last = 1'b1; end
      default: ;
    endcase
  end

  assign advance  = o_we && !o_full;
  assign busy     = (state != S_IDLE);
  assign crc_init = go;
  assign crc_en   = advance && !(state == S_HDR && hw == 2'd0) && (state != S_CRC) && (state != S_EOF);

  always_comb begin
    d_pop    = '0;
    c_pop    = '0;
    pos_set  = '0;
    perr_set = 1'b0;
    if (advance && state == S_DATA && hw == 2'd2) d_pop = 4'hF;
    if (advance && state == S_COL && !cur_test) begin
      if (hw == 2'd1) c_pop = 4'hF;
      if (hw == 2'd0) begin
        pos_set  = pos_now;
        perr_set = perr_now;
      end
    end
  end

  crc16 u_crc (.clk, .rst_n, .init(crc_init), .en(crc_en), .data(o_wd), .crc);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      hw          <= '0;
      grp         <= '0;
      slot        <= '0;
      cur         <= '0;
      cur_test    <= 1'b0;
      evt_pos     <= '0;
      evt_perr    <= 1'b0;
      strsrt_pend <= 1'b0;
    end else if (clr) begin
      state       <= S_IDLE;
      hw          <= '0;
      strsrt_pend <= 1'b0;
    end else begin
      if (strsrt && test_mode) strsrt_pend <= 1'b1;
      if (go) begin
        state    <= S_HDR;
        hw       <= '0;
        slot     <= '0;
        evt_pos  <= '0;
        evt_perr <= 1'b0;
        cur_test <= test_mode;
        if (test_mode) begin
          cur         <= '{empty: 1'b0, ec: ec_now, bc: bc_now};
          strsrt_pend <= 1'b0;
        end else begin
          cur <= trig_head;
        end
      end else if (advance) begin
        unique case (state)
          S_HDR:
            if (hw == 2'd2) begin
              hw    <= '0;
              state <= cur.empty ? S_STAT : S_COL;
            end else hw <= hw + 1'b1;
          S_COL: begin
            if (hw == 2'd0 && !cur_test) begin
              evt_pos  <= evt_pos | pos_now;
              evt_perr <= evt_perr | perr_now;
            end
            if (hw == 2'd1) begin
              hw    <= '0;
              grp   <= '0;
              state <= S_DATA;
            end else hw <= hw + 1'b1;
          end
          S_DATA:
            if (hw == 2'd2) begin
              hw <= '0;
              if (grp == 6'(NSAMP - 1)) begin
                if (slot == 2'(NSLOT - 1)) state <= S_STAT;
                else begin
                  slot  <= slot + 1'b1;
                  state <= S_COL;
                end
              end else grp <= grp + 1'b1;
            end else hw <= hw + 1'b1;
          S_STAT: state <= S_CRC;
          S_CRC:  state <= S_EOF;
          S_EOF:  state <= S_IDLE;
          default: state <= S_IDLE;
        endcase
      end
    end
  end

endmodule
