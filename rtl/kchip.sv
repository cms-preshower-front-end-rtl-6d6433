// K-chip: the digital concentrator between four PACE/ADC channels and one
// high-speed readout link.
//
// Data flow: each channel's readout control turns the PACE Data_Valid and
// serial column address into writes of 12-bit ADC samples into an input FIFO
// (IN_DEPTH = 1600 words, about 13 events) and of 8-bit column addresses into
// a column queue.  Every level-1 trigger is stored in the trigger FIFO with
// its event number and bunch crossing.  The builder takes one trigger at a
// time, moves the event's data from the four input FIFOs into the output
// buffer as a 336-word packet (header, three time slots, status, CRC, EOF)
// and the HSL interface streams a complete packet onto the 16-bit link at one
// word per clock.  The output buffer holds one event (OUT_DEPTH = 336); the
// builder stalls when it is full and resumes as the link drains it.
//
// Errors: a trigger that arrives while TRIG FIFO holds EVT_HWM or more events,
// or while a PACE raises FIFO_full, is not read out: it becomes a 6-word
// packet flagged empty.  Column addresses that disagree between channels set
// the POS bits.  Link-test mode (CONFIG bit 7) lets the slow control fill the
// FIFOs through FIFODATA and start a transfer with ECONFIG.STRSRT.
//
// A trigger ignored because of the watermark was still accepted by the
// PACEs, whose data then arrive for it; they are taken for the next trigger,
// so from then on packets are one event out of step until the next General
// Reset.  The trigger supervisor is expected to keep the occupancy below the
// watermark, so this is treated as a loss of synchronisation.
//
// gen_reset (General Reset, from the T1 reset command) clears counters,
// FIFOs and error flags synchronously; rst_n (hardware reset) also clears the
// registers.  Architecture, sizes and register map follow the K-chip
// description; the trigger FIFO depth, the handling of ignored triggers and
// the details noted in the sub-blocks are this design's choices.
module kchip #(
  parameter int unsigned IN_DEPTH     = 1600,
  parameter int unsigned OUT_DEPTH    = 336,
  parameter int unsigned TRIG_DEPTH   = 16,
  parameter int unsigned COLQ_DEPTH   = 48,
  parameter int unsigned EVT_HWM      = 13,
  parameter int unsigned ADC_LAT      = 2,
  parameter int unsigned BX_PER_ORBIT = 3560
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             gen_reset,
  input  logic             lv1,
  input  logic             bc0,
  // PACE / ADC side
  input  logic [3:0]       dv,
  input  logic [3:0]       col_ser,
  input  logic [3:0]       pace_full,
  input  logic [3:0][11:0] adc_data,
  // slow control
  input  logic [6:0]       i2c_addr,
  input  logic             scl,
  input  logic             sda_in,
  output logic             sda_oe,
  // link
  output logic [15:0]      link_data,
  output logic             link_valid
);
  import preshower_pkg::*;

  localparam int unsigned DCW = $clog2(IN_DEPTH + 1);
  localparam int unsigned TCW = $clog2(TRIG_DEPTH + 1);
  localparam int unsigned CCW = $clog2(COLQ_DEPTH + 1);
  localparam int unsigned OCW = $clog2(OUT_DEPTH + 1);

  // ---------------- counters and trigger FIFO ----------------
  logic [11:0] bc;
  logic [15:0] ec;
  logic [15:0] bnch_last;
  logic        test_mode;

  kchip_counters #(.BX_PER_ORBIT(BX_PER_ORBIT)) u_cnt (
    .clk, .rst_n, .clr(gen_reset), .bc0, .lv1, .bc, .ec);

  trig_entry_t        trig_in, trig_head;
  logic [TCW-1:0]     trig_count;
  logic               trig_empty, trig_full, trig_pop, trig_push;

  assign trig_in   = '{empty: (32'(trig_count) >= EVT_HWM) || (|pace_full), ec: ec + 16'd1, bc: bc};
  assign trig_push = lv1 && !test_mode;

  sync_fifo #(.WIDTH(TRIG_W), .DEPTH(TRIG_DEPTH)) u_trig (
    .clk, .rst_n, .clr(gen_reset), .wr_en(trig_push), .wr_data(trig_in),
    .rd_en(trig_pop), .rd_data(trig_head), .count(trig_count), .empty(trig_empty), .full(trig_full));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         bnch_last <= '0;
    else if (gen_reset) bnch_last <= '0;
    else if (lv1)       bnch_last <= {4'h0, bc};
  end

  // ---------------- slow control ----------------
  logic [7:0]  reg_addr, reg_wdata, reg_rdata, kid, status;
  logic        reg_we, reg_re, strsrt;
  logic [2:0]  fifo_map;
  logic        fifo_wr, fifo_rd;
  logic [15:0] fifo_wdata, fifo_rdata;
  logic [3:0]  pos_set;
  logic        perr_set, ign_set, ifovf_set;

  i2c_slave u_i2c (
    .clk, .rst_n, .dev_addr(i2c_addr), .scl, .sda_in, .sda_oe,
    .reg_addr, .reg_wdata, .reg_we, .reg_re, .reg_rdata);

  assign ign_set = trig_push && (trig_full || trig_in.empty);

  kchip_regs u_regs (
    .clk, .rst_n, .clr(gen_reset),
    .reg_addr, .reg_wdata, .reg_we, .reg_re, .reg_rdata,
    .test_mode, .kid, .strsrt,
    .fifo_map, .fifo_wr, .fifo_wdata, .fifo_rd, .fifo_rdata,
    .evcnt(ec), .bnchcnt(bnch_last),
    .pos_set, .ign_set, .perr_set, .ifovf_set, .status);

  // ---------------- input channels ----------------
  logic [3:0][11:0]    d_head;
  logic [3:0][DCW-1:0] d_count;
  logic [3:0]          d_pop, d_full;
  logic [3:0][7:0]     c_head;
  logic [3:0][7:0]     c_count;
  logic [3:0]          c_pop;
  logic [3:0]          ovf_ch;

  for (genvar i = 0; i < 4; i++) begin : g_ch
    logic        rc_we, col_we, d_we;
    logic [11:0] rc_wd, d_wd;
    logic [7:0]  col_wd;
    logic [CCW-1:0] cq_count;
    logic        cq_empty, cq_full, d_empty;
    logic        map_hit;

    assign map_hit = (fifo_map == 3'(i));

    kchip_readout_ctrl #(.NSAMP(NSAMP), .ADC_LAT(ADC_LAT)) u_rc (
      .clk, .rst_n, .clr(gen_reset), .dv(dv[i]), .col_ser(col_ser[i]), .adc_data(adc_data[i]),
      .data_we(rc_we), .data_wd(rc_wd), .col_we, .col_wd);

    assign d_we = test_mode ? (fifo_wr && map_hit) : rc_we;
    assign d_wd = test_mode ? fifo_wdata[11:0] : rc_wd;
    assign ovf_ch[i] = d_we && d_full[i];

    sync_fifo #(.WIDTH(12), .DEPTH(IN_DEPTH)) u_din (
      .clk, .rst_n, .clr(gen_reset), .wr_en(d_we), .wr_data(d_wd),
      .rd_en(d_pop[i] || (fifo_rd && map_hit)), .rd_data(d_head[i]),
      .count(d_count[i]), .empty(d_empty), .full(d_full[i]));

    sync_fifo #(.WIDTH(8), .DEPTH(COLQ_DEPTH)) u_colq (
      .clk, .rst_n, .clr(gen_reset), .wr_en(col_we && !test_mode), .wr_data(col_wd),
      .rd_en(c_pop[i]), .rd_data(c_head[i]), .count(cq_count), .empty(cq_empty), .full(cq_full));

    assign c_count[i] = 8'(cq_count);
  end

  assign ifovf_set = |ovf_ch;

  // ---------------- builder and output buffer ----------------
  logic        o_full, o_we, o_last, o_empty, o_pop, hsl_pop, pkt_done, busy;
  logic [15:0] o_wd;
  logic [16:0] o_head;
  logic [OCW-1:0] o_count;
  logic [4:0]  pkt_cnt;
  logic        reg_o_wr, reg_o_rd, pkt_in;

  kchip_builder #(.CNT_W(DCW), .NCOL(NCOL)) u_build (
    .clk, .rst_n, .clr(gen_reset), .test_mode, .strsrt, .kid, .ec_now(ec), .bc_now(bc),
    .trig_head, .trig_empty, .trig_pop,
    .d_head, .d_count, .d_pop, .c_head, .c_count, .c_pop,
    .o_full, .o_we, .o_wd, .o_last,
    .pos_set, .perr_set, .busy);

  assign reg_o_wr = fifo_wr && fifo_map == 3'd4;
  assign reg_o_rd = fifo_rd && fifo_map == 3'd4;
  assign o_pop    = hsl_pop || reg_o_rd;
  assign pkt_in   = o_we && !o_full && o_last;

  sync_fifo #(.WIDTH(17), .DEPTH(OUT_DEPTH)) u_out (
    .clk, .rst_n, .clr(gen_reset),
    .wr_en(o_we || reg_o_wr),
    .wr_data(o_we ? {o_last, o_wd} : {1'b0, fifo_wdata}),
    .rd_en(o_pop), .rd_data(o_head), .count(o_count), .empty(o_empty), .full(o_full));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         pkt_cnt <= '0;
    else if (gen_reset) pkt_cnt <= '0;
    else if (pkt_in && !pkt_done) pkt_cnt <= pkt_cnt + 1'b1;
    else if (!pkt_in && pkt_done) pkt_cnt <= pkt_cnt - 1'b1;
  end

  kchip_hsl_if u_hsl (
    .clk, .rst_n, .clr(gen_reset), .pkt_ready(pkt_cnt != '0), .o_empty,
    .o_head(o_head[15:0]), .o_last(o_head[16]), .o_pop(hsl_pop), .pkt_done,
    .link_data, .link_valid);

  always_comb begin
    case (fifo_map)
      3'd0, 3'd1, 3'd2, 3'd3: fifo_rdata = {4'h0, d_head[fifo_map[1:0]]};
      3'd4:                   fifo_rdata = o_head[15:0];
      default:                fifo_rdata = 16'h0000;
    endcase
  end

  // The link may only pop words that are in the output buffer, and every
  // packet counted as complete must still have its words there.
  assert property (@(posedge clk) disable iff (!rst_n) hsl_pop |-> !o_empty)
    else $error("link popped an empty output buffer");
  assert property (@(posedge clk) disable iff (!rst_n) (pkt_cnt != '0) |-> !o_empty)
    else $error("complete packet counted but output buffer empty");

endmodule
