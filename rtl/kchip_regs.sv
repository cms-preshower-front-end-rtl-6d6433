// K-chip user registers, reached through the I2C slave.
//
//   0  CONFIG     R/W  bit 7 Mode: 0 normal read-out, 1 link test
//   1  ECONFIG    W    bit 7 CLPOS clears the POS bits of STATUS,
//                      bit 0 STRSRT starts a link-test transfer; reads 0
//   2  KID        R/W  K-chip ID
//   4  STATUS     RO   7 GERR, 6:3 POS3..POS0, 2 trigger ignored,
//                      1 PACE error code seen, 0 input FIFO overflow
//   5  FIFOMAP    R/W  bits 2:0: 0-3 input FIFO 0-3, 4 output FIFO
//   6  FIFODATA_H R/W  link-test FIFO access, bits 15:8
//   7  FIFODATA_L R/W  bits 7:0; writing it pushes {H, L} into the FIFO
//   8,9   EVCNT_H/L    RO  event counter
//   10,11 BNCHCNT_H/L  RO  bunch counter of the last trigger
// FIFODATA is active only in link-test mode.  Reading FIFODATA_H pops the
// mapped FIFO and returns the high byte of its head, FIFODATA_L then returns
// the low byte of that word.  Reading EVCNT_H or BNCHCNT_H latches the low byte
// for the following read of the _L register.  STATUS bits 6:0 are sticky
// (set by the *_set inputs) and cleared by the General Reset; CLPOS clears the
// POS bits only.  The register map and CONFIG/ECONFIG/STATUS bits 7:3 follow
// the K-chip register description; STATUS bits 2:0 and the read-latching rule
// are this design's additions.  Writable registers reset only on rst_n.
module kchip_regs (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clr,
  // from the I2C slave
  input  logic [7:0]  reg_addr,
  input  logic [7:0]  reg_wdata,
  input  logic        reg_we,
  input  logic        reg_re,
  output logic [7:0]  reg_rdata,
  // configuration
  output logic        test_mode,
  output logic [7:0]  kid,
  output logic        strsrt,
  // link-test FIFO access
  output logic [2:0]  fifo_map,
  output logic        fifo_wr,
  output logic [15:0] fifo_wdata,
  output logic        fifo_rd,
  input  logic [15:0] fifo_rdata,
  // counters and errors
  input  logic [15:0] evcnt,
  input  logic [15:0] bnchcnt,
  input  logic [3:0]  pos_set,
  input  logic        ign_set,
  input  logic        perr_set,
  input  logic        ifovf_set,
  output logic [7:0]  status
);
  import preshower_pkg::*;

  logic [7:0] config_r;
  logic [7:0] fifod_h;
  logic [7:0] rd_lo;       // latched low byte for 16-bit reads
  logic [3:0] pos;
  logic       ign, perr, ifovf;

  assign test_mode = config_r[7];
  assign status    = {(|pos) | ign | perr | ifovf, pos[3], pos[2], pos[1], pos[0], ign, perr, ifovf};

  assign strsrt     = reg_we && reg_addr == KREG_ECONFIG && reg_wdata[0] && test_mode;
  assign fifo_wr    = reg_we && reg_addr == KREG_FIFOD_L && test_mode;
  assign fifo_wdata = {fifod_h, reg_wdata};
  assign fifo_rd    = reg_re && reg_addr == KREG_FIFOD_H && test_mode;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      config_r <= '0;
      kid      <= '0;
      fifo_map <= '0;
      fifod_h  <= '0;
      rd_lo    <= '0;
    end else begin
      if (reg_we) begin
        case (reg_addr)
          KREG_CONFIG:  config_r <= reg_wdata;
          KREG_KID:     kid      <= reg_wdata;
          KREG_FIFOMAP: fifo_map <= reg_wdata[2:0];
          KREG_FIFOD_H: fifod_h  <= reg_wdata;
          default: ;
        endcase
      end
      if (reg_re) begin
        case (reg_addr)
          KREG_FIFOD_H: rd_lo <= test_mode ? fifo_rdata[7:0] : 8'h00;
          KREG_EVCNT_H: rd_lo <= evcnt[7:0];
          KREG_BNCH_H:  rd_lo <= bnchcnt[7:0];
          default: ;
        endcase
      end
    end
  end

  // sticky error flags
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos <= '0; ign <= 1'b0; perr <= 1'b0; ifovf <= 1'b0;
    end else if (clr) begin
      pos <= '0; ign <= 1'b0; perr <= 1'b0; ifovf <= 1'b0;
    end else begin
      if (reg_we && reg_addr == KREG_ECONFIG && reg_wdata[7]) pos <= pos_set;
      else                                                  pos <= pos | pos_set;
      ign   <= ign   | ign_set;
      perr  <= perr  | perr_set;
      ifovf <= ifovf | ifovf_set;
    end
  end

  // read data, held from the reg_re strobe until the I2C slave samples it
  logic [7:0] rdata_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rdata_q <= '0;
    else if (reg_re) begin
      case (reg_addr)
        KREG_CONFIG:  rdata_q <= config_r;
        KREG_ECONFIG: rdata_q <= 8'h00;
        KREG_KID:     rdata_q <= kid;
        KREG_STATUS:  rdata_q <= status;
        KREG_FIFOMAP: rdata_q <= {5'b0, fifo_map};
        KREG_FIFOD_H: rdata_q <= test_mode ? fifo_rdata[15:8] : 8'h00;
        KREG_FIFOD_L: rdata_q <= rd_lo;
        KREG_EVCNT_H: rdata_q <= evcnt[15:8];
        KREG_EVCNT_L: rdata_q <= rd_lo;
        KREG_BNCH_H:  rdata_q <= bnchcnt[15:8];
        KREG_BNCH_L:  rdata_q <= rd_lo;
        default:      rdata_q <= 8'h00;
      endcase
    end
  end
  assign reg_rdata = rdata_q;

endmodule
