// I2C slave with an 8-bit register interface, shared by the K-chip and the
// PACE_AM.
//
// Transactions are single-byte with 7-bit addressing:
//   write: S | dev_addr W | A | reg | A | data | A | P
//   read : S | dev_addr W | A | reg | A | Sr | dev_addr R | A | data | NA | P
// (the combined format).  A second data byte in a write is not acknowledged,
// multiple-byte transfers are not supported.  SCL and SDA are oversampled by
// the system clock through two flip-flops, so the bus must be much slower than
// clk (standard 100 kHz against 40 MHz).  SDA is open drain: sda_oe = 1 pulls
// the line low.
//
// Register side: reg_we pulses for one clock with reg_addr/reg_wdata once the
// data byte has been received.  reg_re pulses for one clock when a read
// address has been acknowledged; reg_rdata is sampled at the end of that
// acknowledge bit, at least half an SCL period later, and then shifted out.
module i2c_slave (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [6:0] dev_addr,
  input  logic       scl,
  input  logic       sda_in,
  output logic       sda_oe,
  output logic [7:0] reg_addr,
  output logic [7:0] reg_wdata,
  output logic       reg_we,
  output logic       reg_re,
  input  logic [7:0] reg_rdata
);
  typedef enum logic [3:0] {
    ST_IDLE, ST_ADDR, ST_ADDR_ACK, ST_REG, ST_REG_ACK,
    ST_WDATA, ST_WDATA_ACK, ST_RDATA, ST_RDATA_ACK, ST_WAIT
  } state_e;

  state_e     state;
  logic [2:0] scl_s, sda_s;   // synchronisers + previous value
  logic       scl_rise, scl_fall, start_c, stop_c;
  logic [3:0] bit_cnt;
  logic [7:0] shreg, txbyte;
  logic       rw;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scl_s <= 3'b111;
      sda_s <= 3'b111;
    end else begin
      scl_s <= {scl_s[1:0], scl};
      sda_s <= {sda_s[1:0], sda_in};
    end
  end

  assign scl_rise = scl_s[1] & ~scl_s[2];
  assign scl_fall = ~scl_s[1] & scl_s[2];
  assign start_c  = scl_s[1] & scl_s[2] & ~sda_s[1] & sda_s[2];
  assign stop_c   = scl_s[1] & scl_s[2] & sda_s[1] & ~sda_s[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= ST_IDLE;
      bit_cnt   <= '0;
      shreg     <= '0;
      txbyte    <= '0;
      rw        <= 1'b0;
      sda_oe    <= 1'b0;
      reg_addr  <= '0;
      reg_wdata <= '0;
      reg_we    <= 1'b0;
      reg_re    <= 1'b0;
    end else begin
      reg_we <= 1'b0;
      reg_re <= 1'b0;
      if (start_c) begin
        state   <= ST_ADDR;
        bit_cnt <= '0;
        sda_oe  <= 1'b0;
      end else if (stop_c) begin
        state  <= ST_IDLE;
        sda_oe <= 1'b0;
      end else begin
        unique case (state)
          ST_IDLE, ST_WAIT: sda_oe <= 1'b0;

          ST_ADDR, ST_REG, ST_WDATA: begin
            if (scl_rise) begin
              shreg   <= {shreg[6:0], sda_s[1]};
              bit_cnt <= bit_cnt + 1'b1;
            end else if (scl_fall && bit_cnt == 4'd8) begin
              bit_cnt <= '0;
              if (state == ST_ADDR) begin
                if (shreg[7:1] == dev_addr) begin
                  rw     <= shreg[0];
                  sda_oe <= 1'b1;
                  reg_re <= shreg[0];
                  state  <= ST_ADDR_ACK;
                end else begin
                  state <= ST_WAIT;
                end
              end else if (state == ST_REG) begin
                reg_addr <= shreg;
                sda_oe   <= 1'b1;
                state    <= ST_REG_ACK;
              end else begin
                reg_wdata <= shreg;
                reg_we    <= 1'b1;
                sda_oe    <= 1'b1;
                state     <= ST_WDATA_ACK;
              end
            end
          end

          ST_ADDR_ACK: if (scl_fall) begin
            if (rw) begin
              txbyte  <= reg_rdata;
              sda_oe  <= ~reg_rdata[7];
              bit_cnt <= '0;
              state   <= ST_RDATA;
            end else begin
              sda_oe <= 1'b0;
              state  <= ST_REG;
            end
          end

          ST_REG_ACK: if (scl_fall) begin
            sda_oe <= 1'b0;
            state  <= ST_WDATA;
          end

          ST_WDATA_ACK: if (scl_fall) begin
            sda_oe <= 1'b0;
            state  <= ST_WAIT;
          end

          ST_RDATA: if (scl_fall) begin
            if (bit_cnt == 4'd7) begin
              sda_oe <= 1'b0;
              state  <= ST_RDATA_ACK;
            end else begin
              sda_oe  <= ~txbyte[3'd6 - bit_cnt[2:0]];
              bit_cnt <= bit_cnt + 1'b1;
            end
          end

          ST_RDATA_ACK: if (scl_rise) state <= ST_WAIT;

          default: state <= ST_IDLE;
        endcase
      end
    end
  end

endmodule
