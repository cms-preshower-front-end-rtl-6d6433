// Trigger command decoder for the T1 line.
//
// Fast commands travel on T1 as three consecutive bits, the first of which is
// always 1: 100 = level-1 accept, 110 = test (calibration) pulse, 101 = reset
// of the front-end pipelines, 111 = bunch crossing zero.  While idle the
// decoder waits for a 1; it then collects the next two bits and, on the clock
// after the third bit, raises exactly one of the four outputs for one cycle.
// Decoding therefore costs three clock cycles of latency from the first bit
// (bit sampled at edge n, pulse visible after edge n+3).  The code table is
// the Preshower assignment; the idle-wait framing is this design's reading.
module t1_decoder (
  input  logic clk,
  input  logic rst_n,
  input  logic t1,
  output logic lv1a,
  output logic test_pulse,
  output logic fe_reset,
  output logic bc0
);
  import preshower_pkg::*;

  logic [1:0] cnt;     // 0 idle, 1 and 2: collecting bits 2 and 3
  logic [1:0] bits;    // bits 2 and 3 of the command
  logic       done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      bits <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      case (cnt)
        2'd0: if (t1) cnt <= 2'd1;
        2'd1: begin bits[1] <= t1; cnt <= 2'd2; end
        default: begin bits[0] <= t1; cnt <= 2'd0; done <= 1'b1; end
      endcase
    end
  end

  logic [2:0] cmd;
  assign cmd = {1'b1, bits};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lv1a <= 1'b0; test_pulse <= 1'b0; fe_reset <= 1'b0; bc0 <= 1'b0;
    end else begin
      lv1a       <= done && (cmd == T1_LV1A);
      test_pulse <= done && (cmd == T1_TEST);
      fe_reset   <= done && (cmd == T1_RESET);
      bc0        <= done && (cmd == T1_BC0);
    end
  end

endmodule
