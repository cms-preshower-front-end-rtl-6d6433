// I2C bus master for simulation: single-byte register writes and
// combined-format register reads.  HALF is half an SCL period in time units.
module i2c_bfm #(
  parameter int HALF = 80
) (
  output logic scl,
  output logic sda_oe,   // 1 pulls SDA low
  input  logic sda
);
  localparam int Q = HALF / 4;

  initial begin
    scl    = 1'b1;
    sda_oe = 1'b0;
  end

  task automatic start_c();
    sda_oe = 1'b0; #HALF;
    scl = 1'b1;    #HALF;
    sda_oe = 1'b1; #HALF;
    scl = 1'b0;    #Q;
  endtask

  task automatic stop_c();
    sda_oe = 1'b1; #HALF;
    scl = 1'b1;    #HALF;
    sda_oe = 1'b0; #HALF;
  endtask

  task automatic send(input logic [7:0] b, output bit ack);
    for (int i = 7; i >= 0; i--) begin
      sda_oe = ~b[i]; #HALF;
      scl = 1'b1;     #HALF;
      scl = 1'b0;     #Q;
    end
    sda_oe = 1'b0; #HALF;
    scl = 1'b1;
    ack = !sda;    #HALF;
    scl = 1'b0;    #Q;
  endtask

  task automatic recv(output logic [7:0] b);
    sda_oe = 1'b0;
    for (int i = 7; i >= 0; i--) begin
      #HALF;
      scl = 1'b1;
      b[i] = sda;
      #HALF;
      scl = 1'b0; #Q;
    end
    sda_oe = 1'b0; #HALF;   // NACK: single byte
    scl = 1'b1;    #HALF;
    scl = 1'b0;    #Q;
  endtask

  // returns 1 when every byte was acknowledged
  task automatic write(input logic [6:0] dev, input logic [7:0] ra, input logic [7:0] d, output bit ok);
    bit a0, a1, a2;
    start_c();
    send({dev, 1'b0}, a0);
    send(ra, a1);
    send(d, a2);
    stop_c();
    ok = a0 && a1 && a2;
  endtask

  task automatic read(input logic [6:0] dev, input logic [7:0] ra, output logic [7:0] d, output bit ok);
    bit a0, a1, a2;
    start_c();
    send({dev, 1'b0}, a0);
    send(ra, a1);
    start_c();             // repeated start (SCL is low here)
    send({dev, 1'b1}, a2);
    recv(d);
    stop_c();
    ok = a0 && a1 && a2;
  endtask

endmodule
