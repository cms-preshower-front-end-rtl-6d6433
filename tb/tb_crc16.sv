// Self-checking testbench of crc16.
//
// Random 16-bit words are fed with random gaps; the register is compared with
// the bit-serial reference in tb_pkg after every word, and init must return
// it to zero.  The reference also has a known value: the CRC-16 with
// polynomial 0x8005, initial value 0, no reflection, of the bytes "12345678"
// taken as four words MSB first, is computed bytewise from the standard
// table-free definition and compared with the word-wise result.
module tb_crc16;
  import tb_pkg::*;
  logic clk = 0, rst_n = 1, init = 0, en = 0;
  logic [15:0] data = 0, crc;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  crc16 dut (.clk, .rst_n, .init, .en, .data, .crc);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // bytewise CRC: each byte shifted in MSB first
  function automatic logic [15:0] crc_bytes(input logic [7:0] b[$]);
    logic [15:0] r;
    r = 0;
    foreach (b[i])
      for (int k = 7; k >= 0; k--) begin
        logic fb;
        fb = r[15] ^ b[i][k];
        r = {r[14:0], 1'b0} ^ (fb ? 16'h8005 : 16'h0000);
      end
    return r;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] m;
    logic [7:0]  s[$];
    int bad;
    bad = 0;
    #1 rst_n = 0;   // falling edge: apply the asynchronous reset
    repeat (3) @(negedge clk);
    rst_n = 1;
    check(crc == 0, "zero after reset");
    // known string
    s = '{8'h31, 8'h32, 8'h33, 8'h34, 8'h35, 8'h36, 8'h37, 8'h38};
    for (int i = 0; i < 4; i++) begin
      en = 1; data = {s[2*i], s[2*i+1]}; @(negedge clk);
    end
    en = 0;
    check(crc == crc_bytes(s), $sformatf("CRC of \"12345678\" %h vs %h", crc, crc_bytes(s)));
    init = 1; @(negedge clk); init = 0;
    check(crc == 0, "init clears");
    // random words with gaps, one result per clock
    m = 0;
    for (int i = 0; i < 3000; i++) begin
      en = $urandom % 2; data = 16'($urandom);
      if (en) m = crc_step(m, data);
      @(negedge clk);
      if (crc != m) bad++;
    end
    en = 0;
    check(bad == 0, $sformatf("random words: %0d mismatches", bad));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
