// Reference model shared by the testbenches: the test pattern the ADC model
// produces, an independent CRC-16 and the expected link packet.
package tb_pkg;

  // ADC code the model returns for channel ch of column col of PACE p.
  function automatic logic [11:0] adc_code(input int p, input int col, input int ch);
    int v;
    v = (p * 977) ^ (col * 29) ^ (ch * 131) ^ 12'h5A3;
    return 12'(v + p + ch);
  endfunction

  // CRC-16 (x^16 + x^15 + x^2 + 1), MSB first, written with an explicit
  // polynomial bit list rather than a mask constant.
  function automatic logic [15:0] crc_step(input logic [15:0] c, input logic [15:0] w);
    logic [15:0] r;
    logic fb;
    r = c;
    for (int i = 15; i >= 0; i--) begin
      fb = r[15] ^ w[i];
      r  = r << 1;
      if (fb) begin
        r[0]  = ~r[0];
        r[2]  = ~r[2];
        r[15] = ~r[15];
      end
    end
    return r;
  endfunction

  localparam logic [15:0] T_SOF = 16'hFCFC;
  localparam logic [15:0] T_EOF = 16'hFDFD;

  // Expected packet.  addr: column addresses sent, dcol: columns whose data
  // the ADC delivered (they differ only when a PACE sends its error code).
  // tdata: link-test data, used when test = 1.
  function automatic void build_pkt(
      ref logic [15:0] pkt[$],
      input logic [7:0] ec8, input logic [3:0] kid, input logic [11:0] bc,
      input logic [7:0] addr[3][4], input int dcol[3][4],
      input bit empty, input bit test, input logic [11:0] tdata[4][108]);
    logic [15:0] crc;
    logic [3:0]  pos;
    bit          perr;
    logic [7:0]  ctl;
    logic [47:0] g;
    logic [15:0] st;
    pkt.delete();
    pos  = '0;
    perr = 0;
    ctl  = {5'b0, empty, 1'b0, test};
    pkt.push_back(T_SOF);
    pkt.push_back({ctl, ec8});
    pkt.push_back({kid, bc});
    if (!empty) begin
      for (int s = 0; s < 3; s++) begin
        if (test) begin
          pkt.push_back(16'h0); pkt.push_back(16'h0);
        end else begin
          pkt.push_back({addr[s][0], addr[s][1]});
          pkt.push_back({addr[s][2], addr[s][3]});
          for (int i = 0; i < 4; i++) begin
            int eq = 0;
            for (int j = 0; j < 4; j++) if (j != i && addr[s][j] == addr[s][i]) eq++;
            if (eq < 2) pos[i] = 1'b1;
            if (addr[s][i] >= 160) perr = 1;
          end
        end
        for (int k = 0; k < 36; k++) begin
          for (int p = 0; p < 4; p++)
            g[47 - 12*p -: 12] = test ? tdata[p][36*s + k] : adc_code(p, dcol[s][p], k);
          pkt.push_back(g[47:32]); pkt.push_back(g[31:16]); pkt.push_back(g[15:0]);
        end
      end
    end
    st = {8'h00, (|pos) | perr | empty, pos, empty, perr, test};
    pkt.push_back(st);
    crc = 16'h0;
    for (int i = 1; i < pkt.size(); i++) crc = crc_step(crc, pkt[i]);
    pkt.push_back(crc);
    pkt.push_back(T_EOF);
  endfunction

endpackage
