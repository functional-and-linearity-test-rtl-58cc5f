// tunnel_card_model: behavioural model of a tunnel card and its TLK1501
// receiver, as seen on the 16-bit parallel receive interface.
// make_packet builds the twenty words of a packet (layout of blecft_pkg)
// with its CRC-32, computed here bit by bit from the message. send puts
// words on the bus with RX_DV high, optionally marks one word with RX_ER
// (8b/10b code error), and then sends idles. lose_sync drives the
// RX_DV=0/RX_ER=1 loss-of-synchronisation code.
module tunnel_card_model (
  input  logic        clk,
  output logic [15:0] data,
  output logic        dv,
  output logic        er
);
  typedef logic [15:0] pkt_t [20];

  initial begin data = '0; dv = 1'b0; er = 1'b0; end

  function automatic logic [31:0] crc_of(pkt_t w, int n);
    logic [31:0] c = 32'hFFFF_FFFF;
    for (int i = 0; i < n; i++)
      for (int b = 15; b >= 0; b--) begin
        logic fb = c[31] ^ w[i][b];
        c = {c[30:0], 1'b0};
        if (fb) c = c ^ 32'h04C1_1DB7;
      end
    return c;
  endfunction

  function automatic pkt_t make_packet(logic [15:0] card, logic [15:0] pid, logic [31:0] status,
                                       logic [15:0] cnt [8], logic [11:0] adc [8]);
    pkt_t w;
    logic [95:0] ab;
    logic [31:0] c;
    w[0] = card; w[1] = pid; w[2] = status[31:16]; w[3] = status[15:0];
    for (int i = 0; i < 8; i++) w[4 + i] = cnt[i];
    for (int i = 0; i < 8; i++) ab[95 - 12*i -: 12] = adc[i];
    for (int i = 0; i < 6; i++) w[12 + i] = ab[95 - 16*i -: 16];
    c = crc_of(w, 18);
    w[18] = c[31:16]; w[19] = c[15:0];
    return w;
  endfunction

  task automatic send(pkt_t w, int nwords = 20, int err_word = -1, int idle = 4);
    for (int i = 0; i < nwords; i++) begin
      @(posedge clk);
      data <= w[i % 20];
      dv   <= 1'b1;
      er   <= (i == err_word);
    end
    for (int i = 0; i < idle; i++) begin
      @(posedge clk);
      data <= 16'hC5BC; dv <= 1'b0; er <= 1'b0;
    end
  endtask

  task automatic lose_sync(int cycles);
    for (int i = 0; i < cycles; i++) begin
      @(posedge clk);
      data <= 16'hFFFF; dv <= 1'b0; er <= 1'b1;
    end
    @(posedge clk);
    dv <= 1'b0; er <= 1'b0;
  endtask
endmodule
