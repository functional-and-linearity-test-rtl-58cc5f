// tb_optical_rx: self-checking test of the optical link receiver.
// A tunnel-card model sends good packets, a packet with a corrupted word,
// one with an 8b/10b code error, a short and a long packet, and a loss of
// synchronisation. Every FIFO write is compared with the expected tagged
// words, including the one-clock latency from the bus.
module tb_optical_rx;
  import blecft_pkg::*;
  typedef logic [15:0] words_t [20];
  logic clk = 0, rst = 1;
  logic [15:0] rx_data;
  logic rx_dv, rx_er, fifo_wr, link_up;
  rx_word_t fifo_data;
  int checks = 0, failures = 0;
  rx_word_t got [$];

  always #12.5 clk = ~clk;

  tunnel_card_model card (.clk, .data(rx_data), .dv(rx_dv), .er(rx_er));
  optical_rx dut (.rx_clk(clk), .rx_rst(rst), .rx_data, .rx_dv, .rx_er, .fifo_wr, .fifo_data, .link_up);

  always @(posedge clk) if (fifo_wr) got.push_back(fifo_data);

  // latency: a word on the bus at edge n is written at edge n+1
  logic [15:0] d_q;
  logic        dv_q;
  always @(posedge clk) begin
    if (fifo_wr && !fifo_data.len_err) begin
      checks++;
      if (!dv_q || fifo_data.data != d_q) begin failures++; $display("FAIL: latency/data"); end
    end
    d_q <= rx_data; dv_q <= rx_dv;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic expect_packet(words_t w, int n, bit crc_e, bit code_e, bit len_e, string name);
    int exp_n = (n > 20 ? 20 : n) + (len_e ? 1 : 0);
    check(got.size() == exp_n, $sformatf("%s: %0d entries, expected %0d", name, got.size(), exp_n));
    for (int i = 0; i < got.size() && i < 20 && i < n; i++) begin
      check(got[i].data == w[i], $sformatf("%s: word %0d", name, i));
      check(got[i].sop == (i == 0), $sformatf("%s: sop %0d", name, i));
      check(got[i].eop == (i == 19), $sformatf("%s: eop %0d", name, i));
    end
    if (n >= 20 && got.size() >= 20) begin
      check(got[19].crc_err == crc_e, $sformatf("%s: crc flag", name));
      check(got[19].code_err == code_e, $sformatf("%s: code flag", name));
    end
    if (len_e) check(got.size() == exp_n && got[exp_n-1].eop && got[exp_n-1].len_err, $sformatf("%s: length marker", name));
    got.delete();
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    words_t w;
    logic [15:0] cnt [8];
    logic [11:0] adc [8];
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (25) @(posedge clk);
    check(link_up, "link up after idles");
    for (int p = 0; p < 5; p++) begin
      for (int i = 0; i < 8; i++) begin cnt[i] = 16'($urandom); adc[i] = 12'($urandom); end
      w = card.make_packet(16'h00A5, 16'(p), $urandom, cnt, adc);
      card.send(w);
      repeat (2) @(posedge clk);
      expect_packet(w, 20, 0, 0, 0, $sformatf("good %0d", p));
    end
    // corrupted word after the CRC was computed
    w[7] ^= 16'h0100;
    card.send(w); repeat (2) @(posedge clk);
    expect_packet(w, 20, 1, 0, 0, "crc");
    // code error on word 9
    w = card.make_packet(16'h00A5, 16'd9, 32'h0, cnt, adc);
    card.send(w, 20, 9); repeat (2) @(posedge clk);
    expect_packet(w, 20, 0, 1, 0, "code");
    // short packet
    card.send(w, 12); repeat (2) @(posedge clk);
    expect_packet(w, 12, 0, 0, 1, "short");
    // long packet: first twenty words as usual, then one marker
    card.send(w, 23); repeat (2) @(posedge clk);
    expect_packet(w, 23, 0, 0, 1, "long");
    // loss of synchronisation
    card.lose_sync(3);
    @(posedge clk);
    check(!link_up, "link down after loss of sync");
    repeat (20) @(posedge clk);
    check(link_up, "link back up");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
