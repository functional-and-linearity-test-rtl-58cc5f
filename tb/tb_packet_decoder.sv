// tb_packet_decoder: self-checking test of packet assembly and unpacking.
// Feeds tagged words as the link FIFO would (with random gaps), including
// flagged packets and length markers, and checks the unpacked fields
// against the values the packets were built from, the event pulses and
// the one-clock latency after the last word.
module tb_packet_decoder;
  import blecft_pkg::*;
  typedef logic [15:0] words_t [20];
  logic clk = 0, rst = 1;
  logic fifo_empty, fifo_rd, pkt_valid;
  rx_word_t fifo_data;
  pkt_hdr_t hdr;
  cnt_t cnt [NUM_CH];
  adc_t adc [NUM_CH];
  logic [15:0] words [PKT_WORDS];
  logic [NUM_EV-1:0] ev;
  int checks = 0, failures = 0;
  rx_word_t q [$];
  int n_valid = 0, n_ok = 0, n_crc = 0, n_code = 0, n_len = 0;
  logic last_popped_eop = 0;

  always #12.5 clk = ~clk;
  logic [15:0] unused_d; logic unused_dv, unused_er;
  tunnel_card_model card (.clk, .data(unused_d), .dv(unused_dv), .er(unused_er));
  packet_decoder dut (.*);

  // FIFO model with random gaps
  // the FIFO outputs change only on the falling edge, away from the
  // rising edge where the decoder samples them
  always @(negedge clk) begin
    fifo_empty <= (q.size() == 0) || ($urandom_range(0, 3) == 0);
    fifo_data  <= (q.size() != 0) ? q[0] : '0;
  end
  always @(posedge clk) begin
    last_popped_eop <= 0;
    if (fifo_rd && !fifo_empty) begin
      last_popped_eop <= q[0].eop && !q[0].len_err;
      void'(q.pop_front());
    end
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) begin
    if (!rst && pkt_valid) n_valid++;
    if (!rst && ev[EV_OK]) n_ok++;
    if (!rst && ev[EV_CRC]) n_crc++;
    if (!rst && ev[EV_CODE]) n_code++;
    if (!rst && ev[EV_LEN]) n_len++;
    if (!rst) begin
      checks++;
      if (pkt_valid != last_popped_eop) begin failures++; $display("FAIL: pkt_valid timing"); end
    end
  end

  task automatic push(words_t w, int n, bit crc_e, bit code_e, bit marker);
    for (int i = 0; i < n; i++) begin
      rx_word_t e = '0;
      e.data = w[i]; e.sop = (i == 0); e.eop = (i == 19);
      if (i == 19) begin e.crc_err = crc_e; e.code_err = code_e; end
      q.push_back(e);
    end
    if (marker) begin rx_word_t e = '0; e.eop = 1; e.len_err = 1; q.push_back(e); end
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
    logic [15:0] c [8];
    logic [11:0] a [8];
    logic [31:0] st;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int p = 0; p < 6; p++) begin
      for (int i = 0; i < 8; i++) begin c[i] = 16'($urandom); a[i] = 12'($urandom); end
      st = $urandom;
      w = card.make_packet(16'h1234 + 16'(p), 16'(100 + p), st, c, a);
      push(w, 20, p == 3, p == 4, 0);
      fork : wait_pkt
        @(posedge clk iff pkt_valid);
        repeat (200) @(posedge clk);
      join_any
      disable wait_pkt;
      check(pkt_valid, $sformatf("packet %0d presented", p));
      check(hdr.card_id == 16'h1234 + 16'(p), "card id");
      check(hdr.pkt_id == 16'(100 + p), "packet id");
      check(hdr.status == st, "status");
      check(hdr.crc_err == (p == 3) && hdr.code_err == (p == 4), "flags");
      for (int i = 0; i < 8; i++) begin
        check(cnt[i] == c[i], $sformatf("counter %0d", i));
        check(adc[i] == a[i], $sformatf("adc %0d", i));
      end
      for (int i = 0; i < 20; i++) check(words[i] == w[i], "raw word");
    end
    // short packet with marker, then a marker after a long packet
    push(w, 7, 0, 0, 1);
    push(w, 20, 0, 0, 1);
    repeat (100) @(posedge clk);
    check(n_valid == 7, $sformatf("presented %0d packets", n_valid));
    check(n_ok == 5 && n_crc == 1 && n_code == 1 && n_len == 2,
          $sformatf("events ok=%0d crc=%0d code=%0d len=%0d", n_ok, n_crc, n_code, n_len));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
