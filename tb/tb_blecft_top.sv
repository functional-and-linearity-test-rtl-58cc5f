// tb_blecft_top: end-to-end test of the tester FPGA at its default
// parameters.
//
// Two tunnel-card models drive the two optical links (each with its own
// 40 MHz clock, slightly off the FPGA clock), a USB model reads the upload
// FIFO at 33 MHz, the control bus is driven as slow software would drive
// it, and models of the two serial DACs and of the relay/switch latches
// watch the outputs. The test walks through:
//   Frame Mode records of good and flagged packets, dropped frames while
//   the USB reader stalls, a switch to Running Maxima with a cleared
//   history, maxima dumps checked against a software model of the card
//   status words, the running sums (all six windows, eight channels) and
//   the link statistics, a switch of the processed link, an oscilloscope
//   record, the DAC refresh with and without the harmonic generator on one
//   slot, the latch refresh, and a loss of synchronisation of one link
//   that must show in the counters of a last dump. Tag words are checked
//   for the connection state of both links.
// Each mechanism is counted, and one that never happened is a failure.
module tb_blecft_top;
  import blecft_pkg::*;
  typedef logic [15:0] words_t [20];
  localparam int RS_LEN_TB [6] = '{1, 2, 8, 16, 64, 256};

  logic sys_clk = 0, usb_clk = 0, rst_n = 0;
  logic [1:0] rx_clk = '0;
  logic [15:0] rx_data [2];
  logic [1:0] rx_dv, rx_er, link_up;
  logic usb_rd = 0, usb_empty;
  logic [15:0] usb_data;
  logic [7:0] ctl_d = '0;
  logic ctl_stb = 0, ctl_start = 0;
  logic dac_sclk, dac_sdi;
  logic [1:0] dac_sync_n;
  logic [7:0] sw_bus;
  logic [5:0] sw_le;

  int checks = 0, failures = 0;

  always #12.5  sys_clk   = ~sys_clk;
  always #12.49 rx_clk[0] = ~rx_clk[0];
  always #12.51 rx_clk[1] = ~rx_clk[1];
  always #15    usb_clk   = ~usb_clk;

  blecft_top dut (.*);

  tunnel_card_model card0 (.clk(rx_clk[0]), .data(rx_data[0]), .dv(rx_dv[0]), .er(rx_er[0]));
  tunnel_card_model card1 (.clk(rx_clk[1]), .data(rx_data[1]), .dv(rx_dv[1]), .er(rx_er[1]));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------- mechanisms ----------------
  typedef enum int {M_FRAME, M_CRC, M_CODE, M_LEN, M_DROP, M_RMAX, M_CLEAR, M_LINKSEL,
                    M_SCOPE, M_DAC, M_HARM, M_LATCH, M_SYNC, M_NUM} mech_e;
  int mech [M_NUM];

  // ---------------- USB reader ----------------
  logic [15:0] up [$];
  bit usb_stall = 0;
  // the USB module starts reading once the board is out of reset
  always @(negedge usb_clk) usb_rd <= rst_n && !usb_empty && !usb_stall;
  always @(posedge usb_clk) if (usb_rd && !usb_empty) up.push_back(usb_data);

  task automatic get_record(output logic [15:0] tag, output logic [15:0] rec [$], input int timeout = 20000);
    int t = 0, n;
    rec.delete();
    tag = 16'hFFFF;
    while (up.size() < 2 && t < timeout) begin @(posedge sys_clk); t++; end
    if (up.size() < 2) begin check(0, "record header received"); return; end
    tag = up.pop_front();
    n = int'(up.pop_front());
    while (up.size() < n && t < timeout) begin @(posedge sys_clk); t++; end
    check(up.size() >= n, $sformatf("record of %0d words received", n));
    for (int i = 0; i < n && up.size() > 0; i++) rec.push_back(up.pop_front());
  endtask

  // ---------------- control bus ----------------
  task automatic wr_byte(logic [7:0] b, logic start);
    #97; ctl_d = b; ctl_start = start;
    #113; ctl_stb = 1;
    #151; ctl_stb = 0;
  endtask
  task automatic write_reg(logic [7:0] a, logic [15:0] d);
    wr_byte(a, 1); wr_byte(d[15:8], 0); wr_byte(d[7:0], 0);
    #200;
  endtask

  // ---------------- DAC and latch models ----------------
  logic [23:0] dsh [2];
  logic [15:0] dac_seen [16];
  int dac_frames [16];
  logic sclk_q = 0;
  logic [1:0] sync_q = '1;
  int harm_codes [$];
  always @(posedge sys_clk) begin
    for (int d = 0; d < 2; d++) begin
      if (!dac_sync_n[d] && dac_sclk && !sclk_q) dsh[d] = {dsh[d][22:0], dac_sdi};
      if (!sync_q[d] && dac_sync_n[d]) begin
        int s;
        s = d * 8 + int'(dsh[d][19:16]);
        dac_seen[s] = dsh[d][15:0];
        dac_frames[s]++;
        if (s == 15) harm_codes.push_back(int'(dsh[d][15:0]));
      end
    end
    sclk_q <= dac_sclk;
    sync_q <= dac_sync_n;
  end
  logic [7:0] latch [6];
  always @(posedge sys_clk) for (int i = 0; i < 6; i++) if (sw_le[i]) latch[i] = sw_bus;

  // ---------------- running sums model ----------------
  longint hist [8][$];
  longint mx [8][6];
  longint prev_adc [8];
  bit have_prev = 0;
  int st_ok [2], st_crc [2], st_code [2], st_len [2], st_drop [2], st_loss [2];
  int last_good_pid = 0;

  function automatic void model_clear();
    for (int c = 0; c < 8; c++) begin
      hist[c].delete();
      for (int k = 0; k < 6; k++) mx[c][k] = 0;
    end
    have_prev = 0;
  endfunction

  function automatic void model_packet(logic [15:0] cnt [8], logic [11:0] adc [8]);
    for (int c = 0; c < 8; c++) begin
      longint m = longint'(cnt[c]) * 4096;
      if (have_prev) m = m + prev_adc[c] - longint'(adc[c]);
      if (m < 0) m = 0;
      prev_adc[c] = longint'(adc[c]);
      hist[c].push_back(m);
      if (hist[c].size() > 256) void'(hist[c].pop_front());
      for (int k = 0; k < 6; k++) begin
        longint s = 0;
        for (int i = 0; i < RS_LEN_TB[k] && i < hist[c].size(); i++) s += hist[c][hist[c].size() - 1 - i];
        if (s > mx[c][k]) mx[c][k] = s;
      end
    end
    have_prev = 1;
  endfunction

  // ---------------- packet traffic ----------------
  int pid = 0;
  logic [15:0] last_cnt [2][8];
  logic [11:0] last_adc [2][8];

  // kind: 0 good, 1 corrupted word (CRC), 2 code error, 3 short
  task automatic send_both(int kind0, bit differ, int sel, bit model_it);
    words_t w0, w1;
    logic [15:0] c0 [8], c1 [8];
    logic [11:0] a0 [8], a1 [8];
    for (int c = 0; c < 8; c++) begin
      c0[c] = 16'($urandom_range(0, 40)); a0[c] = 12'($urandom);
      c1[c] = differ ? 16'($urandom_range(100, 200)) : c0[c];
      a1[c] = differ ? 12'($urandom) : a0[c];
    end
    w0 = card0.make_packet(16'h0B1E, 16'(pid), 32'h8000_0003, c0, a0);
    w1 = card1.make_packet(16'h0B1E, 16'(pid), 32'h8000_0003, c1, a1);
    if ((sel == 0 && kind0 == 0) || sel == 1) last_good_pid = pid;
    pid++;
    last_cnt[0] = c0; last_adc[0] = a0; last_cnt[1] = c1; last_adc[1] = a1;
    if (kind0 == 1) w0[6] ^= 16'h0040;
    fork
      begin
        if (kind0 == 3) card0.send(w0, 9, -1, 60);
        else            card0.send(w0, 20, (kind0 == 2) ? 5 : -1, 60);
      end
      card1.send(w1, 20, -1, 60);
    join
    case (kind0)
      0: st_ok[0]++;
      1: st_crc[0]++;
      2: st_code[0]++;
      default: st_len[0]++;
    endcase
    st_ok[1]++;
    if (model_it) begin
      if (sel == 0 && kind0 == 0) model_packet(c0, a0);
      if (sel == 1) model_packet(c1, a1);
    end
  endtask

  task automatic check_rmax(int sel);
    logic [15:0] tag;
    logic [15:0] rec [$];
    int w = 0;
    write_reg(A_CMD, 16'(1 << CMD_DUMP_MAX));
    get_record(tag, rec);
    check(tag == {TAG_RMAX, 9'b0, link_up, 1'(sel)}, $sformatf("maxima record tag %h", tag));
    check(rec.size() == 4 + 8 * 6 * 3 + 2 * NUM_EV, "maxima record length");
    if (rec.size() != 4 + 8 * 6 * 3 + 2 * NUM_EV) return;
    check(rec[0] == 16'h0B1E && rec[1] == 16'(last_good_pid) && rec[2] == 16'h8000 && rec[3] == 16'h0003,
          $sformatf("card status words %h %h %h %h", rec[0], rec[1], rec[2], rec[3]));
    w = 4;
    for (int c = 0; c < 8; c++)
      for (int k = 0; k < 6; k++) begin
        longint v = longint'({rec[w], rec[w+1], rec[w+2]});
        check(v == mx[c][k], $sformatf("maximum ch%0d window %0d: %0d, model %0d", c, k, v, mx[c][k]));
        mx[c][k] = 0;
        w += 3;
      end
    for (int l = 0; l < 2; l++) begin
      check(rec[w + EV_OK] == 16'(st_ok[l]), $sformatf("link %0d good packets %0d/%0d", l, rec[w + EV_OK], st_ok[l]));
      check(rec[w + EV_CRC] == 16'(st_crc[l]), $sformatf("link %0d CRC errors", l));
      check(rec[w + EV_CODE] == 16'(st_code[l]), $sformatf("link %0d code errors", l));
      check(rec[w + EV_LEN] == 16'(st_len[l]), $sformatf("link %0d length errors", l));
      check(rec[w + EV_DROP] == 16'(st_drop[l]), $sformatf("link %0d drops %0d/%0d", l, rec[w + EV_DROP], st_drop[l]));
      check(rec[w + EV_LOSS] == 16'(st_loss[l]), $sformatf("link %0d losses %0d/%0d", l, rec[w + EV_LOSS], st_loss[l]));
      w += NUM_EV;
    end
    mech[M_RMAX]++;
  endtask

  initial begin
    repeat (3000000) @(posedge sys_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] tag;
    logic [15:0] rec [$];
    logic [15:0] dacv [16];
    logic [7:0] swv [6];
    int frames_got;
    for (int i = 0; i < M_NUM; i++) mech[i] = 0;
    for (int i = 0; i < 16; i++) begin dac_frames[i] = 0; dac_seen[i] = '0; end
    for (int l = 0; l < 2; l++) begin st_ok[l] = 0; st_crc[l] = 0; st_code[l] = 0; st_len[l] = 0; st_drop[l] = 0; st_loss[l] = 0; end
    model_clear();
    #200 rst_n = 1;
    repeat (40) @(posedge sys_clk);
    check(link_up == 2'b11, "both links synchronised");

    // configuration: DAC codes and switch bytes
    for (int i = 0; i < 16; i++) begin dacv[i] = 16'($urandom); write_reg(8'(A_DAC_BASE + i), dacv[i]); end
    for (int i = 0; i < 6; i++) begin swv[i] = 8'($urandom); write_reg(8'(A_SW_BASE + i), 16'(swv[i])); end

    // ---- Frame Mode (mode 0, link 0) ----
    for (int p = 0; p < 4; p++) begin
      send_both(0, 0, 0, 0);
      get_record(tag, rec);
      check(tag == {TAG_FRAME, 9'b0, 2'b11, 1'b0}, "frame tag");
      check(rec.size() == 21 && rec[1] == 16'(pid - 1) && rec[0] == 16'h0B1E, "frame contents");
      for (int c = 0; c < 8; c++) check(rec[4 + c] == last_cnt[0][c], "frame counter word");
      check(rec[20] == 16'h0000, "frame flags clear");
      mech[M_FRAME]++;
    end
    send_both(1, 0, 0, 0);
    get_record(tag, rec);
    check(rec.size() == 21 && rec[20] == 16'h0002, "CRC error flagged in frame");
    if (rec.size() == 21 && rec[20][1]) mech[M_CRC]++;
    send_both(2, 0, 0, 0);
    get_record(tag, rec);
    check(rec.size() == 21 && rec[20] == 16'h0001, "code error flagged in frame");
    if (rec.size() == 21 && rec[20][0]) mech[M_CODE]++;
    send_both(3, 0, 0, 0);
    repeat (300) @(posedge sys_clk);
    check(up.size() == 0, "short packet not uploaded");
    mech[M_LEN]++;

    // USB reader stalls: the upload FIFO (128 words) holds 5 frames
    usb_stall = 1;
    for (int p = 0; p < 8; p++) send_both(0, 0, 0, 0);
    repeat (100) @(posedge sys_clk);
    usb_stall = 0;
    frames_got = 0;
    for (int p = 0; p < 8; p++) begin
      int t = 0;
      while (up.size() < 23 && t < 2000) begin @(posedge sys_clk); t++; end
      if (up.size() < 23) break;
      get_record(tag, rec);
      frames_got++;
    end
    st_drop[0] += 8 - frames_got;
    check(frames_got == 5, $sformatf("%0d frames kept while stalled", frames_got));
    if (frames_got < 8) mech[M_DROP]++;

    // ---- Running Maxima (mode 1), cleared history ----
    write_reg(A_MODE, 16'(MODE_RMAX));
    write_reg(A_CMD, 16'(1 << CMD_RS_CLR));
    model_clear();
    mech[M_CLEAR]++;
    repeat (2200) @(posedge sys_clk);
    for (int p = 0; p < 300; p++) send_both((p % 50 == 7) ? 1 : 0, 0, 0, 1);
    repeat (50) @(posedge sys_clk);
    check(up.size() == 0, "no frames uploaded in Running Maxima mode");
    check_rmax(0);
    for (int p = 0; p < 40; p++) send_both(0, 0, 0, 1);
    repeat (50) @(posedge sys_clk);
    check_rmax(0);

    // ---- processed link switched to link 1, which now carries other data ----
    write_reg(A_MODE, 16'(MODE_RMAX) | 16'h0010);
    write_reg(A_CMD, 16'(1 << CMD_RS_CLR));
    model_clear();
    repeat (2200) @(posedge sys_clk);
    for (int p = 0; p < 30; p++) send_both(0, 1, 1, 1);
    repeat (50) @(posedge sys_clk);
    check_rmax(1);
    mech[M_LINKSEL]++;

    // ---- oscilloscope mode on link 1, channel 3, 20 packets ----
    write_reg(A_MODE, 16'(MODE_SCOPE) | 16'h0010);
    write_reg(A_SCOPE_CH, 16'd3);
    write_reg(A_SCOPE_LEN, 16'd20);
    write_reg(A_CMD, 16'(1 << CMD_SCOPE_ARM));
    begin
      logic [15:0] ec [$];
      logic [11:0] ea [$];
      for (int p = 0; p < 24; p++) begin
        send_both(0, 1, 1, 1);
        if (p < 20) begin ec.push_back(last_cnt[1][3]); ea.push_back(last_adc[1][3]); end
      end
      get_record(tag, rec);
      check(tag == {TAG_SCOPE, 9'b0, 2'b11, 1'b1}, "scope tag");
      check(rec.size() == 40, $sformatf("scope record of %0d words", rec.size()));
      if (rec.size() == 40) begin
        for (int i = 0; i < 20; i++)
          check(rec[2*i] == ec[i] && rec[2*i+1] == {4'b0, ea[i]}, $sformatf("scope entry %0d", i));
        mech[M_SCOPE]++;
      end
    end

    // ---- DAC refresh and latches ----
    repeat (1700) @(posedge sys_clk);
    for (int i = 0; i < 16; i++) check(dac_seen[i] == dacv[i] && dac_frames[i] > 0, $sformatf("DAC slot %0d", i));
    mech[M_DAC]++;
    for (int i = 0; i < 6; i++) check(latch[i] == swv[i], $sformatf("latch %0d", i));
    mech[M_LATCH]++;
    // harmonic generator on slot 15 (DAC 1, channel 7)
    write_reg(A_HARM_STEP, 16'h0400);
    write_reg(A_HARM_AMP, 16'hFFFF);
    write_reg(A_HARM_CTL, 16'h00F1);
    harm_codes.delete();
    repeat (20000) @(posedge sys_clk);
    begin
      int mn = 65535, mxv = 0;
      foreach (harm_codes[i]) begin
        if (harm_codes[i] < mn) mn = harm_codes[i];
        if (harm_codes[i] > mxv) mxv = harm_codes[i];
      end
      check(harm_codes.size() > 20, "harmonic frames sent");
      check(mn < 32768 - 20000 && mxv > 32768 + 20000, $sformatf("harmonic swing %0d..%0d", mn, mxv));
      if (mxv - mn > 40000) mech[M_HARM]++;
    end
    check(dac_seen[14] == dacv[14], "other slots keep their codes");

    // ---- loss of synchronisation on link 1 ----
    card1.lose_sync(4);
    repeat (3) @(posedge sys_clk);
    check(link_up[1] == 1'b0, "link 1 reported down");
    repeat (40) @(posedge sys_clk);
    check(link_up[1] == 1'b1, "link 1 back up");
    st_loss[1]++;
    // the loss is counted and reported in the next maxima dump
    write_reg(A_MODE, 16'(MODE_RMAX) | 16'h0010);
    for (int p = 0; p < 5; p++) send_both(0, 1, 1, 1);
    repeat (50) @(posedge sys_clk);
    check_rmax(1);
    mech[M_SYNC]++;

    for (int i = 0; i < M_NUM; i++) begin
      check(mech[i] > 0, $sformatf("mechanism %s happened", mech_e'(i)));
      $display("mechanism %-10s happened %0d times", mech_e'(i), mech[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
