// tb_readout_mux: self-checking test of the mode multiplexer.
// The running sums, statistics and scope buffer are replaced by simple
// functions of their read addresses, and the upload FIFO by a queue that
// a reader drains at random. For each mode the received records are
// compared word by word with the expected format; it also checks that a
// frame is dropped (drop pulse) when the FIFO lacks room, that nothing is
// written when the FIFO is full, that a dump request arriving during a
// record is held, and that sources not selected by the mode send nothing.
module tb_readout_mux;
  import blecft_pkg::*;
  localparam int NRS = 6, SW = 36, SAW = 10, FW = 8, CAP = 128;
  logic clk = 0, rst = 1;
  mode_e mode = MODE_FRAME;
  logic link_sel = 1'b1;
  logic frame_valid = 0, frame_crc_err = 0, frame_code_err = 0;
  logic [15:0] frame_words [PKT_WORDS];
  logic dump_req = 0, rs_snap, rs_snap_done = 0;
  logic [2:0] rs_ch, rs_rs;
  logic [SW-1:0] rs_max;
  logic [15:0] stats [NUM_LINKS][NUM_EV];
  pkt_hdr_t card_hdr;
  logic [NUM_LINKS-1:0] link_up = 2'b10;
  logic scope_done = 0;
  logic [SAW:0] scope_count = '0;
  logic [SAW-1:0] scope_addr;
  logic [27:0] scope_data;
  logic [FW-1:0] up_free;
  logic up_wr, drop;
  logic [15:0] up_data;
  int checks = 0, failures = 0, drops = 0;
  logic [15:0] fifo [$];
  logic [15:0] got [$];
  bit draining = 1;

  always #5 clk = ~clk;
  readout_mux #(.NUM_RS(NRS), .SUM_W(SW), .SCOPE_AW(SAW), .FREE_W(FW)) dut (.*);

  function automatic logic [SW-1:0] max_of(int c, int k);
    return SW'(64'h9_8765_4321 * (c + 1) + 64'h1_0101 * k);
  endfunction
  function automatic logic [27:0] scope_of(int a);
    return 28'(32'hA5A5_0000 + a * 32'h1_0003);
  endfunction
  assign rs_max     = max_of(rs_ch, rs_rs);
  assign scope_data = scope_of(scope_addr);
  assign up_free    = FW'(CAP - fifo.size());

  always @(posedge clk) if (!rst) begin
    if (drop) drops++;
    if (up_wr) begin
      if (fifo.size() >= CAP) begin failures++; $display("FAIL: write to full FIFO"); end
      fifo.push_back(up_data);
    end
    if (draining && fifo.size() > 0 && $urandom_range(0, 3) == 0) got.push_back(fifo.pop_front());
    rs_snap_done <= rs_snap;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic wait_words(int n);
    int t = 0;
    while (got.size() < n && t < 20000) begin @(posedge clk); t++; end
    check(got.size() >= n, $sformatf("received %0d of %0d words", got.size(), n));
  endtask

  task automatic send_frame(int id);
    @(negedge clk);
    for (int i = 0; i < 20; i++) frame_words[i] = 16'(id * 100 + i);
    frame_crc_err = id[0]; frame_code_err = id[1];
    frame_valid = 1;
    @(negedge clk);
    frame_valid = 0;
  endtask

  task automatic expect_frame(int id);
    wait_words(23);
    check(got[0] == {TAG_FRAME, 9'b0, link_up, link_sel} && got[1] == 16'd21, "frame header");
    for (int i = 0; i < 20; i++) check(got[2 + i] == 16'(id * 100 + i), $sformatf("frame %0d word %0d", id, i));
    check(got[22] == {14'b0, 1'(id), 1'(id >> 1)}, "frame flags");
    repeat (23) void'(got.pop_front());
  endtask

  task automatic expect_rmax();
    int n = 4 + 8 * NRS * 3 + NUM_LINKS * NUM_EV;
    int w = 6;
    wait_words(n + 2);
    check(got[0] == {TAG_RMAX, 9'b0, link_up, link_sel} && got[1] == 16'(n), "maxima header");
    check(got[2] == card_hdr.card_id && got[3] == card_hdr.pkt_id && {got[4], got[5]} == card_hdr.status, "card words");
    for (int c = 0; c < 8; c++)
      for (int k = 0; k < NRS; k++) begin
        logic [47:0] m = 48'(max_of(c, k));
        check({got[w], got[w+1], got[w+2]} == m, $sformatf("max ch%0d rs%0d", c, k));
        w += 3;
      end
    for (int l = 0; l < NUM_LINKS; l++)
      for (int e = 0; e < NUM_EV; e++) begin
        check(got[w] == stats[l][e], "statistics word");
        w++;
      end
    repeat (n + 2) void'(got.pop_front());
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int l = 0; l < NUM_LINKS; l++) for (int e = 0; e < NUM_EV; e++) stats[l][e] = 16'($urandom);
    for (int i = 0; i < 20; i++) frame_words[i] = '0;
    card_hdr = pkt_hdr_t'({$urandom, $urandom, $urandom});
    repeat (2) @(posedge clk);
    rst <= 0;
    // Frame Mode
    for (int id = 0; id < 4; id++) begin send_frame(id); expect_frame(id); end
    // frames while the reader is stopped: the FIFO fills, later frames drop
    draining = 0;
    for (int id = 0; id < 8; id++) begin send_frame(10 + id); repeat (30) @(posedge clk); end
    check(fifo.size() == 5 * 23, $sformatf("%0d words held", fifo.size()));
    check(drops == 3, $sformatf("%0d frames dropped", drops));
    draining = 1;
    for (int id = 0; id < 5; id++) expect_frame(10 + id);
    // other sources are ignored in Frame Mode
    @(negedge clk); scope_count = 11'd5; scope_done = 1; @(negedge clk); scope_done = 0;
    repeat (50) @(posedge clk);
    check(got.size() == 0 && fifo.size() == 0, "scope ignored in Frame Mode");
    // Running Maxima: dump, plus a second request during the first dump
    @(negedge clk); mode = MODE_RMAX;
    send_frame(1);
    @(negedge clk); dump_req = 1; link_up = 2'b01; @(negedge clk); dump_req = 0;
    repeat (20) @(negedge clk);
    dump_req = 1; @(negedge clk); dump_req = 0;
    expect_rmax();
    expect_rmax();
    repeat (50) @(posedge clk);
    check(got.size() == 0 && fifo.size() == 0, "frames ignored in Running Maxima");
    // Oscilloscope
    @(negedge clk); mode = MODE_SCOPE; scope_count = 11'd300; scope_done = 1;
    @(negedge clk); scope_done = 0;
    wait_words(602);
    check(got[0] == {TAG_SCOPE, 9'b0, link_up, link_sel} && got[1] == 16'd600, "scope header");
    for (int i = 0; i < 300; i++) begin
      logic [27:0] v;
      v = scope_of(i);
      check(got[2 + 2*i] == v[27:12] && got[3 + 2*i] == {4'b0, v[11:0]}, $sformatf("scope entry %0d", i));
    end
    repeat (100) @(posedge clk);
    check(got.size() == 602 && fifo.size() == 0, "scope record length");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
