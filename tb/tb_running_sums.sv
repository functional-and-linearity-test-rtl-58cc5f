// tb_running_sums: self-checking test of the Running Maxima block at its
// default window lengths (1, 2, 8, 16, 64, 256 samples).
// A model keeps every channel's sample history; after each update every
// running sum is compared with the sum of the latest RS_LEN samples, and
// after each snapshot every maximum with the largest sum seen since the
// previous snapshot. Also checks the initial clear time and that an
// update keeps busy high for exactly 2*NUM_CH clocks after it is taken.
module tb_running_sums;
  import blecft_pkg::*;
  localparam int NRS = 6;
  localparam int unsigned LENS [NRS] = '{1, 2, 8, 16, 64, 256};
  localparam int SW = MEAS_W + 8;
  logic clk = 0, rst = 1, clear = 0, in_valid = 0, snap = 0, snap_done, busy;
  meas_t meas [NUM_CH];
  logic [2:0] rd_ch = '0, rd_rs = '0;
  logic [SW-1:0] rd_max, rd_sum;
  int checks = 0, failures = 0;
  longint hist [NUM_CH][$];
  longint mx [NUM_CH][NRS];

  always #5 clk = ~clk;
  running_sums dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic longint model_sum(int c, int k);
    longint s = 0;
    for (int i = 0; i < int'(LENS[k]) && i < hist[c].size(); i++) s += hist[c][hist[c].size() - 1 - i];
    return s;
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int clr_cycles = 0, busy_cycles;
    for (int c = 0; c < NUM_CH; c++) for (int k = 0; k < NRS; k++) mx[c][k] = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    while (busy) begin @(posedge clk); clr_cycles++; end
    check(clr_cycles >= NUM_CH * 256 - 2 && clr_cycles <= NUM_CH * 256 + 2,
          $sformatf("clear took %0d clocks", clr_cycles));
    for (int p = 0; p < 700; p++) begin
      @(negedge clk);
      for (int c = 0; c < NUM_CH; c++) begin
        meas[c] = ($urandom_range(0, 20) == 0) ? meas_t'($urandom) : meas_t'($urandom_range(0, 5000));
        hist[c].push_back(longint'(meas[c]));
        if (hist[c].size() > 256) void'(hist[c].pop_front());
      end
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      busy_cycles = 0;
      while (busy) begin @(negedge clk); busy_cycles++; end
      check(busy_cycles == 2 * NUM_CH, $sformatf("update took %0d clocks", busy_cycles));
      for (int c = 0; c < NUM_CH; c++)
        for (int k = 0; k < NRS; k++) begin
          longint e;
          e = model_sum(c, k);
          if (e > mx[c][k]) mx[c][k] = e;
          rd_ch = 3'(c); rd_rs = 3'(k);
          #1;
          check(longint'(rd_sum) == e, $sformatf("p=%0d sum ch%0d rs%0d: %0d vs %0d", p, c, k, rd_sum, e));
        end
      if (p % 97 == 96) begin
        @(negedge clk);
        snap = 1;
        @(negedge clk);
        snap = 0;
        while (!snap_done) @(negedge clk);
        for (int c = 0; c < NUM_CH; c++)
          for (int k = 0; k < NRS; k++) begin
            rd_ch = 3'(c); rd_rs = 3'(k);
            #1;
            check(longint'(rd_max) == mx[c][k], $sformatf("max ch%0d rs%0d: %0d vs %0d", c, k, rd_max, mx[c][k]));
            mx[c][k] = 0;
          end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
