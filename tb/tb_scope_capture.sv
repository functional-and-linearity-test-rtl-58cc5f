// tb_scope_capture: self-checking test of the oscilloscope record.
// Arms a record of 50 packets on channel 5 and of the full depth (len 0)
// on channel 2, feeds random packets with gaps, and compares count, the
// done pulse (with the packet that completes the window) and every
// stored entry with the channel's {counter, ADC} values.
module tb_scope_capture;
  import blecft_pkg::*;
  localparam int D = 1024;
  logic clk = 0, rst = 1, arm = 0, in_valid = 0, armed, done;
  logic [2:0] ch = '0;
  logic [15:0] len = '0;
  cnt_t cnt [NUM_CH];
  adc_t adc [NUM_CH];
  logic [10:0] count;
  logic [9:0] rd_addr = '0;
  logic [27:0] rd_data;
  int checks = 0, failures = 0;
  logic [27:0] model [$];

  always #5 clk = ~clk;
  scope_capture dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int c, int l);
    int n = (l == 0) ? D : l;
    bit seen_done = 0;
    model.delete();
    @(negedge clk);
    ch = 3'(c); len = 16'(l); arm = 1;
    @(negedge clk);
    arm = 0; ch = 3'(c + 1);           // channel is taken at arm
    for (int p = 0; p < n + 5; p++) begin
      for (int i = 0; i < NUM_CH; i++) begin cnt[i] = 16'($urandom); adc[i] = 12'($urandom); end
      in_valid = 1;
      if (p < n) model.push_back({cnt[c], adc[c]});
      @(negedge clk);
      in_valid = 0;
      if (done) begin
        check(p == n - 1, $sformatf("done after packet %0d, expected %0d", p, n - 1));
        seen_done = 1;
      end
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    check(seen_done, "done pulse seen");
    check(!armed, "disarmed after the window");
    check(count == 11'(n), $sformatf("count %0d, expected %0d", count, n));
    for (int i = 0; i < n; i++) begin
      rd_addr = 10'(i);
      #1;
      check(rd_data == model[i], $sformatf("entry %0d", i));
    end
  endtask

  initial begin
    for (int i = 0; i < NUM_CH; i++) begin cnt[i] = '0; adc[i] = '0; end
    repeat (2) @(posedge clk);
    rst <= 0;
    run(5, 50);
    run(2, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
