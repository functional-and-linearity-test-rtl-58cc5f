// tb_meas_combine: self-checking test of the counter/ADC combination.
// Random counters and ADC samples, including values that make the result
// negative, are compared with meas = cnt*4096 + (adc_prev - adc_now),
// clamped at zero, with no ADC change for the first packet, and a
// one-clock latency.
module tb_meas_combine;
  import blecft_pkg::*;
  logic clk = 0, rst = 1, clear = 0, in_valid = 0, out_valid;
  cnt_t cnt [NUM_CH];
  adc_t adc [NUM_CH];
  meas_t meas [NUM_CH];
  int checks = 0, failures = 0;
  longint prev [NUM_CH];

  always #5 clk = ~clk;
  meas_combine dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e;
    for (int c = 0; c < 8; c++) begin cnt[c] = '0; adc[c] = '0; end
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int p = 0; p < 200; p++) begin
      @(negedge clk);
      for (int c = 0; c < 8; c++) begin
        cnt[c] = (p % 5 == 2) ? 16'(c % 2) : 16'($urandom);
        adc[c] = 12'($urandom);
      end
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid) begin failures++; $display("FAIL: out_valid one clock after in_valid"); end
      for (int c = 0; c < 8; c++) begin
        e = longint'(cnt[c]) * 4096;
        if (p > 0) e = e + prev[c] - longint'(adc[c]);
        if (e < 0) e = 0;
        checks++;
        if (longint'(meas[c]) != e) begin
          failures++; $display("FAIL: p=%0d ch=%0d meas=%0d expected %0d", p, c, meas[c], e);
        end
        prev[c] = longint'(adc[c]);
      end
      @(negedge clk);
      checks++;
      if (out_valid) begin failures++; $display("FAIL: out_valid longer than one clock"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
