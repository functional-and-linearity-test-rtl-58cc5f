// tb_harmonic_gen: self-checking test of the sine generator.
// Runs the generator at several steps and amplitudes and compares every
// output code with 32768 + amp/65536 * 32767 * sin(2*pi*k/256), computed
// here in floating point from the expected phase (within 2 LSB), with the
// two-clock latency from phase to code. Also checks the mid-scale output
// when disabled.
module tb_harmonic_gen;
  logic clk = 0, rst = 1, en = 0;
  logic [15:0] step = '0, amp = '0, code;
  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979;

  always #12.5 clk = ~clk;
  harmonic_gen dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned ph;
    real e;
    int steps [3] = '{16'h0100, 16'h1234, 16'hFFFF};
    int amps  [3] = '{16'hFFFF, 16'h8000, 16'h1000};
    repeat (2) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    check(code == 16'h8000, "mid-scale after reset");
    for (int r = 0; r < 3; r++) begin
      @(negedge clk);
      en = 0;
      repeat (3) @(negedge clk);
      check(code == 16'h8000, "mid-scale while disabled");
      step = 16'(steps[r]); amp = 16'(amps[r]); en = 1;
      // phase 0 is used in the first enabled clock; code follows 2 clocks later
      ph = 0;
      @(negedge clk);
      for (int t = 0; t < 20000; t++) begin
        @(negedge clk);
        e = 32768.0 + $itor(amp) / 65536.0 * $floor(32767.0 * $sin(2.0 * PI * $itor(ph >> 16) / 256.0) + 0.5);
        checks++;
        if ($itor(code) - e > 2.0 || e - $itor(code) > 2.0) begin
          failures++;
          if (failures < 10) $display("FAIL: step %h t=%0d code %0d expected %f", step, t, code, e);
        end
        ph = (ph + step) & 32'hFFFFFF;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
