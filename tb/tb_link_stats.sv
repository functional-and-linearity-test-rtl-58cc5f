// tb_link_stats: self-checking test of the link statistics counters.
// Random event pulses are counted by a model and compared each clock; a
// clear in the middle and saturation of a narrow counter are checked too.
module tb_link_stats;
  import blecft_pkg::*;
  localparam int CW = 6;
  logic clk = 0, rst = 1, clear = 0;
  logic [NUM_EV-1:0] ev = '0;
  logic [CW-1:0] counts [NUM_EV];
  int model [NUM_EV];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  link_stats #(.COUNT_W(CW)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < int'(NUM_EV); i++) model[i] = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      for (int i = 0; i < int'(NUM_EV); i++) begin
        checks++;
        if (counts[i] != CW'(model[i])) begin
          failures++; $display("FAIL: t=%0d counter %0d = %0d, expected %0d", t, i, counts[i], model[i]);
        end
      end
      ev    = NUM_EV'($urandom) & NUM_EV'($urandom);
      ev[EV_OK] = 1'b1;   // one counter runs into saturation
      clear = (t == 150);
      @(posedge clk); #1;
      for (int i = 0; i < int'(NUM_EV); i++) begin
        if (clear) model[i] = 0;
        else if (ev[i] && model[i] < (1 << CW) - 1) model[i]++;
      end
    end
    checks++;
    if (counts[EV_OK] != '1) begin failures++; $display("FAIL: saturation"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
