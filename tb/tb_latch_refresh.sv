// tb_latch_refresh: self-checking test of the relay/switch latch refresh.
// Models the external latches (each takes the bus value while its latch
// enable is high) and checks that after every pass each latch holds its
// register byte, that one latch enable at most is high, that the bus is
// stable while an enable is high and around its falling edge, and that a
// pass takes 4*NUM_LATCH clocks.
module tb_latch_refresh;
  import blecft_pkg::*;
  logic clk = 0, rst = 1;
  logic [7:0] bytes [NUM_LATCH];
  logic [7:0] bus;
  logic [NUM_LATCH-1:0] le, le_q = '0;
  logic [7:0] bus_q = '0;
  logic [7:0] latch [NUM_LATCH];
  int checks = 0, failures = 0;
  int pulses [NUM_LATCH];

  always #10 clk = ~clk;
  latch_refresh dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (!rst) begin
    for (int i = 0; i < NUM_LATCH; i++) begin
      if (le[i]) latch[i] = bus;
      if (le[i] && !le_q[i]) pulses[i]++;
    end
    checks++;
    if ($countones(le) > 1) begin failures++; $display("FAIL: two latch enables"); end
    if ((le_q != '0) && bus != bus_q) begin failures++; $display("FAIL: bus changed during/after enable"); end
    le_q  <= le;
    bus_q <= bus;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NUM_LATCH; i++) begin bytes[i] = 8'($urandom); latch[i] = '0; pulses[i] = 0; end
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int k = 0; k < 20; k++) begin
      repeat (4 * NUM_LATCH + 4) @(posedge clk);
      for (int i = 0; i < NUM_LATCH; i++) check(latch[i] == bytes[i], $sformatf("latch %0d", i));
      @(negedge clk);
      for (int i = 0; i < NUM_LATCH; i++) bytes[i] = 8'($urandom);
    end
    for (int i = 0; i < NUM_LATCH; i++) begin pulses[i] = 0; end
    repeat (4 * NUM_LATCH * 10) @(posedge clk);
    for (int i = 0; i < NUM_LATCH; i++) check(pulses[i] == 10, $sformatf("latch %0d refreshed %0d times in 10 passes", i, pulses[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
