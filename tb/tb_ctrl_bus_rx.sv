// tb_ctrl_bus_rx: self-checking test of the control-bus receiver.
// Emulates the slow software-driven bus (bytes held for several clocks,
// asynchronous to the FPGA clock) and checks every register write: its
// address, data, single-clock pulse and latency after the third strobe.
// Also checks that an incomplete write is dropped when a new address
// byte arrives.
module tb_ctrl_bus_rx;
  logic clk = 0, rst = 1;
  logic [7:0] ctl_d = '0;
  logic ctl_stb = 0, ctl_start = 0, wr;
  logic [7:0] addr;
  logic [15:0] data;
  int checks = 0, failures = 0;
  int nwr = 0;
  logic [7:0] last_a; logic [15:0] last_d;
  realtime t_stb, t_wr;

  always #12.5 clk = ~clk;
  ctrl_bus_rx dut (.*);

  always @(posedge clk) if (!rst && wr) begin nwr++; last_a = addr; last_d = data; t_wr = $realtime; end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic put_byte(logic [7:0] b, logic start);
    #($urandom_range(30, 90) * 1.0);
    ctl_d = b; ctl_start = start;
    #($urandom_range(30, 90) * 1.0);
    ctl_stb = 1; t_stb = $realtime;
    #($urandom_range(80, 200) * 1.0);
    ctl_stb = 0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] a; logic [15:0] d;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 100; i++) begin
      int n0;
      n0 = nwr;
      a = 8'($urandom); d = 16'($urandom);
      if (i % 10 == 5) begin
        put_byte(8'hEE, 1); put_byte(8'h55, 0);   // abandoned write
      end
      put_byte(a, 1);
      put_byte(d[15:8], 0);
      put_byte(d[7:0], 0);
      #300;
      check(nwr == n0 + 1, $sformatf("write %0d: %0d pulses", i, nwr - n0));
      check(last_a == a && last_d == d, $sformatf("write %0d: %02h=%04h, expected %02h=%04h", i, last_a, last_d, a, d));
      // the strobe is seen after 2 synchroniser stages and an edge detector
      check(t_wr - t_stb >= 3 * 25.0 && t_wr - t_stb <= 5 * 25.0, $sformatf("latency %0t", t_wr - t_stb));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
