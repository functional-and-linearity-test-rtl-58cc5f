// tb_async_fifo: self-checking test of the dual-clock FIFO.
// Writes 2000 random words from a 100 MHz domain with random write
// attempts and reads them in a 77 MHz domain with random read attempts,
// comparing the order and contents against a queue model. Also checks
// the free count after reset, that full is reached and that no write is
// accepted while full.
module tb_async_fifo;
  localparam int W = 21, L2 = 4, N = 2000;
  logic wclk = 0, rclk = 0, wrst = 1, rrst = 1;
  logic wr_en = 0, rd_en = 0, full, empty;
  logic [W-1:0] wr_data = '0, rd_data;
  logic [L2:0] wr_free;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];
  int nwr = 0, nrd = 0;
  bit saw_full = 0;
  int pause = 0;

  async_fifo #(.WIDTH(W), .DEPTH_LOG2(L2)) dut (.*);

  always #5 wclk = ~wclk;
  always #6.5 rclk = ~rclk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (200000) @(posedge wclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writer
  initial begin
    repeat (4) @(posedge wclk);
    wrst <= 0;
    @(posedge wclk);
    check(wr_free == (1 << L2), "free count after reset");
    check(!full, "not full after reset");
    while (nwr < N) begin
      @(negedge wclk);
      if (full) saw_full = 1;
      wr_en   = ($urandom_range(0, 3) != 0) && !full;
      wr_data = W'($urandom);
      @(posedge wclk);
      if (wr_en) begin model.push_back(wr_data); nwr++; end
    end
    @(negedge wclk) wr_en = 0;
  end

  // a write attempted while full must be ignored
  always @(posedge wclk) if (!wrst && full) begin
    // no entry is pushed by the writer while full; occupancy cannot exceed depth
    if (wr_free != 0) begin failures++; $display("FAIL: full with free entries"); end
  end

  // reader
  initial begin
    repeat (4) @(posedge rclk);
    rrst <= 0;
    while (nrd < N) begin
      @(negedge rclk);
      rd_en = ($urandom_range(0, 2) == 0);
      if (nrd == 300 && pause < 100) begin rd_en = 0; pause++; end  // let the FIFO fill up
      @(posedge rclk);
      if (rd_en && !empty) begin
        check(model.size() > 0 && rd_data == model[0], $sformatf("word %0d", nrd));
        void'(model.pop_front());
        nrd++;
      end
    end
    check(saw_full, "FIFO reached full");
    @(posedge rclk); #1;
    check(empty, "empty at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
