// tb_dac_refresh: self-checking test of the continuous DAC refresh.
// Two serial DAC receivers are modelled: each shifts sdi in on the rising
// edge of sclk while its sync_n is low and takes a 24-bit frame when
// sync_n rises. Every frame is checked against the slot order, the
// channel number and the current register code; codes are changed while
// the refresh runs. Also checks the 50-clock slot period and that the two
// sync_n lines are never low together.
module tb_dac_refresh;
  import blecft_pkg::*;
  logic clk = 0, rst = 1;
  logic [15:0] values [NUM_DAC*DAC_CH];
  logic sclk, sdi, frame_done;
  logic [NUM_DAC-1:0] sync_n;
  logic [3:0] slot;
  int checks = 0, failures = 0;
  logic [23:0] sh [NUM_DAC];
  int nbits [NUM_DAC];
  int exp_slot = 0, frames = 0;
  logic sclk_q = 0;
  logic [NUM_DAC-1:0] sync_q = '1;
  longint last_start = -1, cyc = 0;

  always #12.5 clk = ~clk;
  dac_refresh dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // DAC models, sampled on the system clock (sclk is a registered output)
  always @(posedge clk) if (!rst) begin
    cyc++;
    if (sync_n == '0) begin failures++; $display("FAIL: both DACs selected"); end
    for (int d = 0; d < NUM_DAC; d++) begin
      if (sync_q[d] && !sync_n[d]) begin
        nbits[d] = 0;
        if (d == 0 && exp_slot == 0) begin
          if (last_start >= 0) begin
            checks++;
            if (cyc - last_start != 16 * 50) begin failures++; $display("FAIL: pass took %0d clocks", cyc - last_start); end
          end
          last_start = cyc;
        end
      end
      if (!sync_n[d] && sclk && !sclk_q) begin sh[d] = {sh[d][22:0], sdi}; nbits[d]++; end
      if (!sync_q[d] && sync_n[d]) begin
        frames++;
        checks++;
        if (nbits[d] != 24 || d != exp_slot / DAC_CH || sh[d] != {4'b0011, 4'(exp_slot % DAC_CH), values[exp_slot]}) begin
          failures++;
          $display("FAIL: dac %0d frame %06h bits %0d, expected slot %0d code %04h", d, sh[d], nbits[d], exp_slot, values[exp_slot]);
        end
        exp_slot = (exp_slot + 1) % (NUM_DAC * DAC_CH);
      end
    end
    sclk_q <= sclk;
    sync_q <= sync_n;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) values[i] = 16'($urandom);
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int k = 0; k < 10; k++) begin
      // change codes only while no frame is being shifted for them
      @(posedge clk iff frame_done);
      @(negedge clk);
      for (int i = 0; i < 16; i++) if (i != exp_slot) values[i] = 16'($urandom);
      repeat (900) @(posedge clk);
    end
    check(frames > 150, $sformatf("%0d frames", frames));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
