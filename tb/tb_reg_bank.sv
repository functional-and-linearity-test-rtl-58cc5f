// tb_reg_bank: self-checking test of the register bank.
// Writes every register of the map with random data in random order,
// compares all outputs with a model after every write, and checks that
// the command bits give one-clock pulses and that unused addresses
// change nothing.
module tb_reg_bank;
  import blecft_pkg::*;
  logic clk = 0, rst = 1, wr = 0;
  logic [7:0] addr = '0;
  logic [15:0] data = '0;
  cfg_t cfg;
  logic [15:0] dac_val [NUM_DAC*DAC_CH];
  logic [7:0] sw_byte [NUM_LATCH];
  int checks = 0, failures = 0;
  logic [15:0] m_dac [NUM_DAC*DAC_CH];
  logic [7:0] m_sw [NUM_LATCH];
  logic [15:0] m_mode, m_sch, m_slen, m_hs, m_ha, m_hc;

  always #5 clk = ~clk;
  reg_bank dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m_mode = 0; m_sch = 0; m_slen = 0; m_hs = 0; m_ha = 0; m_hc = 0;
    for (int i = 0; i < 16; i++) m_dac[i] = 0;
    for (int i = 0; i < 6; i++) m_sw[i] = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < 1500; t++) begin
      @(negedge clk);
      case ($urandom_range(0, 9))
        0: addr = 8'h00;  1: addr = 8'h01;  2: addr = 8'(2 + $urandom_range(0, 4));
        3, 4, 5: addr = 8'(8'h10 + $urandom_range(0, 15));
        6, 7: addr = 8'(8'h20 + $urandom_range(0, 5));
        default: addr = 8'($urandom);
      endcase
      data = 16'($urandom);
      if (addr == 8'h00) data[1:0] = 2'($urandom_range(0, 2));
      wr = 1;
      @(negedge clk);
      wr = 0;
      case (addr)
        8'h00: m_mode = data; 8'h02: m_sch = data; 8'h03: m_slen = data;
        8'h04: m_hs = data;   8'h05: m_ha = data;  8'h06: m_hc = data;
        default: begin
          if (addr >= 8'h10 && addr < 8'h20) m_dac[addr - 8'h10] = data;
          if (addr >= 8'h20 && addr < 8'h26) m_sw[addr - 8'h20] = data[7:0];
        end
      endcase
      check(cfg.mode == mode_e'(m_mode[1:0]) && cfg.link_sel == m_mode[4], "mode");
      check(cfg.scope_ch == m_sch[2:0] && cfg.scope_len == m_slen, "scope regs");
      check(cfg.harm_step == m_hs && cfg.harm_amp == m_ha && cfg.harm_en == m_hc[0] && cfg.harm_slot == m_hc[7:4], "harmonic regs");
      check({cfg.rs_clr, cfg.stat_clr, cfg.scope_arm, cfg.dump_max} == ((addr == 8'h01) ? data[3:0] : 4'h0), "command pulses");
      for (int i = 0; i < 16; i++) check(dac_val[i] == m_dac[i], $sformatf("dac %0d", i));
      for (int i = 0; i < 6; i++) check(sw_byte[i] == m_sw[i], $sformatf("switch byte %0d", i));
      @(negedge clk);
      check({cfg.rs_clr, cfg.stat_clr, cfg.scope_arm, cfg.dump_max} == 4'h0, "pulses last one clock");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
