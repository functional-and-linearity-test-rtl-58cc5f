// reg_bank: configuration registers written over the control link.
//
// The software only writes registers; the FPGA does the rest (DAC and
// switch refresh, modes, processing). Writes arrive from ctrl_bus_rx as
// (addr, data) with a one-clock wr. The map (blecft_pkg) holds the mode
// and link select, the command register whose bits give one-clock pulses
// (dump maxima, arm the scope, clear the statistics, clear the running
// sums), the scope channel and length, the harmonic generator's step,
// amplitude, enable and DAC slot, NUM_DAC*DAC_CH DAC codes and NUM_LATCH
// relay/switch bytes. All registers reset to zero. Writes to unused
// addresses are ignored. Values change the clock after wr; pulses last
// that one clock. The map is this design's own.
module reg_bank
  import blecft_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        wr,
  input  logic [7:0]  addr,
  input  logic [15:0] data,
  output cfg_t        cfg,
  output logic [15:0] dac_val [NUM_DAC*DAC_CH],
  output logic [7:0]  sw_byte [NUM_LATCH]
);
  always_ff @(posedge clk) begin
    if (rst) begin
      cfg <= '0;
      for (int i = 0; i < int'(NUM_DAC*DAC_CH); i++) dac_val[i] <= '0;
      for (int i = 0; i < int'(NUM_LATCH); i++) sw_byte[i] <= '0;
    end else begin
      cfg.dump_max  <= 1'b0;
      cfg.scope_arm <= 1'b0;
      cfg.stat_clr  <= 1'b0;
      cfg.rs_clr    <= 1'b0;
      if (wr) begin
        unique case (addr)
          A_MODE: begin
            cfg.mode     <= mode_e'(data[1:0]);
            cfg.link_sel <= data[4];
          end
          A_CMD: begin
            cfg.dump_max  <= data[CMD_DUMP_MAX];
            cfg.scope_arm <= data[CMD_SCOPE_ARM];
            cfg.stat_clr  <= data[CMD_STAT_CLR];
            cfg.rs_clr    <= data[CMD_RS_CLR];
          end
          A_SCOPE_CH:  cfg.scope_ch  <= data[2:0];
          A_SCOPE_LEN: cfg.scope_len <= data;
          A_HARM_STEP: cfg.harm_step <= data;
          A_HARM_AMP:  cfg.harm_amp  <= data;
          A_HARM_CTL: begin
            cfg.harm_en   <= data[0];
            cfg.harm_slot <= data[7:4];
          end
          default: begin
            if (addr >= A_DAC_BASE && addr < A_DAC_BASE + 8'(NUM_DAC*DAC_CH))
              dac_val[4'(addr - A_DAC_BASE)] <= data;
            else if (addr >= A_SW_BASE && addr < A_SW_BASE + 8'(NUM_LATCH))
              sw_byte[3'(addr - A_SW_BASE)] <= data[7:0];
          end
        endcase
      end
    end
  end
endmodule
