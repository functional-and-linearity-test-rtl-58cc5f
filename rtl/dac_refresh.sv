// dac_refresh: continuous update of the two DACs from their registers.
//
// To keep the logic and the software simple the FPGA refreshes the DACs
// all the time: the software only writes a new code into a register, and
// the next pass of the refresh puts it on the DAC output. The two DACs
// share their clock and data lines; each has its own frame select.
// This block walks through the NUM_DAC*DAC_CH channel slots in turn
// (slot s is DAC s/DAC_CH, channel s%DAC_CH). For each it sends a 24-bit
// frame {4'b0011 (write and update channel), 4-bit channel, 16-bit code},
// MSB first, with sync_n of that DAC low for the 24 bits. sclk runs at
// half the system clock: sdi changes while sclk is low and the DAC
// samples on the rising edge. Two idle clocks with all sync_n high
// separate frames, so one slot takes 50 clocks and a full pass of 16
// slots 800 clocks (20 us at 40 MHz). The code is sampled when its frame
// starts; frame_done pulses after each frame with slot giving its number.
// The serial format, the frame command and the clock rate are this
// design's choices; the shared lines and the continuous refresh follow
// the published description.
module dac_refresh
  import blecft_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] values [NUM_DAC*DAC_CH],
  output logic        sclk,
  output logic        sdi,
  output logic [NUM_DAC-1:0] sync_n,
  output logic        frame_done,
  output logic [$clog2(NUM_DAC*DAC_CH)-1:0] slot
);
  localparam int unsigned NSLOT = NUM_DAC * DAC_CH;
  localparam int unsigned FBITS = 24;
  localparam int unsigned CYC   = 2 * FBITS + 2;

  logic [5:0]       cnt;
  logic [FBITS-1:0] sh, frame;

  assign frame = {4'b0011, 4'(32'(slot) % DAC_CH), values[slot]};

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt <= '0; slot <= '0; sh <= '0;
      sclk <= 1'b0; sdi <= 1'b0; sync_n <= '1; frame_done <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      cnt <= (cnt == 6'(CYC - 1)) ? '0 : cnt + 1'b1;
      if (cnt == '0) sh <= frame;
      if (cnt < 6'(2 * FBITS)) begin
        sync_n <= ~(NUM_DAC'(1) << (32'(slot) / DAC_CH));
        sclk   <= cnt[0];
        if (cnt == '0)   sdi <= frame[FBITS-1];
        else if (!cnt[0]) sdi <= sh[5'(FBITS - 1) - 5'(cnt[5:1])];
      end else begin
        sync_n <= '1;
        sclk   <= 1'b0;
        sdi    <= 1'b0;
      end
      if (cnt == 6'(2 * FBITS)) frame_done <= 1'b1;
      if (cnt == 6'(CYC - 1)) slot <= (32'(slot) == NSLOT - 1) ? '0 : slot + 1'b1;
    end
  end
endmodule
