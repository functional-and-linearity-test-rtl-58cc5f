// latch_refresh: drives the relays and analog switches through external
// latches that share one 8-bit bus.
//
// To save FPGA pins the relay and switch controls (current range
// selection, current inversion, supply lowering and the like) are
// multiplexed: the register bytes are written one after the other onto a
// shared bus, each into its own external 8-bit latch. Like the DACs, the
// latches are refreshed continuously, so a register write reaches its
// latch within one pass. Each latch gets a 4-clock slot: the byte is put
// on the bus, le of that latch is high during the second and third clock,
// and the byte is held one more clock after le falls. A pass over
// NUM_LATCH latches takes 4*NUM_LATCH clocks. The latch count and the slot
// timing are this design's choices.
module latch_refresh
  import blecft_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  logic [7:0]           bytes [NUM_LATCH],
  output logic [7:0]           bus,
  output logic [NUM_LATCH-1:0] le
);
  logic [1:0]                     ph;
  logic [$clog2(NUM_LATCH)-1:0]   idx;

  always_ff @(posedge clk) begin
    if (rst) begin
      ph <= '0; idx <= '0; bus <= '0; le <= '0;
    end else begin
      ph <= ph + 1'b1;
      if (ph == 2'd3) idx <= (32'(idx) == NUM_LATCH - 1) ? '0 : idx + 1'b1;
      if (ph == 2'd0) bus <= bytes[idx];
      le <= (ph == 2'd0 || ph == 2'd1) ? NUM_LATCH'(1) << idx : '0;
    end
  end
endmodule
