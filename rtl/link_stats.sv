// link_stats: error and packet counters of one optical link.
//
// The tester reports how many packets arrived with a wrong CRC and what
// kind of reception errors occurred. This block keeps one saturating
// counter per event class (good packets, CRC errors, code errors, length
// errors, packets dropped because the upload path was full, losses of
// link synchronisation). Each ev bit
// is a one-cycle pulse and adds one to its counter; clear zeroes all
// counters and wins over a simultaneous event. Counts are visible the
// cycle after the event. Counter width and saturation are this design's
// choices.
module link_stats
  import blecft_pkg::*;
#(
  parameter int unsigned COUNT_W = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clear,
  input  logic [NUM_EV-1:0] ev,
  output logic [COUNT_W-1:0] counts [NUM_EV]
);
  always_ff @(posedge clk) begin
    for (int i = 0; i < int'(NUM_EV); i++) begin
      if (rst || clear)                     counts[i] <= '0;
      else if (ev[i] && counts[i] != '1)    counts[i] <= counts[i] + 1'b1;
    end
  end
endmodule
