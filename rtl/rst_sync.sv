// rst_sync: turns the board's asynchronous active-low reset into a reset
// that is asserted at once and released synchronously to one clock domain,
// after two clock edges. One instance serves each clock domain of the
// tester.
module rst_sync (
  input  logic clk,
  input  logic rst_n,
  output logic rst
);
  logic [1:0] sr;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sr <= 2'b11;
    else        sr <= {sr[0], 1'b0};
  end
  assign rst = sr[1];
endmodule
