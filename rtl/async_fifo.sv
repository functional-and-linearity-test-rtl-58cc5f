// async_fifo: dual-clock FIFO separating the tester's clock domains.
//
// The tester has three clock domains (optical link 40 MHz, FPGA global
// 40 MHz, USB link 33 MHz) and separates them with FIFOs. This FIFO uses
// binary pointers in each domain, Gray-coded copies passed through two
// flip-flop synchronisers, and one extra pointer bit to tell full from
// empty. The read side is first-word-fall-through: rd_data shows the head
// entry whenever empty is low, and rd_en pops it. wr_free is the number of
// free entries as seen from the write side (pessimistic by the
// synchronisation delay). Writes when full and reads when empty are
// ignored. Depth and width are this design's choices.
module async_fifo #(
  parameter int unsigned WIDTH      = 21,
  parameter int unsigned DEPTH_LOG2 = 6
) (
  input  logic                  wclk,
  input  logic                  wrst,
  input  logic                  wr_en,
  input  logic [WIDTH-1:0]      wr_data,
  output logic                  full,
  output logic [DEPTH_LOG2:0]   wr_free,
  input  logic                  rclk,
  input  logic                  rrst,
  input  logic                  rd_en,
  output logic [WIDTH-1:0]      rd_data,
  output logic                  empty
);
  localparam int unsigned DEPTH = 1 << DEPTH_LOG2;
  typedef logic [DEPTH_LOG2:0] ptr_t;

  logic [WIDTH-1:0] mem [DEPTH];

  ptr_t wbin, wgray, rbin, rgray;
  ptr_t rgray_w1, rgray_w2, wgray_r1, wgray_r2;

  function automatic ptr_t bin2gray(ptr_t b);
    return b ^ (b >> 1);
  endfunction

  function automatic ptr_t gray2bin(ptr_t g);
    ptr_t b;
    b[DEPTH_LOG2] = g[DEPTH_LOG2];
    for (int i = int'(DEPTH_LOG2) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // write side
  ptr_t rbin_w;
  assign rbin_w  = gray2bin(rgray_w2);
  assign full    = (wbin - rbin_w) == ptr_t'(DEPTH);
  assign wr_free = ptr_t'(DEPTH) - (wbin - rbin_w);

  always_ff @(posedge wclk) begin
    if (wr_en && !full) mem[wbin[DEPTH_LOG2-1:0]] <= wr_data;
  end

  always_ff @(posedge wclk) begin
    if (wrst) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (wr_en && !full) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  // read side
  assign empty   = (rgray == wgray_r2);
  assign rd_data = mem[rbin[DEPTH_LOG2-1:0]];

  always_ff @(posedge rclk) begin
    if (rrst) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (rd_en && !empty) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end
endmodule
