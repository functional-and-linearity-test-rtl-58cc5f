// running_sums: Running Maxima processing of the eight channels.
//
// For every channel the block keeps NUM_RS running sums of the 40 us
// measurements, each over a different number of the latest samples
// (RS_LEN), and the largest value each sum has reached since the last
// snapshot. This mirrors the surface processing of the LHC beam loss
// monitors, which the tester runs on eight channels instead of sixteen.
//
// How it works: each window k has a delay line in memory holding the last
// RS_LEN[k] measurements of every channel (address ch*RS_LEN[k] + ptr[k]).
// When a new set of measurements arrives the channels are processed one
// after the other, two clocks each: the oldest sample is read, then
// sum += new - oldest, the new sample replaces the oldest, and the maximum
// is updated. After the last channel every window's pointer advances.
// in_valid is taken in one clock while the block is idle, and busy is then
// high for 2*NUM_CH clocks (16 for eight channels), far below the 40 us
// packet period (1600 clocks at 40 MHz). After reset or clear the delay lines are
// zeroed, which takes NUM_CH*max(RS_LEN) clocks; busy is high meanwhile
// and measurements arriving then are ignored.
//
// snap copies all maxima to the readout registers (rd_ch/rd_rs select one,
// combinationally) and restarts the maxima; if an update is under way the
// snapshot is taken right after it, and snap_done pulses.
//
// The window lengths are this design's choice (the first six windows of
// the LHC system, 40 us to 10.24 ms); so are the widths and the delay-line
// structure.
module running_sums
  import blecft_pkg::*;
#(
  parameter int unsigned NUM_RS = 6,
  parameter int unsigned RS_LEN [NUM_RS] = '{1, 2, 8, 16, 64, 256},
  parameter int unsigned MAX_LEN = 256,     // largest entry of RS_LEN
  parameter int unsigned SUM_W  = MEAS_W + $clog2(MAX_LEN)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clear,
  input  logic             in_valid,
  input  meas_t            meas [NUM_CH],
  input  logic             snap,
  output logic             snap_done,
  input  logic [$clog2(NUM_CH)-1:0] rd_ch,
  input  logic [$clog2(NUM_RS)-1:0] rd_rs,
  output logic [SUM_W-1:0] rd_max,
  output logic [SUM_W-1:0] rd_sum,
  output logic             busy
);
  localparam int unsigned CHW = $clog2(NUM_CH);
  localparam int unsigned AW  = $clog2(NUM_CH * MAX_LEN);
  localparam int unsigned PW  = (MAX_LEN > 1) ? $clog2(MAX_LEN) : 1;

  typedef enum logic [1:0] {S_CLR, S_IDLE, S_RD, S_UPD} state_e;
  state_e state;

  logic [CHW-1:0]   ch;
  logic [AW:0]      clr_addr;
  logic             snap_pend;
  meas_t            in_q [NUM_CH];

  logic [SUM_W-1:0] sum_q  [NUM_CH][NUM_RS];
  logic [SUM_W-1:0] max_q  [NUM_CH][NUM_RS];
  logic [SUM_W-1:0] snap_q [NUM_CH][NUM_RS];
  meas_t            old_q  [NUM_RS];
  logic [PW-1:0]    ptr    [NUM_RS];

  assign busy   = (state != S_IDLE);
  assign rd_max = snap_q[rd_ch][rd_rs];
  assign rd_sum = sum_q[rd_ch][rd_rs];

  // one delay-line memory per window
  for (genvar k = 0; k < NUM_RS; k++) begin : g_win
    localparam int unsigned DEPTH = NUM_CH * RS_LEN[k];
    meas_t       hist [DEPTH];
    localparam int unsigned WAW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
    logic [AW:0]    addr;
    logic [WAW-1:0] waddr;
    assign waddr = WAW'(addr);
    always_comb begin
      if (state == S_CLR) addr = clr_addr;
      else                addr = (AW+1)'(ch * RS_LEN[k]) + (AW+1)'(ptr[k]);
    end
    always_ff @(posedge clk) begin
      if (state == S_CLR) begin
        if (addr < (AW+1)'(DEPTH)) hist[waddr] <= '0;
      end else if (state == S_RD) begin
        old_q[k] <= hist[waddr];
      end else if (state == S_UPD) begin
        hist[waddr] <= in_q[ch];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      state     <= S_CLR;
      clr_addr  <= '0;
      ch        <= '0;
      snap_pend <= 1'b0;
      snap_done <= 1'b0;
      for (int c = 0; c < int'(NUM_CH); c++) begin
        in_q[c] <= '0;
        for (int k = 0; k < int'(NUM_RS); k++) begin
          sum_q[c][k] <= '0;
          max_q[c][k] <= '0;
          if (rst) snap_q[c][k] <= '0;
        end
      end
      for (int k = 0; k < int'(NUM_RS); k++) ptr[k] <= '0;
    end else begin
      snap_done <= 1'b0;
      if (snap) snap_pend <= 1'b1;
      unique case (state)
        S_CLR: begin
          clr_addr <= clr_addr + 1'b1;
          if (clr_addr == (AW+1)'(NUM_CH * MAX_LEN - 1)) state <= S_IDLE;
        end
        S_IDLE: begin
          if (snap || snap_pend) begin
            snap_pend <= 1'b0;
            snap_done <= 1'b1;
            for (int c = 0; c < int'(NUM_CH); c++)
              for (int k = 0; k < int'(NUM_RS); k++) begin
                snap_q[c][k] <= max_q[c][k];
                max_q[c][k]  <= '0;
              end
          end else if (in_valid) begin
            for (int c = 0; c < int'(NUM_CH); c++) in_q[c] <= meas[c];
            ch    <= '0;
            state <= S_RD;
          end
        end
        S_RD: state <= S_UPD;
        S_UPD: begin
          for (int k = 0; k < int'(NUM_RS); k++) begin
            logic [SUM_W-1:0] s;
            s = sum_q[ch][k] + SUM_W'(in_q[ch]) - SUM_W'(old_q[k]);
            sum_q[ch][k] <= s;
            if (s > max_q[ch][k]) max_q[ch][k] <= s;
          end
          if (ch == CHW'(NUM_CH - 1)) begin
            for (int k = 0; k < int'(NUM_RS); k++)
              ptr[k] <= (ptr[k] == PW'(RS_LEN[k] - 1)) ? '0 : ptr[k] + 1'b1;
            state <= S_IDLE;
          end else begin
            ch    <= ch + 1'b1;
            state <= S_RD;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
