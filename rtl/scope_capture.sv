// scope_capture: oscilloscope mode record of one channel.
//
// The oscilloscope mode shows every 40 us value of one chosen channel over
// a window. After arm, the counter and ADC sample of channel ch of each
// following good packet are written to a buffer, one entry per packet,
// until len entries are held (len = 0 or len > DEPTH means DEPTH); then
// done pulses for one clock and count gives the number of entries. The
// channel and length are taken at arm. A new arm restarts the record.
// rd_addr reads an entry combinationally as {counter, ADC}. The buffer
// depth is this design's choice.
module scope_capture
  import blecft_pkg::*;
#(
  parameter int unsigned DEPTH = 1024
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        arm,
  input  logic [$clog2(NUM_CH)-1:0]   ch,
  input  logic [15:0]                 len,
  input  logic                        in_valid,
  input  cnt_t                        cnt [NUM_CH],
  input  adc_t                        adc [NUM_CH],
  output logic                        armed,
  output logic                        done,
  output logic [$clog2(DEPTH):0]      count,
  input  logic [$clog2(DEPTH)-1:0]    rd_addr,
  output logic [CNT_W+ADC_W-1:0]      rd_data
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [CNT_W+ADC_W-1:0]  buf_mem [DEPTH];
  logic [$clog2(NUM_CH)-1:0] ch_q;
  logic [AW:0]             target;

  assign rd_data = buf_mem[rd_addr];

  always_ff @(posedge clk) begin
    if (armed && in_valid) buf_mem[count[AW-1:0]] <= {cnt[ch_q], adc[ch_q]};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      armed  <= 1'b0;
      done   <= 1'b0;
      count  <= '0;
      ch_q   <= '0;
      target <= (AW+1)'(DEPTH);
    end else begin
      done <= 1'b0;
      if (arm) begin
        armed  <= 1'b1;
        count  <= '0;
        ch_q   <= ch;
        target <= (len == 16'd0 || 32'(len) > DEPTH) ? (AW+1)'(DEPTH) : (AW+1)'(len);
      end else if (armed && in_valid) begin
        count <= count + 1'b1;
        if (count + 1'b1 == target) begin
          armed <= 1'b0;
          done  <= 1'b1;
        end
      end
    end
  end
endmodule
