// optical_rx: receive side of one optical link, in the link clock domain.
//
// The tunnel card sends a 20-word packet every 40 us over an 8b/10b link;
// a TLK1501 transceiver delivers it as 16-bit words at 40 MHz together
// with RX_DV and RX_ER. This block follows the TLK1501 status coding:
//   RX_DV=1 RX_ER=0  data word          RX_DV=0 RX_ER=0  idle
//   RX_DV=1 RX_ER=1  word with a code error
//   RX_DV=0 RX_ER=1  carrier extend / loss of synchronisation
// A packet is a run of data words between idles. Each word is written to
// the clock-crossing FIFO with its tags (see rx_word_t): sop on the first
// word, eop on the twentieth, where the CRC-32 of words 0..17 is compared
// with words 18..19 and the crc_err and code_err flags are given. A run
// that ends early, or runs past twenty words, adds one marker entry with
// eop and len_err set (the first twenty words of a long run have already
// been passed on). link_up rises after LOCK_CYCLES cycles without a
// RX_DV=0/RX_ER=1 cycle and falls on such a cycle.
// The packet length follows the published description; the framing by
// idles, the CRC choice, the error classes and the lock rule are this
// design's own. Outputs are registered: one cycle from rx_data to
// fifo_wr.
module optical_rx
  import blecft_pkg::*;
#(
  parameter int unsigned PKT_LEN     = PKT_WORDS,
  parameter int unsigned LOCK_CYCLES = 16
) (
  input  logic        rx_clk,
  input  logic        rx_rst,
  input  logic [15:0] rx_data,
  input  logic        rx_dv,
  input  logic        rx_er,
  output logic        fifo_wr,
  output rx_word_t    fifo_data,
  output logic        link_up
);
  localparam int unsigned CW = $clog2(PKT_LEN + 1);

  logic          in_pkt, over;
  logic [CW-1:0] cnt;          // words of the current packet seen so far
  logic [31:0]   crc;
  logic [15:0]   crc_hi;       // word PKT_LEN-2
  logic          code_err;
  logic [$clog2(LOCK_CYCLES+1)-1:0] lock_cnt;

  always_ff @(posedge rx_clk) begin
    if (rx_rst) begin
      in_pkt   <= 1'b0;
      over     <= 1'b0;
      cnt      <= '0;
      crc      <= CRC_INIT;
      crc_hi   <= '0;
      code_err <= 1'b0;
      fifo_wr  <= 1'b0;
      fifo_data <= '0;
      lock_cnt <= '0;
      link_up  <= 1'b0;
    end else begin
      fifo_wr   <= 1'b0;
      fifo_data <= '0;

      // link synchronisation
      if (!rx_dv && rx_er) begin
        lock_cnt <= '0;
        link_up  <= 1'b0;
      end else if (lock_cnt < ($bits(lock_cnt))'(LOCK_CYCLES)) begin
        lock_cnt <= lock_cnt + 1'b1;
      end else begin
        link_up <= 1'b1;
      end

      if (rx_dv) begin
        if (!in_pkt) begin
          in_pkt   <= 1'b1;
          over     <= 1'b0;
          cnt      <= CW'(1);
          crc      <= crc32_word(CRC_INIT, rx_data);
          code_err <= rx_er;
          fifo_wr  <= 1'b1;
          fifo_data.sop  <= 1'b1;
          fifo_data.data <= rx_data;
        end else if (cnt < CW'(PKT_LEN)) begin
          cnt      <= cnt + 1'b1;
          if (cnt < CW'(PKT_LEN - 2)) crc <= crc32_word(crc, rx_data);
          if (cnt == CW'(PKT_LEN - 2)) crc_hi <= rx_data;
          fifo_wr  <= 1'b1;
          fifo_data.data <= rx_data;
          if (cnt == CW'(PKT_LEN - 1)) begin
            fifo_data.eop      <= 1'b1;
            fifo_data.crc_err  <= ({crc_hi, rx_data} != crc);
            fifo_data.code_err <= code_err | rx_er;
          end else begin
            code_err <= code_err | rx_er;
          end
        end else if (!over) begin
          over    <= 1'b1;
          fifo_wr <= 1'b1;
          fifo_data.eop     <= 1'b1;
          fifo_data.len_err <= 1'b1;
        end
      end else if (in_pkt) begin
        in_pkt <= 1'b0;
        if (cnt < CW'(PKT_LEN)) begin
          fifo_wr <= 1'b1;
          fifo_data.eop     <= 1'b1;
          fifo_data.len_err <= 1'b1;
        end
      end
    end
  end
endmodule
