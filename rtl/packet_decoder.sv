// packet_decoder: assembles and unpacks tunnel-card packets in the system
// clock domain.
//
// Reads tagged words from a link's clock-crossing FIFO (first-word-fall-
// through, one word per cycle), collects the twenty words of a packet and,
// one cycle after the last word, presents them for one cycle on pkt_valid:
// the raw words, the header (card ID, packet ID, 32 status bits, CRC and
// code error flags) and the unpacked counters and ADC samples of the
// eight channels (layout in blecft_pkg). Every complete packet is
// presented, flagged or not; consumers that need good data check the
// flags. ev pulses once per packet: EV_OK for a clean packet, EV_CRC and
// EV_CODE for its errors, EV_LEN for a length marker from the receiver.
// What the packet contains follows the published description; the field
// order is this design's own.
module packet_decoder
  import blecft_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        fifo_empty,
  input  rx_word_t    fifo_data,
  output logic        fifo_rd,
  output logic        pkt_valid,
  output pkt_hdr_t    hdr,
  output cnt_t        cnt [NUM_CH],
  output adc_t        adc [NUM_CH],
  output logic [15:0] words [PKT_WORDS],
  output logic [NUM_EV-1:0] ev
);
  localparam int unsigned IW = $clog2(PKT_WORDS + 1);

  logic [15:0]   buf_q [PKT_WORDS];
  logic [IW-1:0] idx;
  logic          active;
  logic          crc_q, code_q;

  assign fifo_rd = !fifo_empty;

  always_ff @(posedge clk) begin
    if (rst) begin
      idx       <= '0;
      active    <= 1'b0;
      pkt_valid <= 1'b0;
      ev        <= '0;
      crc_q     <= 1'b0;
      code_q    <= 1'b0;
      for (int i = 0; i < int'(PKT_WORDS); i++) buf_q[i] <= '0;
    end else begin
      pkt_valid <= 1'b0;
      ev        <= '0;
      if (!fifo_empty) begin
        if (fifo_data.len_err) begin
          active      <= 1'b0;
          ev[EV_LEN]  <= 1'b1;
        end else if (fifo_data.sop) begin
          buf_q[0] <= fifo_data.data;
          idx      <= IW'(1);
          active   <= 1'b1;
        end else if (active) begin
          if (idx < IW'(PKT_WORDS)) buf_q[idx[$clog2(PKT_WORDS)-1:0]] <= fifo_data.data;
          idx <= idx + 1'b1;
          if (fifo_data.eop) begin
            active       <= 1'b0;
            pkt_valid    <= 1'b1;
            crc_q        <= fifo_data.crc_err;
            code_q       <= fifo_data.code_err;
            ev[EV_OK]    <= !fifo_data.crc_err && !fifo_data.code_err;
            ev[EV_CRC]   <= fifo_data.crc_err;
            ev[EV_CODE]  <= fifo_data.code_err;
          end
        end
      end
    end
  end

  // unpacking of the assembled words
  logic [16*(W_CRC-W_ADC)-1:0] adc_bits;
  always_comb begin
    for (int i = 0; i < int'(PKT_WORDS); i++) words[i] = buf_q[i];
    for (int w = 0; w < int'(W_CRC - W_ADC); w++)
      adc_bits[16*(W_CRC-W_ADC-1-w) +: 16] = buf_q[W_ADC + w];
    for (int c = 0; c < int'(NUM_CH); c++) begin
      cnt[c] = buf_q[W_CNT + c];
      adc[c] = adc_bits[$bits(adc_bits) - ADC_W*(c+1) +: ADC_W];
    end
  end

  // header fields straight from the buffer
  always_comb begin
    hdr.card_id  = buf_q[W_CARD];
    hdr.pkt_id   = buf_q[W_PKTID];
    hdr.status   = {buf_q[W_STAT], buf_q[W_STAT+1]};
    hdr.crc_err  = crc_q;
    hdr.code_err = code_q;
  end
endmodule
