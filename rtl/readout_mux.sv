// readout_mux: chooses what the PC receives over the high-speed USB link.
//
// The processing runs all the time (Running Maxima keeps going while raw
// packets are shown), and a multiplexer selected by the mode register
// decides what goes up. Each upload is a record: a tag word
// {tag, 9'b0, link_up[1:0], link}, a length word (number of words that
// follow), then the data:
//   Frame Mode     every complete packet of the selected link: its 20
//                  words and a flag word {14'b0, crc_err, code_err}.
//                  A packet is written only if the upload FIFO has room
//                  for the whole record; otherwise it is dropped and drop
//                  pulses.
//   Running Maxima on dump_req: the running sums are asked for a snapshot
//                  (rs_snap / rs_snap_done); the record holds the card ID,
//                  packet ID and 32 status bits of the last good packet
//                  (4 words), then every channel's maxima,
//                  window by window, each as 3 words, most significant
//                  first (zero-extended to 48 bits), then the NUM_EV
//                  counters of each link.
//   Oscilloscope   when the capture completes: two words per entry,
//                  counter then {4'b0, ADC}.
// Maxima and scope records wait for FIFO room word by word. One word is
// written per clock while there is room. Requests that arrive while
// another record is being written are ignored, except a dump request,
// which is held. The record format is this design's choice.
module readout_mux
  import blecft_pkg::*;
#(
  parameter int unsigned NUM_RS   = 6,
  parameter int unsigned SUM_W    = 36,
  parameter int unsigned SCOPE_AW = 10,
  parameter int unsigned FREE_W   = 8
) (
  input  logic                       clk,
  input  logic                       rst,
  input  mode_e                      mode,
  input  logic                       link_sel,
  // frame source
  input  logic                       frame_valid,
  input  logic [15:0]                frame_words [PKT_WORDS],
  input  logic                       frame_crc_err,
  input  logic                       frame_code_err,
  // running maxima source
  input  logic                       dump_req,
  output logic                       rs_snap,
  input  logic                       rs_snap_done,
  output logic [$clog2(NUM_CH)-1:0]  rs_ch,
  output logic [$clog2(NUM_RS)-1:0]  rs_rs,
  input  logic [SUM_W-1:0]           rs_max,
  input  logic [15:0]                stats [NUM_LINKS][NUM_EV],
  input  pkt_hdr_t                   card_hdr,
  input  logic [NUM_LINKS-1:0]       link_up,
  // oscilloscope source
  input  logic                       scope_done,
  input  logic [SCOPE_AW:0]          scope_count,
  output logic [SCOPE_AW-1:0]        scope_addr,
  input  logic [CNT_W+ADC_W-1:0]     scope_data,
  // upload FIFO
  input  logic [FREE_W-1:0]          up_free,
  output logic                       up_wr,
  output logic [15:0]                up_data,
  output logic                       drop
);
  localparam int unsigned FRAME_LEN = PKT_WORDS + 1;
  localparam int unsigned RMAX_LEN  = 4 + NUM_CH * NUM_RS * 3 + NUM_LINKS * NUM_EV;

  typedef enum logic [2:0] {S_IDLE, S_FRAME, S_SNAP, S_CARD, S_RMAX, S_STATS, S_SCOPE} state_e;
  state_e state;

  logic [15:0] fbuf [FRAME_LEN];
  logic [15:0] pos;          // word of the record being written
  logic [15:0] rec_len;      // data words after the two header words
  logic [3:0]  tag;
  logic [1:0]  part;
  logic [$clog2(NUM_LINKS > 1 ? NUM_LINKS : 2)-1:0] lk;
  logic [$clog2(NUM_EV)-1:0] evi;
  logic        dump_pend;
  logic [47:0] max48;
  logic [15:0] word;
  logic        can_wr;

  assign max48  = 48'(rs_max);
  assign can_wr = (up_free != '0);

  // word of the current record
  always_comb begin
    word = '0;
    if (pos == 16'd0)      word = {tag, 9'b0, 2'(link_up), link_sel};
    else if (pos == 16'd1) word = rec_len;
    else begin
      unique case (state)
        S_FRAME: word = fbuf[5'(pos - 16'd2)];
        S_CARD:  word = (pos == 16'd2) ? card_hdr.card_id :
                        (pos == 16'd3) ? card_hdr.pkt_id :
                        (pos == 16'd4) ? card_hdr.status[31:16] : card_hdr.status[15:0];
        S_RMAX:  word = (part == 2'd0) ? max48[47:32] : (part == 2'd1) ? max48[31:16] : max48[15:0];
        S_STATS: word = stats[lk][evi];
        S_SCOPE: word = part[0] ? {4'b0, scope_data[ADC_W-1:0]} : scope_data[CNT_W+ADC_W-1:ADC_W];
        default: word = '0;
      endcase
    end
  end

  assign up_data = word;
  assign up_wr   = can_wr && (state inside {S_FRAME, S_CARD, S_RMAX, S_STATS, S_SCOPE});
  assign rs_snap = (state == S_IDLE) && (dump_req || dump_pend) && mode == MODE_RMAX;

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      pos       <= '0;
      rec_len   <= '0;
      tag       <= '0;
      part      <= '0;
      rs_ch     <= '0;
      rs_rs     <= '0;
      lk        <= '0;
      evi       <= '0;
      scope_addr <= '0;
      dump_pend <= 1'b0;
      drop      <= 1'b0;
      for (int i = 0; i < int'(FRAME_LEN); i++) fbuf[i] <= '0;
    end else begin
      drop <= 1'b0;
      if (dump_req && state != S_IDLE) dump_pend <= 1'b1;
      unique case (state)
        S_IDLE: begin
          pos <= '0; part <= '0; rs_ch <= '0; rs_rs <= '0; lk <= '0; evi <= '0;
          scope_addr <= '0;
          if (rs_snap) begin
            dump_pend <= 1'b0;
            state     <= S_SNAP;
          end else if (mode == MODE_FRAME && frame_valid) begin
            if (32'(up_free) >= FRAME_LEN + 2) begin
              for (int i = 0; i < int'(PKT_WORDS); i++) fbuf[i] <= frame_words[i];
              fbuf[PKT_WORDS] <= {14'b0, frame_crc_err, frame_code_err};
              tag     <= TAG_FRAME;
              rec_len <= 16'(FRAME_LEN);
              state   <= S_FRAME;
            end else begin
              drop <= 1'b1;
            end
          end else if (mode == MODE_SCOPE && scope_done) begin
            tag     <= TAG_SCOPE;
            rec_len <= 16'({scope_count, 1'b0});
            state   <= S_SCOPE;
          end
        end
        S_SNAP: if (rs_snap_done) begin
          tag     <= TAG_RMAX;
          rec_len <= 16'(RMAX_LEN);
          state   <= S_CARD;
        end
        S_CARD: if (can_wr) begin
          pos <= pos + 1'b1;
          if (pos == 16'd5) state <= S_RMAX;
        end
        S_FRAME: if (can_wr) begin
          pos <= pos + 1'b1;
          if (pos == 16'(FRAME_LEN + 1)) state <= S_IDLE;
        end
        S_RMAX: if (can_wr) begin
          pos <= pos + 1'b1;
          begin
            if (part == 2'd2) begin
              part <= '0;
              if (32'(rs_rs) == NUM_RS - 1) begin
                rs_rs <= '0;
                if (32'(rs_ch) == NUM_CH - 1) state <= S_STATS;
                else rs_ch <= rs_ch + 1'b1;
              end else rs_rs <= rs_rs + 1'b1;
            end else part <= part + 1'b1;
          end
        end
        S_STATS: if (can_wr) begin
          pos <= pos + 1'b1;
          if (32'(evi) == NUM_EV - 1) begin
            evi <= '0;
            if (32'(lk) == NUM_LINKS - 1) state <= S_IDLE;
            else lk <= lk + 1'b1;
          end else evi <= evi + 1'b1;
        end
        S_SCOPE: if (can_wr) begin
          pos <= pos + 1'b1;
          if (pos >= 16'd2) begin
            part[0] <= ~part[0];
            if (part[0]) begin
              scope_addr <= scope_addr + 1'b1;
              if ({1'b0, scope_addr} + 1'b1 == scope_count) state <= S_IDLE;
            end
          end
          if (scope_count == '0 && pos == 16'd1) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
