// blecft_pkg: types and constants shared by the BLECFT tester FPGA.
//
// The tunnel card sends a packet of twenty 16-bit words every 40 us over
// an 8b/10b optical link (TLK1501 parallel interface, 16 bits at 40 MHz).
// The packet carries a card ID, a packet ID, status bits, the current-to-
// frequency counters and the ADC samples of eight channels, and a CRC.
// Those contents, the word count and the channel count follow the
// published description of the tester; the order of the fields inside the
// packet, the CRC polynomial and the register map below are this design's
// own choices.
//
// Packet layout (word index : content)
//   0       card ID
//   1       packet ID
//   2..3    status, 32 bits (word 2 = bits 31..16)
//   4..11   CFC counter of channel 0..7 (16 bits each)
//   12..17  ADC samples of channel 0..7, 12 bits each, packed MSB first
//   18..19  CRC-32 over words 0..17 (word 18 = bits 31..16)
package blecft_pkg;

  localparam int unsigned NUM_CH    = 8;
  localparam int unsigned NUM_LINKS = 2;
  localparam int unsigned PKT_WORDS = 20;
  localparam int unsigned CNT_W     = 16;
  localparam int unsigned ADC_W     = 12;
  localparam int unsigned MEAS_W    = CNT_W + ADC_W;   // 28

  localparam int unsigned W_CARD  = 0;
  localparam int unsigned W_PKTID = 1;
  localparam int unsigned W_STAT  = 2;
  localparam int unsigned W_CNT   = 4;
  localparam int unsigned W_ADC   = 12;
  localparam int unsigned W_CRC   = 18;

  // CRC-32 (polynomial 0x04C11DB7, initial value all ones, MSB first,
  // no reflection, no final inversion) updated with one 16-bit word.
  localparam logic [31:0] CRC_POLY = 32'h04C1_1DB7;
  localparam logic [31:0] CRC_INIT = 32'hFFFF_FFFF;

  function automatic logic [31:0] crc32_word(logic [31:0] crc, logic [15:0] w);
    logic [31:0] c;
    c = crc;
    for (int i = 15; i >= 0; i--) begin
      if (c[31] ^ w[i]) c = (c << 1) ^ CRC_POLY;
      else              c = c << 1;
    end
    return c;
  endfunction

  // Word passed from a link receiver to the system clock domain.
  typedef struct packed {
    logic        sop;       // first word of a packet
    logic        eop;       // last entry of a packet; error flags valid
    logic        crc_err;
    logic        code_err;
    logic        len_err;   // marker entry: packet too short or too long
    logic [15:0] data;
  } rx_word_t;

  typedef logic [CNT_W-1:0]  cnt_t;
  typedef logic [ADC_W-1:0]  adc_t;
  typedef logic [MEAS_W-1:0] meas_t;

  typedef struct packed {
    logic [15:0] card_id;
    logic [15:0] pkt_id;
    logic [31:0] status;
    logic        crc_err;
    logic        code_err;
  } pkt_hdr_t;

  // Operating modes selected by the readout multiplexer.
  typedef enum logic [1:0] {
    MODE_FRAME = 2'd0,   // raw packets to the PC
    MODE_RMAX  = 2'd1,   // Running Maxima dumps
    MODE_SCOPE = 2'd2    // one channel over a window
  } mode_e;

  // Tags in the upper nibble of the header word of each upload record.
  localparam logic [3:0] TAG_FRAME = 4'h1;
  localparam logic [3:0] TAG_RMAX  = 4'h2;
  localparam logic [3:0] TAG_SCOPE = 4'h3;

  // Register map of the control link (8-bit address, 16-bit data).
  localparam logic [7:0] A_MODE      = 8'h00;  // [1:0] mode, [4] link select
  localparam logic [7:0] A_CMD       = 8'h01;  // write-one pulses, see CMD_*
  localparam logic [7:0] A_SCOPE_CH  = 8'h02;
  localparam logic [7:0] A_SCOPE_LEN = 8'h03;
  localparam logic [7:0] A_HARM_STEP = 8'h04;
  localparam logic [7:0] A_HARM_AMP  = 8'h05;
  localparam logic [7:0] A_HARM_CTL  = 8'h06;  // [0] enable, [3:0]@[7:4] DAC slot
  localparam logic [7:0] A_DAC_BASE  = 8'h10;  // 0x10..0x1F DAC channel codes
  localparam logic [7:0] A_SW_BASE   = 8'h20;  // 0x20.. relay/switch latch bytes

  localparam int unsigned CMD_DUMP_MAX  = 0;
  localparam int unsigned CMD_SCOPE_ARM = 1;
  localparam int unsigned CMD_STAT_CLR  = 2;
  localparam int unsigned CMD_RS_CLR    = 3;

  localparam int unsigned NUM_DAC   = 2;
  localparam int unsigned DAC_CH    = 8;
  localparam int unsigned NUM_LATCH = 6;

  // Register contents seen by the rest of the FPGA.
  typedef struct packed {
    mode_e       mode;
    logic        link_sel;
    logic [2:0]  scope_ch;
    logic [15:0] scope_len;
    logic [15:0] harm_step;
    logic [15:0] harm_amp;
    logic        harm_en;
    logic [3:0]  harm_slot;
    logic        dump_max;    // one-cycle pulses
    logic        scope_arm;
    logic        stat_clr;
    logic        rs_clr;
  } cfg_t;

  // Events counted per link by link_stats.
  localparam int unsigned EV_OK   = 0;
  localparam int unsigned EV_CRC  = 1;
  localparam int unsigned EV_CODE = 2;
  localparam int unsigned EV_LEN  = 3;
  localparam int unsigned EV_DROP = 4;
  localparam int unsigned EV_LOSS = 5;   // link lost synchronisation
  localparam int unsigned NUM_EV  = 6;

endpackage
