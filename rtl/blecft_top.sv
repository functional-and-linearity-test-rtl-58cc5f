// blecft_top: FPGA of the BLECFT tester for the LHC beam loss monitor
// tunnel card.
//
// The tunnel card digitises eight ionisation-chamber currents and sends a
// 20-word packet every 40 us over two optical links. This FPGA receives
// both links, checks and decodes the packets, runs the Running Maxima
// processing of the LHC system on the selected link, and uploads raw
// packets (Frame Mode), maxima dumps with link statistics (Running
// Maxima) or the record of one channel (oscilloscope mode) to the PC over
// the 16-bit high-speed USB link. A slow software-driven 8-bit bus writes
// the configuration registers; from them the FPGA keeps refreshing the two
// current-source DACs and the relay/switch latches, and generates the
// sine used to modulate the chamber high voltage.
//
// Clock domains: rx_clk[i] (40 MHz, from each TLK1501), sys_clk (40 MHz
// FPGA clock) and usb_clk (33 MHz, from the USB module, which reads the
// upload FIFO with usb_rd; usb_data shows the head word while usb_empty is
// low). Dual-clock FIFOs separate them. rst_n is asynchronous and is
// released synchronously in every domain. link_up[i] is in the rx_clk[i]
// domain; a copy synchronised to sys_clk is reported in every upload
// record, and each loss of synchronisation is counted. Which DAC slot
// carries the sine is set by a register.
//
// Structure and roles follow the published description of the tester;
// packet layout, register map, upload record format, serial DAC format
// and Running Maxima window lengths are this design's choices (see the
// sub-modules).
module blecft_top
  import blecft_pkg::*;
#(
  parameter int unsigned RS_NUM     = 6,
  parameter int unsigned RS_LENS [RS_NUM] = '{1, 2, 8, 16, 64, 256},
  parameter int unsigned RS_MAXLEN  = 256,
  parameter int unsigned SCOPE_DEPTH = 1024,
  parameter int unsigned RXF_LOG2   = 6,
  parameter int unsigned UPF_LOG2   = 7
) (
  input  logic                   sys_clk,
  input  logic                   rst_n,
  // optical links (TLK1501 receive side)
  input  logic [NUM_LINKS-1:0]   rx_clk,
  input  logic [15:0]            rx_data [NUM_LINKS],
  input  logic [NUM_LINKS-1:0]   rx_dv,
  input  logic [NUM_LINKS-1:0]   rx_er,
  output logic [NUM_LINKS-1:0]   link_up,
  // high-speed USB upload
  input  logic                   usb_clk,
  input  logic                   usb_rd,
  output logic [15:0]            usb_data,
  output logic                   usb_empty,
  // slow control bus
  input  logic [7:0]             ctl_d,
  input  logic                   ctl_stb,
  input  logic                   ctl_start,
  // DACs (shared lines)
  output logic                   dac_sclk,
  output logic                   dac_sdi,
  output logic [NUM_DAC-1:0]     dac_sync_n,
  // relay / analog switch latches
  output logic [7:0]             sw_bus,
  output logic [NUM_LATCH-1:0]   sw_le
);
  localparam int unsigned SUM_W = MEAS_W + $clog2(RS_MAXLEN);
  localparam int unsigned SCOPE_AW = $clog2(SCOPE_DEPTH);

  logic sys_rst, usb_rst;
  rst_sync u_rst_sys (.clk(sys_clk), .rst_n, .rst(sys_rst));
  rst_sync u_rst_usb (.clk(usb_clk), .rst_n, .rst(usb_rst));

  // ---------------- control link and registers ----------------
  logic        c_wr;
  logic [7:0]  c_addr;
  logic [15:0] c_data;
  cfg_t        cfg;
  logic [15:0] dac_val [NUM_DAC*DAC_CH];
  logic [7:0]  sw_byte [NUM_LATCH];

  ctrl_bus_rx u_ctrl (.clk(sys_clk), .rst(sys_rst), .ctl_d, .ctl_stb, .ctl_start,
                      .wr(c_wr), .addr(c_addr), .data(c_data));
  reg_bank u_regs (.clk(sys_clk), .rst(sys_rst), .wr(c_wr), .addr(c_addr), .data(c_data),
                   .cfg, .dac_val, .sw_byte);

  // ---------------- optical links ----------------
  logic        pkt_valid [NUM_LINKS];
  pkt_hdr_t    hdr       [NUM_LINKS];
  cnt_t        cnt       [NUM_LINKS][NUM_CH];
  adc_t        adc       [NUM_LINKS][NUM_CH];
  logic [15:0] words     [NUM_LINKS][PKT_WORDS];
  logic [15:0] stats     [NUM_LINKS][NUM_EV];
  logic        up_drop;
  logic [NUM_LINKS-1:0] link_up_sys;

  for (genvar i = 0; i < NUM_LINKS; i++) begin : g_link
    logic     rx_rst, f_wr, f_empty, f_rd;
    rx_word_t f_wdata, f_rdata;
    logic [NUM_EV-1:0] ev, ev_all;

    rst_sync u_rst_rx (.clk(rx_clk[i]), .rst_n, .rst(rx_rst));

    optical_rx u_rx (.rx_clk(rx_clk[i]), .rx_rst, .rx_data(rx_data[i]), .rx_dv(rx_dv[i]),
                     .rx_er(rx_er[i]), .fifo_wr(f_wr), .fifo_data(f_wdata), .link_up(link_up[i]));

    async_fifo #(.WIDTH($bits(rx_word_t)), .DEPTH_LOG2(RXF_LOG2)) u_fifo (
      .wclk(rx_clk[i]), .wrst(rx_rst), .wr_en(f_wr), .wr_data(f_wdata), .full(), .wr_free(),
      .rclk(sys_clk), .rrst(sys_rst), .rd_en(f_rd), .rd_data(f_rdata), .empty(f_empty));

    packet_decoder u_dec (.clk(sys_clk), .rst(sys_rst), .fifo_empty(f_empty), .fifo_data(f_rdata),
                          .fifo_rd(f_rd), .pkt_valid(pkt_valid[i]), .hdr(hdr[i]), .cnt(cnt[i]),
                          .adc(adc[i]), .words(words[i]), .ev);

    // link state seen in the system domain; a falling edge is a loss
    logic [2:0] up_s;
    always_ff @(posedge sys_clk) begin
      if (sys_rst) up_s <= '0;
      else         up_s <= {up_s[1:0], link_up[i]};
    end
    assign link_up_sys[i] = up_s[1];

    always_comb begin
      ev_all = ev;
      ev_all[EV_DROP] = up_drop && (cfg.link_sel == 1'(i));
      ev_all[EV_LOSS] = up_s[2] && !up_s[1];
    end

    link_stats u_stats (.clk(sys_clk), .rst(sys_rst), .clear(cfg.stat_clr), .ev(ev_all),
                        .counts(stats[i]));
  end

  // ---------------- processing of the selected link ----------------
  logic sel;
  logic good;
  assign sel  = cfg.link_sel;
  assign good = pkt_valid[sel] && !hdr[sel].crc_err && !hdr[sel].code_err;

  // card ID, packet ID and status of the last good packet, for the dumps
  pkt_hdr_t card_hdr;
  always_ff @(posedge sys_clk) begin
    if (sys_rst)   card_hdr <= '0;
    else if (good) card_hdr <= hdr[sel];
  end

  logic  m_valid;
  meas_t meas [NUM_CH];
  meas_combine u_meas (.clk(sys_clk), .rst(sys_rst), .clear(cfg.rs_clr), .in_valid(good),
                       .cnt(cnt[sel]), .adc(adc[sel]), .out_valid(m_valid), .meas);

  logic                        rs_snap, rs_snap_done, rs_busy;
  logic [$clog2(NUM_CH)-1:0]   rs_ch;
  logic [$clog2(RS_NUM)-1:0]   rs_rs;
  logic [SUM_W-1:0]            rs_max, rs_sum;
  running_sums #(.NUM_RS(RS_NUM), .RS_LEN(RS_LENS), .MAX_LEN(RS_MAXLEN)) u_rs (
    .clk(sys_clk), .rst(sys_rst), .clear(cfg.rs_clr), .in_valid(m_valid), .meas,
    .snap(rs_snap), .snap_done(rs_snap_done), .rd_ch(rs_ch), .rd_rs(rs_rs),
    .rd_max(rs_max), .rd_sum(rs_sum), .busy(rs_busy));

  logic                  sc_armed, sc_done;
  logic [SCOPE_AW:0]     sc_count;
  logic [SCOPE_AW-1:0]   sc_addr;
  logic [CNT_W+ADC_W-1:0] sc_data;
  scope_capture #(.DEPTH(SCOPE_DEPTH)) u_scope (
    .clk(sys_clk), .rst(sys_rst), .arm(cfg.scope_arm), .ch(cfg.scope_ch), .len(cfg.scope_len),
    .in_valid(good), .cnt(cnt[sel]), .adc(adc[sel]), .armed(sc_armed), .done(sc_done),
    .count(sc_count), .rd_addr(sc_addr), .rd_data(sc_data));

  // ---------------- upload path ----------------
  logic              up_wr;
  logic [15:0]       up_data;
  logic [UPF_LOG2:0] up_free;
  logic              up_empty;

  readout_mux #(.NUM_RS(RS_NUM), .SUM_W(SUM_W), .SCOPE_AW(SCOPE_AW), .FREE_W(UPF_LOG2 + 1)) u_mux (
    .clk(sys_clk), .rst(sys_rst), .mode(cfg.mode), .link_sel(sel),
    .frame_valid(pkt_valid[sel]), .frame_words(words[sel]),
    .frame_crc_err(hdr[sel].crc_err), .frame_code_err(hdr[sel].code_err),
    .dump_req(cfg.dump_max), .rs_snap, .rs_snap_done, .rs_ch, .rs_rs, .rs_max, .stats,
    .card_hdr, .link_up(link_up_sys),
    .scope_done(sc_done), .scope_count(sc_count), .scope_addr(sc_addr), .scope_data(sc_data),
    .up_free, .up_wr, .up_data, .drop(up_drop));

  async_fifo #(.WIDTH(16), .DEPTH_LOG2(UPF_LOG2)) u_upfifo (
    .wclk(sys_clk), .wrst(sys_rst), .wr_en(up_wr), .wr_data(up_data), .full(), .wr_free(up_free),
    .rclk(usb_clk), .rrst(usb_rst), .rd_en(usb_rd && !usb_rst), .rd_data(usb_data), .empty(up_empty));

  // nothing to read while the USB side is held in reset
  assign usb_empty = up_empty || usb_rst;

  // ---------------- DACs, switches, harmonic generator ----------------
  logic [15:0] harm_code;
  logic [15:0] dac_eff [NUM_DAC*DAC_CH];
  harmonic_gen u_harm (.clk(sys_clk), .rst(sys_rst), .en(cfg.harm_en), .step(cfg.harm_step),
                       .amp(cfg.harm_amp), .code(harm_code));

  always_comb begin
    for (int s = 0; s < int'(NUM_DAC*DAC_CH); s++)
      dac_eff[s] = (cfg.harm_en && cfg.harm_slot == 4'(s)) ? harm_code : dac_val[s];
  end

  dac_refresh u_dac (.clk(sys_clk), .rst(sys_rst), .values(dac_eff), .sclk(dac_sclk),
                     .sdi(dac_sdi), .sync_n(dac_sync_n), .frame_done(), .slot());

  latch_refresh u_sw (.clk(sys_clk), .rst(sys_rst), .bytes(sw_byte), .bus(sw_bus), .le(sw_le));
endmodule
