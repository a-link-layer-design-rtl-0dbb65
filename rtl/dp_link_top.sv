// dp_link_top: DisplayPort link layer, source and sink side.
//
// Source: DVI video in (pclk domain) -> dp_video_tx -> main link code
// groups (ml_tx_codes, one 10-bit code per lane per link symbol clock);
// S/PDIF audio in -> dp_audio_tx -> secondary data packets on lane 0;
// link policy maker (training FSM) with the lane count decision and the
// AUX requester.
// Sink: main link code groups (ml_rx_codes) -> dp_video_rx -> DVI video out
// (regenerated raster in the pclk domain); lane 0 -> dp_audio_rx -> S/PDIF
// out; AUX replier with the DPCD memory and the EDID ROM.
// The serializers and the differential PHY are outside this module: the
// main link appears here as parallel code groups, so the environment
// connects ml_tx_codes to ml_rx_codes (possibly through a channel model).
// The AUX channel is modelled as one shared line driven by whichever side
// has its output enable up (low when neither drives).
// All main link, audio and AUX logic runs on lclk (LCLK_KHZ); pclk is the
// stream clock at both ends (the sink's stream clock regeneration is not
// part of this design). pclk_khz tells the lane count decision the stream
// rate. Status and event outputs are for monitoring; ev_* are one-clock
// pulses, in the lclk domain except ev_tbc_underflow and ev_sync_err (pclk).
module dp_link_top
  import dp_pkg::*;
#(
  parameter int         LCLK_KHZ     = 162000,
  parameter logic [7:0] LINK_BW      = 8'h06,
  parameter int         BS_PERIOD    = 8192,
  parameter int         FIFO_DEPTH   = 64,
  parameter int         TU_SIZE      = 64,
  parameter int         TBC_DEPTH    = 512,
  parameter int         START_GROUPS = 64,
  parameter int         AUX_HALF     = 81,
  parameter int         AUX_TIMEOUT  = 400 * 162,
  parameter int         AUX_RETRY_GAP = 100 * 162,
  parameter int         TRAIN_WAIT   = 100 * 162,
  parameter int         TURNAROUND   = 20 * 162,
  parameter int         DPCD_INIT    = 1000,
  parameter int         IRQ_LEN      = 1000,
  parameter int         SPDIF_CELL   = 26,
  parameter int         AUD_K        = 64,
  parameter int         AUD_START    = 16
) (
  input  logic                      pclk,
  input  logic                      lclk,
  input  logic                      rst_n,
  input  logic [19:0]               pclk_khz,
  // source stream inputs
  input  logic                      dvi_hs_in,
  input  logic                      dvi_vs_in,
  input  logic                      dvi_de_in,
  input  logic [23:0]               dvi_rgb_in,
  input  logic                      spdif_in,
  // main link (to / from the PHY)
  output logic [MAX_LANES-1:0][9:0] ml_tx_codes,
  input  logic [MAX_LANES-1:0][9:0] ml_rx_codes,
  // AUX data shifter phase settings
  input  logic [3:0]                aux_phase_src,
  input  logic [3:0]                aux_phase_snk,
  // sink stream outputs
  output logic                      dvi_hs_out,
  output logic                      dvi_vs_out,
  output logic                      dvi_de_out,
  output logic [23:0]               dvi_rgb_out,
  output logic                      spdif_out,
  // status
  output logic [2:0]                train_state,
  output logic [2:0]                lane_count,
  output logic                      hpd,
  output logic                      edid_ok,
  output logic                      rx_aligned,
  output logic                      rx_msa_valid,
  output msa_t                      rx_msa,
  output logic [23:0]               rx_maud,
  output logic [23:0]               rx_naud,
  // events
  output logic                      ev_train_trans,
  output logic                      ev_aux_defer,
  output logic                      ev_aux_nack,
  output logic                      ev_stuff,
  output logic                      ev_msa,
  output logic                      ev_sdp,
  output logic                      ev_audio_pkt,
  output logic                      ev_ecc_corrected,
  output logic                      ev_ecc_fail,
  output logic                      ev_tbc_underflow,
  output logic                      ev_tbc_overflow,
  output logic                      ev_sync_err,
  output logic                      ev_audio_underrun
);
  // ------------------------------------------------------------ source
  logic [2:0]  sink_max_lanes, ld_lanes;
  logic [6:0]  tu_size, tu_valid;
  logic [1:0]  src_tps;
  logic        a_req, a_done, a_busy, a_timeout;
  logic [3:0]  a_cmd, a_reply, a_ndefer;
  logic [19:0] a_addr;
  logic [4:0]  a_len, a_rlen;
  logic [AUX_MAX_BYTES-1:0][7:0] a_wdata, a_rdata;
  logic        src_aux_out, src_aux_oe, snk_aux_out, snk_aux_oe, aux_line;
  logic        line_tick, vblank_tick, sdp_avail, sdp_last, sdp_pop;
  sym_t        sdp_sym;
  logic [7:0]  maud_lsb;
  logic        tx_msa_valid, ev_underflow_tx, ev_fifo_full, ev_ts, ev_if, ev_drop;

  assign aux_line = src_aux_oe ? src_aux_out : snk_aux_oe ? snk_aux_out : 1'b0;

  lane_decision #(.TU_SIZE(TU_SIZE)) u_ld (.clk(lclk), .rst_n, .pclk_khz,
    .lclk_khz(20'(LCLK_KHZ)), .max_lanes(sink_max_lanes), .lane_count(ld_lanes),
    .tu_size, .tu_valid);

  link_policy_src #(.LINK_BW(LINK_BW), .TRAIN_WAIT(TRAIN_WAIT)) u_policy (
    .clk(lclk), .rst_n, .hpd, .sink_max_lanes, .ld_lanes, .lane_count, .tps(src_tps),
    .fstate(train_state), .ev_trans(ev_train_trans), .edid_ok,
    .req(a_req), .cmd(a_cmd), .addr(a_addr), .len(a_len), .wdata(a_wdata),
    .done(a_done), .reply(a_reply), .timeout(a_timeout), .rdata(a_rdata));

  aux_source_fsm #(.HALF(AUX_HALF), .REPLY_TIMEOUT(AUX_TIMEOUT), .RETRY_GAP(AUX_RETRY_GAP)) u_aux_src (.clk(lclk), .rst_n, .req(a_req),
    .cmd(a_cmd), .addr(a_addr), .len(a_len), .wdata(a_wdata), .busy(a_busy),
    .done(a_done), .reply(a_reply), .timeout(a_timeout), .rdata(a_rdata), .rlen(a_rlen),
    .ndefer(a_ndefer), .aux_in(aux_line), .aux_out(src_aux_out), .aux_oe(src_aux_oe),
    .phase_delay(aux_phase_src));

  dp_video_tx #(.FIFO_DEPTH(FIFO_DEPTH), .BS_PERIOD(BS_PERIOD)) u_vtx (
    .pclk, .prst_n(rst_n), .hs(dvi_hs_in), .vs(dvi_vs_in), .de(dvi_de_in), .rgb(dvi_rgb_in),
    .lclk, .lrst_n(rst_n), .lane_count, .tu_size, .tu_valid, .tps(src_tps), .video_en(train_state == 3'd4),
    .maud(maud_lsb), .sdp_avail, .sdp_sym, .sdp_last, .sdp_pop, .codes(ml_tx_codes),
    .msa_valid(tx_msa_valid), .line_tick, .vblank_tick, .ev_fill(ev_stuff),
    .ev_underflow(ev_underflow_tx), .ev_msa, .ev_sdp, .ev_fifo_full);

  dp_audio_tx #(.CELL(SPDIF_CELL), .K(AUD_K)) u_atx (.clk(lclk), .rst_n, .spdif_in,
    .lclk_khz(20'(LCLK_KHZ)), .line_tick, .vblank_tick, .sdp_avail, .sdp_sym, .sdp_last,
    .sdp_pop, .maud_lsb, .ev_audio_pkt, .ev_ts_pkt(ev_ts), .ev_if_pkt(ev_if),
    .ev_word_drop(ev_drop));

  // ------------------------------------------------------------ sink
  logic [19:0] d_addr;
  logic [7:0]  d_rdata, d_wdata, e_rdata, link_bw_set;
  logic        d_we, d_wr_ok, d_ready, ev_edid;
  logic [6:0]  e_addr;
  logic [2:0]  lc_set, rx_lanes;
  logic [1:0]  snk_tps;
  logic [MAX_LANES-1:0] cr_done, sym_locked;
  sym_t        lane0;
  logic        vbid_valid;
  logic [7:0]  vbid, if_db0, if_db1;
  logic        a_pkt_rx;

  dpcd_mem #(.MAX_LINK_RATE(LINK_BW), .MAX_LANE_COUNT(8'h04), .INIT_CYCLES(DPCD_INIT),
    .IRQ_LEN(IRQ_LEN)) u_dpcd (.clk(lclk), .rst_n, .rd_addr(d_addr), .rd_data(d_rdata),
    .wr_en(d_we), .wr_addr(d_addr), .wr_data(d_wdata), .wr_ok(d_wr_ok), .ready(d_ready),
    .cr_done, .eq_done(sym_locked), .sym_locked, .aligned(rx_aligned),
    .link_bw_set, .lane_count_set(lc_set), .tps(snk_tps), .hpd);

  edid_rom u_edid (.addr(e_addr), .rdata(e_rdata));

  aux_sink_fsm #(.HALF(AUX_HALF), .TURNAROUND(TURNAROUND)) u_aux_snk (.clk(lclk), .rst_n,
    .aux_in(aux_line), .aux_out(snk_aux_out), .aux_oe(snk_aux_oe), .phase_delay(aux_phase_snk),
    .dpcd_addr(d_addr), .dpcd_rdata(d_rdata), .dpcd_we(d_we), .dpcd_wdata(d_wdata),
    .dpcd_wr_ok(d_wr_ok), .dpcd_ready(d_ready), .edid_addr(e_addr), .edid_rdata(e_rdata),
    .ev_defer(ev_aux_defer), .ev_nack(ev_aux_nack), .ev_edid);

  assign rx_lanes = (lc_set == 3'd0) ? 3'd1 : lc_set;

  dp_video_rx #(.TBC_DEPTH(TBC_DEPTH), .START_GROUPS(START_GROUPS)) u_vrx (
    .lclk, .lrst_n(rst_n), .codes(ml_rx_codes), .lane_count(rx_lanes), .tps(snk_tps),
    .video_en(snk_tps == 2'd0 && lc_set != 3'd0),
    .cr_done, .sym_locked, .aligned(rx_aligned), .lane0, .msa(rx_msa),
    .msa_valid(rx_msa_valid), .vbid_valid, .vbid, .tbc_overflow(ev_tbc_overflow),
    .pclk, .prst_n(rst_n), .hs(dvi_hs_out), .vs(dvi_vs_out), .de(dvi_de_out),
    .rgb(dvi_rgb_out), .underflow(ev_tbc_underflow), .sync_err(ev_sync_err));

  dp_audio_rx #(.CELL(SPDIF_CELL), .START_WORDS(AUD_START)) u_arx (.clk(lclk), .rst_n,
    .lane0, .spdif_out, .maud(rx_maud), .naud(rx_naud), .infoframe_db0(if_db0),
    .infoframe_db1(if_db1), .ev_pkt(a_pkt_rx), .ev_corrected(ev_ecc_corrected),
    .ev_fail(ev_ecc_fail), .ev_underrun(ev_audio_underrun));
endmodule
