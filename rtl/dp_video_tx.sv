// dp_video_tx: main-link video transmitter.
//
// Pixel-clock side: the DE generator marks frame and line boundaries on the
// incoming DVI video, the main stream attribute generator measures its
// timing, and bus steering packs one pixel per active lane into a group.
// Groups cross into the link symbol clock domain through a dual-clock FIFO.
// Link-clock side: the lane data generator frames the groups into transfer
// units and inserts blanking symbols, attribute and secondary-data packets;
// inter-lane skew is inserted; each lane is scrambled and 8B/10B encoded.
// codes[l] is the 10-bit code group of lane l, one per link clock, for the
// serializer of the PHY. Scrambling is off while tps is non-zero.
// video_en (link domain, from the link policy) gates the stream: while it
// is low the clock-crossing FIFO is drained and no pixels are written;
// after it rises, pixels are taken from the next start of frame, so the
// pixel groups always match the lane count in use.
module dp_video_tx
  import dp_pkg::*;
#(
  parameter int FIFO_DEPTH = 64,
  parameter int BS_PERIOD  = 8192
) (
  // pixel clock domain
  input  logic                 pclk,
  input  logic                 prst_n,
  input  logic                 hs,
  input  logic                 vs,
  input  logic                 de,
  input  logic [23:0]          rgb,
  // link symbol clock domain
  input  logic                 lclk,
  input  logic                 lrst_n,
  input  logic [2:0]           lane_count,
  input  logic [6:0]           tu_size,
  input  logic [6:0]           tu_valid,
  input  logic [1:0]           tps,
  input  logic                 video_en,
  input  logic [7:0]           maud,
  input  logic                 sdp_avail,
  input  sym_t                 sdp_sym,
  input  logic                 sdp_last,
  output logic                 sdp_pop,
  output logic [MAX_LANES-1:0][9:0] codes,
  output logic                 msa_valid,
  output logic                 line_tick,
  output logic                 vblank_tick,
  output logic                 ev_fill,
  output logic                 ev_underflow,
  output logic                 ev_msa,
  output logic                 ev_sdp,
  output logic                 ev_fifo_full
);
  localparam int GW = $bits(pix_group_t);

  // ---------------- pixel clock domain ----------------
  msa_t        msa_p;
  logic        msa_valid_p, mv1, mv2;
  logic        g_de, g_sof, g_eol, g_eof, g_hs, g_vs;
  logic [23:0] g_rgb;
  logic        gw_valid, fifo_full;
  pix_group_t  gw;
  logic [2:0]  lane_count_p1, lane_count_p;

  msa_gen u_msa (.clk(pclk), .rst_n(prst_n), .hs, .vs, .de, .msa(msa_p),
                 .msa_valid(msa_valid_p));

  de_generator u_deg (.clk(pclk), .rst_n(prst_n), .vheight(msa_p.vheight),
                      .hs_in(hs), .vs_in(vs), .de_in(de), .rgb_in(rgb),
                      .de_gen(g_de), .rgb(g_rgb), .sof(g_sof), .eol(g_eol), .eof(g_eof),
                      .hs(g_hs), .vs(g_vs));

  // lane count is quasi-static; bring it into the pixel domain
  always_ff @(posedge pclk or negedge prst_n)
    if (!prst_n) begin lane_count_p1 <= 3'd1; lane_count_p <= 3'd1; end
    else begin lane_count_p1 <= lane_count; lane_count_p <= lane_count_p1; end

  // stream gate: on at a start of frame while video_en, off at once without
  logic ven1, ven_p, vid_on;
  always_ff @(posedge pclk or negedge prst_n)
    if (!prst_n) begin ven1 <= 1'b0; ven_p <= 1'b0; vid_on <= 1'b0; end
    else begin
      ven1 <= video_en; ven_p <= ven1;
      if (!ven_p) vid_on <= 1'b0;
      else if (g_de && g_sof && msa_valid_p) vid_on <= 1'b1;
    end

  vid_bus_steering u_steer (.clk(pclk), .rst_n(prst_n), .lane_count(lane_count_p),
                            .px_valid(g_de && msa_valid_p && (vid_on || (ven_p && g_sof))), .px(g_rgb),
                            .sof(g_sof), .eol(g_eol), .eof(g_eof),
                            .grp_valid(gw_valid), .grp(gw));

  // ---------------- clock crossing ----------------
  logic              grp_empty, grp_pop;
  logic [GW-1:0]     grp_raw;
  logic [$clog2(FIFO_DEPTH):0] wcnt, rcnt;

  async_fifo #(.WIDTH(GW), .DEPTH(FIFO_DEPTH)) u_fifo (
    .wr_clk(pclk), .wr_rst_n(prst_n), .wr_en(gw_valid), .wr_data(GW'(gw)),
    .wr_full(fifo_full), .wr_count(wcnt),
    .rd_clk(lclk), .rd_rst_n(lrst_n), .rd_en(grp_pop || (!video_en && !grp_empty)), .rd_data(grp_raw),
    .rd_empty(grp_empty), .rd_count(rcnt));

  // ---------------- link clock domain ----------------
  always_ff @(posedge lclk or negedge lrst_n)
    if (!lrst_n) begin mv1 <= 1'b0; mv2 <= 1'b0; end
    else begin mv1 <= msa_valid_p; mv2 <= mv1; end
  assign msa_valid = mv2;

  // one full flag per pixel clock, seen from the link domain as an event
  logic ff1, ff2, ff3;
  always_ff @(posedge lclk or negedge lrst_n)
    if (!lrst_n) begin ff1 <= 1'b0; ff2 <= 1'b0; ff3 <= 1'b0; end
    else begin ff1 <= fifo_full && gw_valid; ff2 <= ff1; ff3 <= ff2; end
  assign ev_fifo_full = ff2 && !ff3;

  sym_t [MAX_LANES-1:0] framed, skewed;
  lane_data_gen #(.BS_PERIOD(BS_PERIOD)) u_ldg (
    .clk(lclk), .rst_n(lrst_n), .lane_count, .tu_size, .tu_valid, .tps,
    .msa(msa_p), .msa_ok(mv2), .mvid(8'h00), .maud,
    .grp_empty(grp_empty || !mv2 || !video_en), .grp(pix_group_t'(grp_raw)), .grp_pop,
    .sdp_avail, .sdp_sym, .sdp_last, .sdp_pop,
    .lanes(framed), .line_tick, .vblank_tick, .ev_fill, .ev_underflow, .ev_msa, .ev_sdp);

  skew_insert u_skew (.clk(lclk), .rst_n(lrst_n), .in_lanes(framed), .out_lanes(skewed));

  for (genvar l = 0; l < MAX_LANES; l++) begin : g_lane
    sym_t scr;
    logic scr_v, enc_v;
    dp_scrambler u_scr (.clk(lclk), .rst_n(lrst_n), .en(tps == 2'd0), .in_valid(1'b1),
                        .in_sym(skewed[l]), .out_valid(scr_v), .out_sym(scr));
    enc8b10b u_enc (.clk(lclk), .rst_n(lrst_n), .in_valid(scr_v), .in_sym(scr),
                    .out_valid(enc_v), .out_code(codes[l]));
  end
endmodule
