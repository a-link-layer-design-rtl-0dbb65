// dp_video_rx: main-link video receiver.
//
// Link-clock side: each lane's 10-bit code groups are 8B/10B decoded and
// descrambled; the lock detector reports per-lane clock-recovery and symbol
// lock for link training; the lanes are deskewed; the stream unpacker
// removes framing and stuffing and rebuilds pixel groups, and the
// attribute recovery block reads the stream's timing from the attribute
// packet. Stream-clock side: the time base converter buffers the groups and
// replays them under a regenerated raster (HSYNC, VSYNC, DE, RGB).
// lane0 is the deskewed, descrambled lane 0, which also carries secondary
// data packets for the audio receiver. Descrambling is off while tps is
// non-zero. video_en (normal operation) enables the time base converter;
// while it is low the converter is emptied and its raster stopped.
module dp_video_rx
  import dp_pkg::*;
#(
  parameter int TBC_DEPTH    = 512,
  parameter int START_GROUPS = 64
) (
  input  logic                       lclk,
  input  logic                       lrst_n,
  input  logic [MAX_LANES-1:0][9:0]  codes,
  input  logic [2:0]                 lane_count,
  input  logic [1:0]                 tps,
  input  logic                       video_en,
  output logic [MAX_LANES-1:0]       cr_done,
  output logic [MAX_LANES-1:0]       sym_locked,
  output logic                       aligned,
  output sym_t                       lane0,
  output msa_t                       msa,
  output logic                       msa_valid,
  output logic                       vbid_valid,
  output logic [7:0]                 vbid,
  output logic                       tbc_overflow,
  input  logic                       pclk,
  input  logic                       prst_n,
  output logic                       hs,
  output logic                       vs,
  output logic                       de,
  output logic [23:0]                rgb,
  output logic                       underflow,
  output logic                       sync_err
);
  sym_t [MAX_LANES-1:0] dec_sym, descr, aligned_lanes;
  logic [MAX_LANES-1:0] dec_v, dec_err, descr_v;

  for (genvar l = 0; l < MAX_LANES; l++) begin : g_lane
    dec8b10b u_dec (.clk(lclk), .rst_n(lrst_n), .in_valid(1'b1), .in_code(codes[l]),
                    .out_valid(dec_v[l]), .out_sym(dec_sym[l]), .out_err(dec_err[l]));
    dp_scrambler u_descr (.clk(lclk), .rst_n(lrst_n), .en(tps == 2'd0), .in_valid(dec_v[l]),
                          .in_sym(dec_sym[l]), .out_valid(descr_v[l]), .out_sym(descr[l]));
  end

  rx_lock_detect u_lock (.clk(lclk), .rst_n(lrst_n), .lane_count, .sym_valid(dec_v),
                         .sym(dec_sym), .code_err(dec_err), .cr_done, .sym_locked);

  deskew u_deskew (.clk(lclk), .rst_n(lrst_n), .lane_count, .training(tps != 2'd0), .in_lanes(descr),
                   .out_lanes(aligned_lanes), .aligned);
  assign lane0 = aligned_lanes[0];

  logic       grp_v;
  pix_group_t grp;
  stream_unpacker u_unp (.clk(lclk), .rst_n(lrst_n), .en(tps == 2'd0 && aligned),
                         .lane_count, .lanes(aligned_lanes), .grp_valid(grp_v), .grp,
                         .vbid_valid, .vbid);

  msa_recovery u_msa (.clk(lclk), .rst_n(lrst_n), .lane0(aligned_lanes[0]), .msa, .msa_valid);

  tbc_rx #(.DEPTH(TBC_DEPTH), .START_GROUPS(START_GROUPS)) u_tbc (
    .lclk, .lrst_n, .enable(video_en), .grp_valid(grp_v), .grp, .overflow(tbc_overflow),
    .pclk, .prst_n, .msa, .msa_valid, .lane_count,
    .hs, .vs, .de, .rgb, .underflow, .sync_err);
endmodule
