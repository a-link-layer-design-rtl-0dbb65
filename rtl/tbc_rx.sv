// tbc_rx: time base converter with timing generator (receive side).
//
// Pixel groups recovered in the link-clock domain are written into a
// dual-clock FIFO and read in the stream (pixel) clock domain, where a
// raster timing generator, programmed from the recovered main stream
// attributes, regenerates HSYNC, VSYNC and DE. After the attributes are
// valid, groups ahead of a start of frame are dropped; once a start-of-frame
// group is at the head and at least START_GROUPS groups are buffered, the
// raster starts at the first active pixel of a frame. During DE the group
// at the head is read out one pixel per clock (lane 0 first) and popped
// after lane_count pixels. An empty FIFO during DE gives a black pixel and
// an underflow pulse; a frame whose first pixel is not a start-of-frame
// group gives a sync_err pulse. Outputs are registered.
// While enable (link domain, high in normal operation) is low, no groups
// are written, the FIFO is drained and the raster stops; it starts again
// from the next start-of-frame group after enable returns.
// The attribute bundle crosses clock domains as a quasi-static value: it
// is only used after msa_valid has passed a two-flop synchronizer.
module tbc_rx
  import dp_pkg::*;
#(
  parameter int DEPTH        = 512,
  parameter int START_GROUPS = 64
) (
  input  logic        lclk,
  input  logic        lrst_n,
  input  logic        enable,
  input  logic        grp_valid,
  input  pix_group_t  grp,
  output logic        overflow,
  input  logic        pclk,
  input  logic        prst_n,
  input  msa_t        msa,
  input  logic        msa_valid,
  input  logic [2:0]  lane_count,
  output logic        hs,
  output logic        vs,
  output logic        de,
  output logic [23:0] rgb,
  output logic        underflow,
  output logic        sync_err
);
  localparam int GW = $bits(pix_group_t);
  logic              full, empty, pop;
  logic [GW-1:0]     rd_raw;
  pix_group_t        head;
  logic [$clog2(DEPTH):0] wcnt, rcnt;
  logic              mv1, mv2, running, start;
  logic              ths, tvs, tde;
  logic [15:0]       tx, ty;
  logic [1:0]        pidx;

  async_fifo #(.WIDTH(GW), .DEPTH(DEPTH)) u_fifo (
    .wr_clk(lclk), .wr_rst_n(lrst_n), .wr_en(grp_valid && enable), .wr_data(GW'(grp)),
    .wr_full(full), .wr_count(wcnt),
    .rd_clk(pclk), .rd_rst_n(prst_n), .rd_en(pop), .rd_data(rd_raw),
    .rd_empty(empty), .rd_count(rcnt));
  assign head = pix_group_t'(rd_raw);

  always_ff @(posedge lclk or negedge lrst_n)
    if (!lrst_n) overflow <= 1'b0;
    else         overflow <= grp_valid && enable && full;
  logic en1, en_p;
  always_ff @(posedge pclk or negedge prst_n)
    if (!prst_n) begin en1 <= 1'b0; en_p <= 1'b0; end
    else begin en1 <= enable; en_p <= en1; end

  assign start = en_p && mv2 && !running && !empty && head.sof &&
                 rcnt >= ($clog2(DEPTH)+1)'(START_GROUPS);

  video_timing_gen u_tg (.clk(pclk), .rst_n(prst_n), .run(running && en_p), .start_active(start),
                         .t(msa), .hs(ths), .vs(tvs), .de(tde), .x(tx), .y(ty));

  always_comb begin
    pop = 1'b0;
    if (!empty) begin
      if (!en_p) pop = 1'b1;                                   // drain
      else if (mv2 && !running && !head.sof) pop = 1'b1;            // drop to frame start
      else if (tde && (3'(pidx) + 3'd1 >= lane_count)) pop = 1'b1;
    end
  end

  always_ff @(posedge pclk or negedge prst_n) begin
    if (!prst_n) begin
      mv1 <= 1'b0; mv2 <= 1'b0; running <= 1'b0; pidx <= '0;
      hs <= 1'b0; vs <= 1'b0; de <= 1'b0; rgb <= '0; underflow <= 1'b0; sync_err <= 1'b0;
    end else begin
      mv1 <= msa_valid;
      mv2 <= mv1;
      if (start) running <= 1'b1;
      else if (!en_p) running <= 1'b0;
      hs <= ths; vs <= tvs; de <= tde;
      underflow <= 1'b0;
      sync_err  <= 1'b0;
      if (tde) begin
        if (empty) begin
          rgb <= '0;
          underflow <= 1'b1;
        end else begin
          rgb <= head.px[pidx];
          if (tx == 16'd0 && ty == 16'd0 && pidx == 2'd0 && !head.sof) sync_err <= 1'b1;
          pidx <= (3'(pidx) + 3'd1 >= lane_count) ? 2'd0 : pidx + 1'b1;
        end
      end else begin
        rgb <= '0;
      end
    end
  end
endmodule
