// stream_unpacker: main stream unpacker and bus de-steering (receive side).
//
// Follows the framing of the deskewed lanes: BS starts blanking and the next
// symbol is VB-ID; BE starts active video; inside active video FS ... FE
// brackets stuffing, and every other data symbol is a pixel byte. Three
// bytes (R, G, B) per lane make one pixel per lane, and the lane_count
// pixels of the same step form a pixel group in lane order, which is
// exactly the transmit-side group. Groups are written out with start of
// frame (first group after a blanking whose VB-ID bit 0 was set), end of
// line (the BS that ends the line) and end of frame is not known here and
// left clear. Until the first start of frame is seen, nothing is written.
// A group is written one clock after its last byte arrives; the end-of-line
// flag is attached to the last group of the line when the BS arrives, so
// group writes lag by one group.
module stream_unpacker
  import dp_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,          // link trained, lanes aligned
  input  logic [2:0]           lane_count,
  input  sym_t [MAX_LANES-1:0] lanes,
  output logic                 grp_valid,
  output pix_group_t           grp,
  output logic                 vbid_valid,
  output logic [7:0]           vbid
);
  typedef enum logic [1:0] {U_BLANK, U_VBID, U_ACT, U_FILL} ust_t;
  ust_t       st;
  logic       saw_vblank, synced, sof_next, held_v;
  logic [1:0] bidx;
  pix_group_t acc, held;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= U_BLANK; saw_vblank <= 1'b0; synced <= 1'b0; sof_next <= 1'b0;
      bidx <= '0; acc <= '0; held <= '0; held_v <= 1'b0;
      grp_valid <= 1'b0; grp <= '0; vbid_valid <= 1'b0; vbid <= '0;
    end else begin
      grp_valid  <= 1'b0;
      vbid_valid <= 1'b0;
      if (!en) begin
        st <= U_BLANK; held_v <= 1'b0; synced <= 1'b0; saw_vblank <= 1'b0;
      end else if (lanes[0].k && lanes[0].d == K_BS) begin
        // end of line: release the held group marked as end of line
        if (held_v && synced) begin
          pix_group_t h;
          h = held;
          h.eol = 1'b1;
          grp <= h; grp_valid <= 1'b1;
        end
        held_v <= 1'b0;
        st <= U_VBID;
      end else begin
        case (st)
          U_VBID: begin
            vbid <= lanes[0].d; vbid_valid <= 1'b1;
            if (lanes[0].d[0]) saw_vblank <= 1'b1;
            st <= U_BLANK;
          end
          U_BLANK: begin
            if (lanes[0].k && lanes[0].d == K_BE) begin
              st <= U_ACT; bidx <= '0;
              sof_next <= saw_vblank;
              if (saw_vblank) synced <= 1'b1;
              saw_vblank <= 1'b0;
            end
          end
          U_ACT, U_FILL: begin
            if (lanes[0].k) begin
              if (lanes[0].d == K_FS) st <= U_FILL;
              else if (lanes[0].d == K_FE) st <= U_ACT;
            end else if (st == U_ACT) begin
              pix_group_t a;
              a = acc;
              for (int l = 0; l < MAX_LANES; l++) begin
                if (3'(l) >= lane_count) a.px[l] = '0;
                else if (bidx == 2'd0) a.px[l][23:16] = lanes[l].d;
                else if (bidx == 2'd1) a.px[l][15:8]  = lanes[l].d;
                else                   a.px[l][7:0]   = lanes[l].d;
              end
              if (bidx == 2'd2) begin
                bidx <= '0;
                a.sof = sof_next; a.eol = 1'b0; a.eof = 1'b0;
                sof_next <= 1'b0;
                if (held_v && synced) begin
                  grp <= held; grp_valid <= 1'b1;
                end
                held   <= a;
                held_v <= 1'b1;
              end else begin
                bidx <= bidx + 1'b1;
              end
              acc <= a;
            end
          end
          default: st <= U_BLANK;
        endcase
      end
    end
  end
endmodule
