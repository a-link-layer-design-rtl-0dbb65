// lane_data_gen: lane data generator (transmit main-link framer).
//
// Builds the symbol stream of every lane, one symbol per lane per link
// clock, from pixel groups (one pixel per lane, taken from the clock-
// crossing FIFO) and from secondary-data packets.
//
// Active video is sent in transfer units (TUs) of tu_size symbols per
// lane: up to tu_valid data symbols (R, G, B bytes of the lane's pixels),
// then stuffing framed by FS ... FE so that the packed rate matches the
// stream rate. If the FIFO runs dry inside a TU the stuffing simply starts
// earlier. The last pixel of a line is followed by BS, VB-ID, Mvid[7:0] and
// Maud[7:0] on every lane. In the blanking interval that follows, lane 0
// carries, in order of priority, the main stream attribute packet (once per
// frame, after the last line: SS SS, 16 attribute bytes, SE) and
// secondary-data packets (SS ... SE) from the audio packer; otherwise all
// lanes carry zero dummy symbols. The next line starts with BE as soon as
// its first pixel group is waiting. VB-ID bit 0 is set in the BS after the
// last line of a frame and in the BS repeated every BS_PERIOD symbols of
// vertical blanking; a BS with VB-ID bit 0 clear precedes the first line.
// While the link is being trained (tps = 1 or 2) all lanes carry training
// pattern 1 (D10.2) or 2 (K28.5 D11.6 K28.5 D11.6, then D10.2 x6), and
// pixel groups are dropped until the next start of frame.
//
// Outputs are registered; lanes at or above lane_count carry zeros.
module lane_data_gen
  import dp_pkg::*;
#(
  parameter int BS_PERIOD = 8192
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [2:0]           lane_count,
  input  logic [6:0]           tu_size,
  input  logic [6:0]           tu_valid,
  input  logic [1:0]           tps,
  input  msa_t                 msa,
  input  logic                 msa_ok,      // msa holds a measured stream
  input  logic [7:0]           mvid,
  input  logic [7:0]           maud,
  // pixel groups from the clock-crossing FIFO (first word fall through)
  input  logic                 grp_empty,
  input  pix_group_t           grp,
  output logic                 grp_pop,
  // secondary data packet symbols from the audio packer
  input  logic                 sdp_avail,
  input  sym_t                 sdp_sym,
  input  logic                 sdp_last,
  output logic                 sdp_pop,
  // lanes out
  output sym_t [MAX_LANES-1:0] lanes,
  // events
  output logic                 line_tick,   // BS sent
  output logic                 vblank_tick, // last line of a frame sent
  output logic                 ev_fill,     // FS sent
  output logic                 ev_underflow,// TU ended early for lack of data
  output logic                 ev_msa,      // attribute packet sent
  output logic                 ev_sdp       // secondary packet started
);
  typedef enum logic [3:0] {S_IDLE, S_BS, S_VBID, S_MVID, S_MAUD, S_BE, S_ACT,
                            S_MSA, S_SDP} st_t;
  st_t         st;
  logic        vblank, msa_pending, go_be, fill;
  logic [6:0]  tu_pos, vcnt;
  logic [1:0]  bidx;
  logic [4:0]  cnt;
  logic [3:0]  tps_idx;
  logic [13:0] idle_cnt;
  pix_group_t  cur;

  function automatic sym_t ks(input logic [7:0] d);
    sym_t s; s.k = 1'b1; s.d = d; return s;
  endfunction
  function automatic sym_t ds(input logic [7:0] d);
    sym_t s; s.k = 1'b0; s.d = d; return s;
  endfunction
  function automatic logic [7:0] msa_byte(input msa_t m, input logic [4:0] i);
    logic [15:0][7:0] b;
    b = {m.htotal, m.vtotal, m.hstart, m.vstart, m.hsw, m.vsw, m.hwidth, m.vheight};
    return b[15 - i[3:0]];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; vblank <= 1'b1; msa_pending <= 1'b1; go_be <= 1'b0; fill <= 1'b0;
      tu_pos <= '0; vcnt <= '0; bidx <= '0; cnt <= '0; tps_idx <= '0; idle_cnt <= '0;
      cur <= '0; lanes <= '0;
      line_tick <= 1'b0; vblank_tick <= 1'b0; ev_fill <= 1'b0; ev_underflow <= 1'b0;
      ev_msa <= 1'b0; ev_sdp <= 1'b0;
    end else begin
      sym_t o [MAX_LANES];
      for (int l = 0; l < MAX_LANES; l++) o[l] = ds(8'h00);
      line_tick <= 1'b0; vblank_tick <= 1'b0; ev_fill <= 1'b0; ev_underflow <= 1'b0;
      ev_msa <= 1'b0; ev_sdp <= 1'b0;

      if (tps != 2'd0) begin
        // ---------------- link training patterns ----------------
        st <= S_IDLE; vblank <= 1'b1; msa_pending <= 1'b1; go_be <= 1'b0; bidx <= '0;
        idle_cnt <= '0;
        tps_idx <= (tps_idx == 4'd9) ? 4'd0 : tps_idx + 1'b1;
        for (int l = 0; l < MAX_LANES; l++) begin
          if (tps == 2'd1)                        o[l] = ds(D10_2);
          else if (tps_idx == 0 || tps_idx == 2)  o[l] = ks(K_BS);
          else if (tps_idx == 1 || tps_idx == 3)  o[l] = ds(D11_6);
          else                                    o[l] = ds(D10_2);
        end
      end else begin
        tps_idx <= '0;
        case (st)
          S_IDLE: begin
            idle_cnt <= idle_cnt + 1'b1;
            if (msa_pending && msa_ok) begin
              st <= S_MSA; cnt <= '0;
            end else if (!grp_empty && !vblank) begin
              st <= S_BE;                        // next line first: video has priority
            end else if (sdp_avail) begin
              st <= S_SDP;
              ev_sdp <= 1'b1;
            end else if (!grp_empty && vblank && !grp.sof) begin
              // not the start of a frame: drop until one arrives
            end else if (!grp_empty) begin
              if (vblank) begin
                vblank <= 1'b0; go_be <= 1'b1; st <= S_BS;
              end else begin
                st <= S_BE;
              end
            end else if (vblank && idle_cnt >= 14'(BS_PERIOD - 1)) begin
              st <= S_BS;
            end
          end
          S_BS: begin
            for (int l = 0; l < MAX_LANES; l++) o[l] = ks(K_BS);
            line_tick <= 1'b1; idle_cnt <= '0; st <= S_VBID;
          end
          S_VBID: begin
            for (int l = 0; l < MAX_LANES; l++) o[l] = ds({7'd0, vblank});
            st <= S_MVID;
          end
          S_MVID: begin
            for (int l = 0; l < MAX_LANES; l++) o[l] = ds(mvid);
            st <= S_MAUD;
          end
          S_MAUD: begin
            for (int l = 0; l < MAX_LANES; l++) o[l] = ds(maud);
            st <= go_be ? S_BE : S_IDLE;
            go_be <= 1'b0;
          end
          S_BE: begin
            for (int l = 0; l < MAX_LANES; l++) o[l] = ks(K_BE);
            st <= S_ACT; tu_pos <= '0; vcnt <= '0; fill <= 1'b0; bidx <= '0;
          end
          S_MSA: begin
            if (cnt < 5'd2)        o[0] = ks(K_SS);
            else if (cnt < 5'd18)  o[0] = ds(msa_byte(msa, cnt - 5'd2));
            else                   o[0] = ks(K_SE);
            cnt <= cnt + 1'b1;
            if (cnt == 5'd18) begin
              st <= S_IDLE; msa_pending <= 1'b0; ev_msa <= 1'b1;
            end
          end
          S_SDP: begin
            o[0] = sdp_sym;
            if (sdp_last) st <= S_IDLE;
          end
          S_ACT: begin
            logic tu_last, line_done;
            tu_last   = (tu_pos == tu_size - 1'b1);
            line_done = 1'b0;
            if (!fill && vcnt < tu_valid && (bidx != 2'd0 || !grp_empty)) begin
              pix_group_t g;
              g = (bidx == 2'd0) ? grp : cur;
              for (int l = 0; l < MAX_LANES; l++)
                o[l] = ds(bidx == 2'd0 ? g.px[l][23:16] :
                          bidx == 2'd1 ? g.px[l][15:8] : g.px[l][7:0]);
              cur  <= g;
              vcnt <= vcnt + 1'b1;
              bidx <= (bidx == 2'd2) ? 2'd0 : bidx + 1'b1;
              if (bidx == 2'd2 && g.eol) begin
                line_done = 1'b1;
                if (g.eof) begin
                  vblank <= 1'b1; msa_pending <= 1'b1; vblank_tick <= 1'b1;
                end
              end
            end else begin
              if (!fill && vcnt < tu_valid) ev_underflow <= 1'b1;
              for (int l = 0; l < MAX_LANES; l++)
                o[l] = tu_last ? ks(K_FE) : (fill ? ds(8'h00) : ks(K_FS));
              if (!fill && !tu_last) begin
                fill    <= 1'b1;
                ev_fill <= 1'b1;
              end
            end
            if (tu_last) begin
              tu_pos <= '0; vcnt <= '0; fill <= 1'b0;
            end else begin
              tu_pos <= tu_pos + 1'b1;
            end
            if (line_done) st <= S_BS;
          end
          default: st <= S_IDLE;
        endcase
      end
      for (int l = 0; l < MAX_LANES; l++)
        lanes[l] <= (3'(l) < lane_count) ? o[l] : ds(8'h00);
    end
  end

  // a pixel group is taken when its first byte is sent, or dropped while
  // waiting for a start of frame in vertical blanking / during training
  always_comb begin
    grp_pop = 1'b0;
    if (!grp_empty) begin
      if (tps != 2'd0)
        grp_pop = 1'b1;
      else if (st == S_IDLE && !(msa_pending && msa_ok) && !sdp_avail && vblank && !grp.sof)
        grp_pop = 1'b1;
      else if (st == S_ACT && !fill && vcnt < tu_valid && bidx == 2'd0)
        grp_pop = 1'b1;
    end
  end
  assign sdp_pop = (tps == 2'd0) && (st == S_SDP);

endmodule
