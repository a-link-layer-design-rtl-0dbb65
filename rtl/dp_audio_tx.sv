// dp_audio_tx: main-link audio transmitter (all in the link clock domain).
//
// The S/PDIF input is decoded into 32-bit audio words (secondary data
// source) and buffered in a word FIFO (the audio time base converter). The
// audio time stamp generator measures Maud/Naud from the sample rate, and
// the InfoFrame generator describes the stream. The packet scheduler
// (audio bus steering) picks the next packet for the packer:
//   1. the InfoFrame, once per frame (requested by vblank_tick),
//   2. the time stamp, once per video line (requested by line_tick),
//   3. an audio stream packet whenever four words are buffered
//      (HB1 = 02h, HB2 = word count, payload = 4 words, each LSB first).
// The packer adds ECC and interleaving and hands the lane-0 symbols to the
// lane data generator through sdp_avail/sdp_sym/sdp_last/sdp_pop.
module dp_audio_tx
  import dp_pkg::*;
#(
  parameter int CELL = 26,
  parameter int K    = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        spdif_in,
  input  logic [19:0] lclk_khz,
  input  logic        line_tick,
  input  logic        vblank_tick,
  output logic        sdp_avail,
  output sym_t        sdp_sym,
  output logic        sdp_last,
  input  logic        sdp_pop,
  output logic [7:0]  maud_lsb,
  output logic        ev_audio_pkt,
  output logic        ev_ts_pkt,
  output logic        ev_if_pkt,
  output logic        ev_word_drop
);
  logic        wv, stick, wfull, wempty, wpop;
  logic [31:0] w, wout;
  logic [4:0]  wcount;

  spdif_rx #(.CELL(CELL)) u_spdif (.clk, .rst_n, .spdif_in, .word_valid(wv), .word(w),
                                   .sample_tick(stick));

  sync_fifo #(.WIDTH(32), .DEPTH(16)) u_tbc (.clk, .rst_n, .wr_en(wv), .wr_data(w),
    .full(wfull), .rd_en(wpop), .rd_data(wout), .empty(wempty), .count(wcount));
  assign ev_word_drop = wv && wfull;

  logic [23:0] maud, naud;
  logic        ts_valid;
  sdp_t        ts_pkt, if_pkt;
  logic [2:0]  sf;

  audio_timestamp_gen #(.K(K)) u_ts (.clk, .rst_n, .sample_tick(stick), .maud, .naud,
                                     .valid(ts_valid), .maud_lsb, .pkt(ts_pkt));
  infoframe_gen #(.K(K)) u_if (.clk, .rst_n, .naud, .lclk_khz, .channels_m1(3'd1),
                               .sample_size(2'd3), .speaker_alloc(8'h00),
                               .sampling_frequency(sf), .pkt(if_pkt));

  // ---------------- packet scheduler ----------------
  logic       if_req, ts_req, pk_idle, load;
  logic [1:0] gather;    // words taken for the packet being assembled
  logic       gathering;
  sdp_t       apkt, pkt;

  assign wpop = gathering && !wempty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      if_req <= 1'b0; ts_req <= 1'b0; gather <= '0; gathering <= 1'b0; apkt <= '0;
      load <= 1'b0; pkt <= '0; ev_audio_pkt <= 1'b0; ev_ts_pkt <= 1'b0; ev_if_pkt <= 1'b0;
    end else begin
      load <= 1'b0; ev_audio_pkt <= 1'b0; ev_ts_pkt <= 1'b0; ev_if_pkt <= 1'b0;
      if (vblank_tick) if_req <= 1'b1;
      if (line_tick)   ts_req <= 1'b1;
      if (gathering) begin
        if (!wempty) begin
          apkt.db[15 - 4*gather]     <= wout[7:0];
          apkt.db[15 - 4*gather - 1] <= wout[15:8];
          apkt.db[15 - 4*gather - 2] <= wout[23:16];
          apkt.db[15 - 4*gather - 3] <= wout[31:24];
          gather <= gather + 1'b1;
          if (gather == 2'd3) begin
            gathering <= 1'b0;
            pkt   <= apkt;
            pkt.hb <= {8'h00, SDP_AUDIO, 8'd4, 8'h00};
            pkt.db[3:0] <= {wout[7:0], wout[15:8], wout[23:16], wout[31:24]};
            load  <= 1'b1;
            ev_audio_pkt <= 1'b1;
          end
        end
      end else if (pk_idle && !load) begin
        if (if_req && ts_valid) begin
          pkt <= if_pkt; load <= 1'b1; if_req <= 1'b0; ev_if_pkt <= 1'b1;
        end else if (ts_req && ts_valid) begin
          pkt <= ts_pkt; load <= 1'b1; ts_req <= 1'b0; ev_ts_pkt <= 1'b1;
        end else if (wcount >= 5'd4) begin
          gathering <= 1'b1; gather <= '0;
        end
      end
    end
  end

  sdp_packer u_pack (.clk, .rst_n, .load, .pkt, .idle(pk_idle), .avail(sdp_avail),
                     .sym(sdp_sym), .last(sdp_last), .pop(sdp_pop));
endmodule
