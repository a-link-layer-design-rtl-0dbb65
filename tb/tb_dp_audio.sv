// tb_dp_audio: audio path end to end without the video framer. Words are
// sent as S/PDIF into the audio transmitter; its packets are placed on a
// lane-0 stream (with a byte error forced into some of them); the audio
// receiver corrects them and plays them out as S/PDIF, which is decoded
// again and compared word for word (V/U/C, sample, channel). The time stamp
// must satisfy Maud/Naud = 512 fs / f_LS and the InfoFrame must report
// 2 channels.
module tb_dp_audio;
  import dp_pkg::*;
  localparam int CELL = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // source words
  logic [31:0] src_q[$];
  logic [31:0] exp_q[$];
  logic        s_avail, s_pop, spdif_line;
  logic [31:0] s_word;
  int          nsent = 0;
  assign s_avail = 1'b1;
  always_comb begin
    logic [23:0] smp;
    smp    = 24'(nsent * 24'h012345 + 7);
    s_word = {2'b00, (nsent % 2 == 0) ? ((nsent % 384 == 0) ? 2'd0 : 2'd1) : 2'd2,
              1'b0, 1'b0, 1'b0, 1'b0, smp};
  end
  always @(posedge clk) if (rst_n && s_pop) begin exp_q.push_back(s_word); nsent++; end
  spdif_tx #(.CELL(CELL)) u_src (.clk, .rst_n, .word_avail(s_avail), .word_in(s_word),
                                 .word_pop(s_pop), .spdif_out(spdif_line));

  logic line_tick = 0, vblank_tick = 0;
  logic sdp_avail, sdp_last;
  sym_t sdp_sym, lane0;
  logic [7:0] maud_lsb;
  logic ev_a, ev_t, ev_i, ev_drop;
  dp_audio_tx #(.CELL(CELL), .K(16)) u_tx (.clk, .rst_n, .spdif_in(spdif_line),
    .lclk_khz(20'd100000), .line_tick, .vblank_tick, .sdp_avail, .sdp_sym, .sdp_last,
    .sdp_pop(sdp_avail), .maud_lsb, .ev_audio_pkt(ev_a), .ev_ts_pkt(ev_t), .ev_if_pkt(ev_i),
    .ev_word_drop(ev_drop));

  // lane 0: packet symbols, byte 10 of every third packet corrupted
  int npk = 0, sidx = 0;
  always @(posedge clk) begin
    if (rst_n && sdp_avail) begin
      sidx <= sdp_last ? 0 : sidx + 1;
      if (sdp_last) npk <= npk + 1;
    end
  end
  always_comb begin
    lane0 = '0;
    if (sdp_avail) begin
      lane0 = sdp_sym;
      if (npk % 3 == 1 && sidx == 12) lane0.d = sdp_sym.d ^ 8'h5A;
    end
  end

  logic spdif_out, ev_pkt, ev_corr, ev_fail, ev_under;
  logic [23:0] maud, naud;
  logic [7:0] if0, if1;
  dp_audio_rx #(.CELL(CELL), .START_WORDS(8)) u_rx (.clk, .rst_n, .lane0, .spdif_out, .maud, .naud,
    .infoframe_db0(if0), .infoframe_db1(if1), .ev_pkt, .ev_corrected(ev_corr), .ev_fail,
    .ev_underrun(ev_under));

  logic        dv, dtick;
  logic [31:0] dw;
  spdif_rx #(.CELL(CELL)) u_chk (.clk, .rst_n, .spdif_in(spdif_out), .word_valid(dv), .word(dw),
                                 .sample_tick(dtick));
  int nrx = 0, ncorr = 0, nfail = 0;
  always @(posedge clk) if (rst_n) begin
    if (ev_corr) ncorr++;
    if (ev_fail) nfail++;
    if (dv) begin
      logic [31:0] e;
      e = exp_q.pop_front();
      // the transmitter's decoder locks onto the line a few words in
      if (nrx == 0) while (e[23:0] != dw[23:0] && exp_q.size() > 0) e = exp_q.pop_front();
      checks++;
      nrx++;
      if (dw[26:0] != e[26:0] || dw[29:28] != e[29:28]) begin
        failures++;
        if (failures < 10) $display("FAIL word %0d got %h exp %h", nrx, dw, e);
      end
    end
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1;
    fork
      forever begin repeat (700) @(posedge clk); line_tick = 1; @(posedge clk); line_tick = 0; end
      forever begin repeat (9000) @(posedge clk); vblank_tick = 1; @(posedge clk); vblank_tick = 0; end
    join_none
    wait (nrx == 400);
    // Maud/Naud = 512 fs / f_LS: one stereo sample per 128 cells
    checks++;
    if (naud == 0 || longint'(maud) * 128 * CELL != 512 * longint'(naud)) begin
      failures++; $display("FAIL time stamp maud=%0d naud=%0d", maud, naud);
    end
    checks++; if (if0[2:0] != 3'd1) begin failures++; $display("FAIL infoframe %h", if0); end
    checks++; if (ncorr == 0) begin failures++; $display("FAIL no corrected packet"); end
    checks++; if (nfail != 0) begin failures++; $display("FAIL %0d uncorrectable", nfail); end
    checks++; if (ev_drop) begin failures++; $display("FAIL word dropped"); end
    $display("packets=%0d corrected=%0d maud=%0d naud=%0d if=%h %h", npk, ncorr, maud, naud, if0, if1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
