// tb_dp_link_full: the link layer at its default parameters (162 MHz link
// symbol clock, 1 Mbit/s AUX, full-size buffers) carrying 1600 x 1200 at
// 60 Hz video (162 MHz pixel clock, 2160 x 1250 total, VESA timing) and a
// 48 kHz-class S/PDIF stream. The main link code groups are looped from
// the source to the sink. The test waits for link training to reach normal
// operation, then checks one complete frame at the sink pixel by pixel
// against the pattern formula, the frame size, the recovered stream
// attributes, and the audio words against those sent.
module tb_dp_link_full;
  import dp_pkg::*;
  logic pclk = 0, lclk = 0, rst_n = 0;
  always #3.086 pclk = ~pclk;     // 162.0 MHz
  always #3.087 lclk = ~lclk;     // 162 MHz, independent source
  int checks = 0, failures = 0;

  msa_t t;
  logic hs, vs, de;
  logic [23:0] rgb;
  dvi_pattern_gen u_vsrc (.clk(pclk), .rst_n, .run(1'b1), .t, .hs, .vs, .de, .rgb);

  logic [31:0] exp_q[$];
  logic        s_pop, spdif_line;
  logic [31:0] s_word;
  int          nsent = 0;
  always_comb begin
    logic [23:0] smp;
    smp    = 24'(nsent * 24'h00F00D + 3);
    s_word = {2'b00, (nsent % 2 == 0) ? ((nsent % 384 == 0) ? 2'd0 : 2'd1) : 2'd2,
              1'b0, 1'b0, 1'b0, 1'b0, smp};
  end
  always @(posedge lclk) if (s_pop) begin exp_q.push_back(s_word); nsent++; end
  spdif_tx u_asrc (.clk(lclk), .rst_n, .word_avail(1'b1), .word_in(s_word), .word_pop(s_pop),
                   .spdif_out(spdif_line));

  logic [MAX_LANES-1:0][9:0] codes;
  logic rhs, rvs, rde, spdif_out, hpd, edid_ok, aligned, rmsa_valid;
  logic [23:0] rrgb, rmaud, rnaud;
  logic [2:0] tstate, lane_count;
  msa_t rmsa;
  logic ev_trans, ev_defer, ev_nack, ev_stuff, ev_msa, ev_sdp, ev_apkt, ev_corr, ev_fail,
        ev_under, ev_ovf, ev_serr, ev_aund;

  dp_link_top dut (
    .pclk, .lclk, .rst_n, .pclk_khz(20'd162000), .dvi_hs_in(hs), .dvi_vs_in(vs),
    .dvi_de_in(de), .dvi_rgb_in(rgb), .spdif_in(spdif_line), .ml_tx_codes(codes),
    .ml_rx_codes(codes), .aux_phase_src(4'd0), .aux_phase_snk(4'd0),
    .dvi_hs_out(rhs), .dvi_vs_out(rvs), .dvi_de_out(rde), .dvi_rgb_out(rrgb), .spdif_out,
    .train_state(tstate), .lane_count, .hpd, .edid_ok, .rx_aligned(aligned),
    .rx_msa_valid(rmsa_valid), .rx_msa(rmsa), .rx_maud(rmaud), .rx_naud(rnaud),
    .ev_train_trans(ev_trans), .ev_aux_defer(ev_defer), .ev_aux_nack(ev_nack),
    .ev_stuff, .ev_msa, .ev_sdp, .ev_audio_pkt(ev_apkt), .ev_ecc_corrected(ev_corr),
    .ev_ecc_fail(ev_fail), .ev_tbc_underflow(ev_under), .ev_tbc_overflow(ev_ovf),
    .ev_sync_err(ev_serr), .ev_audio_underrun(ev_aund));

  int n_stuff = 0, n_sdp = 0, n_apkt = 0;
  always @(posedge lclk) if (ev_trans) $display("%0t state %0d", $time, tstate);
  logic stable = 0;
  int   settle = 0;
  always @(posedge lclk) begin
    if (ev_stuff) n_stuff++;
    if (ev_sdp) n_sdp++;
    if (ev_apkt) n_apkt++;
    if (rst_n && (ev_nack || (stable && (ev_fail || ev_ovf)))) begin failures++; $display("FAIL %0t nack %0d ecc %0d overflow %0d", $time, ev_nack, ev_fail, ev_ovf); end
    if (tstate != 3'd4) settle = 0;
    else if (settle < 200000) settle++;
    stable <= settle >= 200000;          // normal operation for 1.2 ms
  end

  // video: one whole frame checked after the first complete one
  int n_pf = 0;
  int x = 0, y = -1, n_frames = 0, n_px = 0, n_good = 0;
  logic rde_q = 0, rvs_q = 0, vstarted = 0, frame_ok = 0;
  logic [7:0] rkey;
  always @(posedge pclk) begin
    rde_q <= rde; rvs_q <= rvs;
    if (vstarted && (ev_serr || ev_under)) begin failures++; if (n_pf++ < 5) $display("FAIL %0t sink raster error (sync %0d underflow %0d)", $time, ev_serr, ev_under); end
    if (rvs && !rvs_q) begin
      if (vstarted && y >= 0) begin
        checks++;
        if (y + 1 != int'(t.vheight)) begin failures++; $display("FAIL frame height %0d", y + 1); end
        else if (frame_ok) n_good++;
        n_frames++;
        $display("%0t frame %0d checked", $time, n_frames);
      end
      vstarted = stable;
      frame_ok = 1;
      y = -1;
    end
    if (rde && !rde_q) begin y++; x = 0; end
    if (rde && vstarted) begin
      checks++;
      n_px++;
      if (x == 0 && y == 0) rkey = rrgb[23:16] ^ 8'(x);
      if (rrgb[15:8] != 8'(y) || rrgb[7:0] != 8'(x + 3*y) || (rrgb[23:16] ^ 8'(x)) != rkey) begin
        failures++; frame_ok = 0;
        if (n_pf++ < 10) $display("FAIL pixel (%0d,%0d) got %h", x, y, rrgb);
      end
    end
    if (rde) x++;
    if (!rde && rde_q && vstarted) begin
      checks++;
      if (x != int'(t.hwidth)) begin failures++; $display("FAIL line width %0d", x); end
    end
  end

  logic dv, dtick;
  logic [31:0] dw;
  spdif_rx u_achk (.clk(lclk), .rst_n, .spdif_in(spdif_out), .word_valid(dv), .word(dw), .sample_tick(dtick));
  int n_words = 0;
  logic resync = 1;
  int n_aund = 0, n_slip = 0;
  // a receive buffer underrun loses sink lock for a few words; count it and resynchronise
  always @(posedge lclk) begin
    if (ev_aund && stable) begin n_aund++; resync = 1; end
    if (dv && stable) begin
      logic [31:0] e;
      if (resync) begin
        while (exp_q.size() > 0 && exp_q[0][23:0] != dw[23:0]) void'(exp_q.pop_front());
        resync = 0;
      end
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("FAIL audio word %h not sent", dw); end
      else begin
        e = exp_q.pop_front();
        if (e[23:0] != dw[23:0]) begin
          // words skipped after an underrun: accept if the word is later in the sent order
          int k;
          k = -1;
          foreach (exp_q[j]) if (k < 0 && exp_q[j][23:0] == dw[23:0]) k = j;
          if (k >= 0) begin n_slip++; repeat (k + 1) void'(exp_q.pop_front()); n_words++; end
          else begin failures++; if (failures < 10) $display("FAIL %0t audio got %h exp %h", $time, dw, e); end
        end else n_words++;
      end
    end
    if (!stable) while (exp_q.size() > 4096) void'(exp_q.pop_front());
  end

  initial begin
    #120ms;
    failures++;
    $display("FAIL watchdog: state %0d frames %0d", tstate, n_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    t.htotal = 2160; t.vtotal = 1250; t.hstart = 496; t.vstart = 49; t.hsw = 192; t.vsw = 3;
    t.hwidth = 1600; t.vheight = 1200;
    repeat (5) @(posedge lclk);
    rst_n = 1;
    wait (tstate == 3'd4);
    $display("%0t normal operation, %0d lanes", $time, lane_count);
    checks++; if (lane_count != 3'd4) begin failures++; $display("FAIL lane count %0d", lane_count); end
    wait (n_frames >= 1);
    checks++; if (n_good != 1) begin failures++; $display("FAIL frame not intact"); end
    checks++; if (!rmsa_valid || rmsa != t) begin failures++; $display("FAIL recovered attributes %p", rmsa); end
    checks++; if (!edid_ok) begin failures++; $display("FAIL EDID"); end
    checks++; if (n_words < 100) begin failures++; $display("FAIL only %0d audio words", n_words); end
    checks++; if (n_stuff == 0 || n_sdp == 0 || n_apkt == 0) begin failures++; $display("FAIL stuffing %0d sdp %0d audio %0d", n_stuff, n_sdp, n_apkt); end
    $display("pixels=%0d audio words=%0d audio underruns=%0d slips=%0d maud=%0d naud=%0d", n_px, n_words, n_aund, n_slip, rmaud, rnaud);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
