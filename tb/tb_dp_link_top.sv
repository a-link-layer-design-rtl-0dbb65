// tb_dp_link_top: end-to-end test of the link layer, source to sink.
//
// A pattern generator drives a small DVI raster and an S/PDIF generator a
// counting audio stream into the source. The main link code groups pass
// through a channel model back into the sink; the AUX line is internal.
// The test follows link training from hot plug to normal operation
// (counting every state change of the training FSM and the DEFER replies
// of the DPCD while it is still initialising), then checks the sink's
// video pixel by pixel against the pattern formula and its audio word by
// word against what was sent. The channel model then
//   * changes one code group inside a secondary data packet on lane 0 into
//     another valid data code (the packet ECC must correct it), and
//   * holds lane 2 at an invalid code until the sink reports loss of clock
//     recovery (interrupt request -> retraining -> normal operation).
// Every mechanism is counted; one that never happens is a failure.
module tb_dp_link_top;
  import dp_pkg::*;
  logic pclk = 0, lclk = 0, rst_n = 0;
  always #5 pclk = ~pclk;          // 100 MHz stream clock
  always #4 lclk = ~lclk;          // 125 MHz link symbol clock
  int checks = 0, failures = 0;
  localparam int CELL = 4;

  // ---------------- sources
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
    smp    = 24'(nsent * 24'h012345 + 7);
    s_word = {2'b00, (nsent % 2 == 0) ? ((nsent % 384 == 0) ? 2'd0 : 2'd1) : 2'd2,
              1'b0, 1'b0, 1'b0, 1'b0, smp};
  end
  always @(posedge lclk) if (s_pop) begin exp_q.push_back(s_word); nsent++; end
  spdif_tx #(.CELL(CELL)) u_asrc (.clk(lclk), .rst_n, .word_avail(1'b1), .word_in(s_word),
                                  .word_pop(s_pop), .spdif_out(spdif_line));

  // ---------------- DUT
  logic [MAX_LANES-1:0][9:0] tx_codes, rx_codes, flip;
  logic [MAX_LANES-1:0]      force_bad;
  logic rhs, rvs, rde, spdif_out, hpd, edid_ok, aligned, rmsa_valid;
  logic [23:0] rrgb, rmaud, rnaud;
  logic [2:0] tstate, lane_count;
  msa_t rmsa;
  logic ev_trans, ev_defer, ev_nack, ev_stuff, ev_msa, ev_sdp, ev_apkt, ev_corr, ev_fail,
        ev_under, ev_ovf, ev_serr, ev_aund;

  always_comb
    for (int l = 0; l < MAX_LANES; l++)
      rx_codes[l] = force_bad[l] ? 10'b0000000000 : tx_codes[l] ^ flip[l];

  dp_link_top #(.LCLK_KHZ(125000), .BS_PERIOD(64), .TBC_DEPTH(64), .START_GROUPS(6),
    .AUX_HALF(4), .AUX_TIMEOUT(3000), .AUX_RETRY_GAP(400), .TRAIN_WAIT(200),
    .TURNAROUND(20), .DPCD_INIT(3000), .IRQ_LEN(50), .SPDIF_CELL(CELL), .AUD_K(16)) dut (
    .pclk, .lclk, .rst_n, .pclk_khz(20'd100000), .dvi_hs_in(hs), .dvi_vs_in(vs),
    .dvi_de_in(de), .dvi_rgb_in(rgb), .spdif_in(spdif_line), .ml_tx_codes(tx_codes),
    .ml_rx_codes(rx_codes), .aux_phase_src(4'd1), .aux_phase_snk(4'd2),
    .dvi_hs_out(rhs), .dvi_vs_out(rvs), .dvi_de_out(rde), .dvi_rgb_out(rrgb), .spdif_out,
    .train_state(tstate), .lane_count, .hpd, .edid_ok, .rx_aligned(aligned),
    .rx_msa_valid(rmsa_valid), .rx_msa(rmsa), .rx_maud(rmaud), .rx_naud(rnaud),
    .ev_train_trans(ev_trans), .ev_aux_defer(ev_defer), .ev_aux_nack(ev_nack),
    .ev_stuff, .ev_msa, .ev_sdp, .ev_audio_pkt(ev_apkt), .ev_ecc_corrected(ev_corr),
    .ev_ecc_fail(ev_fail), .ev_tbc_underflow(ev_under), .ev_tbc_overflow(ev_ovf),
    .ev_sync_err(ev_serr), .ev_audio_underrun(ev_aund));

  // ---------------- mechanism counters
  int n_t12 = 0, n_t23 = 0, n_t34 = 0, n_t32 = 0, n_t42 = 0, n_defer = 0, n_stuff = 0,
      n_msa = 0, n_sdp = 0, n_apkt = 0, n_corr = 0, n_fail = 0, n_align = 0, n_irq = 0;
  logic [2:0] tstate_q = 3'd0;
  logic aligned_q = 0, hpd_q = 0;
  logic stable = 0;                 // normal operation, settled
  int   settle = 0;
  always @(posedge lclk) begin
    tstate_q <= tstate; aligned_q <= aligned; hpd_q <= hpd;
    if (rst_n && tstate != tstate_q) begin
      $display("%0t training state %0d -> %0d", $time, tstate_q, tstate);
      if (tstate_q == 1 && tstate == 2) n_t12++;
      if (tstate_q == 2 && tstate == 3) n_t23++;
      if (tstate_q == 3 && tstate == 4) n_t34++;
      if (tstate_q == 3 && tstate == 2) n_t32++;
      if (tstate_q == 4 && tstate == 2) n_t42++;
    end
    if (ev_defer) n_defer++;
    if (ev_stuff) n_stuff++;
    if (ev_msa) n_msa++;
    if (ev_sdp) n_sdp++;
    if (ev_apkt) n_apkt++;
    if (ev_corr && stable) n_corr++;   // only corrections of the injected error count
    if (ev_fail && stable) n_fail++;
    if (aligned && !aligned_q) n_align++;
    if (!hpd && hpd_q) n_irq++;
    if (ev_nack) begin failures++; $display("FAIL unexpected NACK"); end
    if (tstate == 4) begin
      if (settle < 40000) settle++;
    end else settle = 0;
    stable <= settle >= 40000 && force_bad == '0;
  end

  // ---------------- video checker (sink raster against the pattern)
  int x = 0, y = -1, n_frames = 0, n_px = 0, n_vgood_frames = 0;
  logic rde_q = 0, rvs_q = 0, vstarted = 0, frame_ok = 0;
  logic [7:0] rkey;
  always @(posedge pclk) begin
    rde_q <= rde; rvs_q <= rvs;
    if (!stable) vstarted = 0;
    if (stable && (ev_serr || ev_under)) begin
      failures++; $display("FAIL %0t sink raster error (sync %0d underflow %0d)", $time, ev_serr, ev_under);
    end
    if (rvs && !rvs_q) begin
      if (vstarted && y >= 0) begin
        checks++;
        if (y + 1 != int'(t.vheight)) begin failures++; $display("FAIL frame height %0d", y + 1); end
        else if (frame_ok) n_vgood_frames++;
        n_frames++;
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
        if (failures < 10) $display("FAIL pixel (%0d,%0d) got %h", x, y, rrgb);
      end
    end
    if (rde) x++;
    if (!rde && rde_q && vstarted) begin
      checks++;
      if (x != int'(t.hwidth)) begin failures++; $display("FAIL line width %0d", x); end
    end
  end

  // ---------------- audio checker (sink S/PDIF against the words sent)
  logic dv, dtick;
  logic [31:0] dw;
  spdif_rx #(.CELL(CELL)) u_achk (.clk(lclk), .rst_n, .spdif_in(spdif_out), .word_valid(dv),
                                  .word(dw), .sample_tick(dtick));
  int n_words = 0;
  logic resync = 1;
  always @(posedge lclk) begin
    if (!stable) resync = 1;
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
        if (e[23:0] != dw[23:0] || e[29:28] != dw[29:28]) begin
          failures++;
          if (failures < 10) $display("FAIL audio word got %h exp %h", dw, e);
        end else n_words++;
      end
    end
    while (exp_q.size() > 4096) void'(exp_q.pop_front());
  end

  // ---------------- channel model: one data code changed inside an SDP on lane 0
  logic sv0, se0;
  sym_t s0, p1, p2;
  logic arm = 0, injected = 0;
  int   since = 0;
  dec8b10b u_mon (.clk(lclk), .rst_n, .in_valid(1'b1), .in_code(tx_codes[0]),
                  .out_valid(sv0), .out_sym(s0), .out_err(se0));
  function automatic logic balanced6(input logic [9:0] c);
    return $countones(c[9:4]) == 3;
  endfunction
  always @(posedge lclk) begin
    if (sv0) begin p1 <= s0; p2 <= p1; end
    // start of an SDP: SS followed by a data symbol, not preceded by another SS
    if (arm && sv0 && !s0.k && p1.k && p1.d == K_SS && !(p2.k && p2.d == K_SS)) since = 1;
    else if (since != 0) since++;
  end
  always @(negedge lclk) begin
    flip = '0;
    if (arm && !injected && since >= 4 && since < 20 && balanced6(tx_codes[0]) &&
        tx_codes[0][9] != tx_codes[0][8]) begin
      flip[0] = 10'b1100000000;      // swap bits a and b: another valid data code
      injected = 1;
      $display("%0t channel: lane 0 code %b changed", $time, tx_codes[0]);
    end
  end

  initial begin
    #20000000;
    failures++;
    $display("FAIL watchdog: state %0d", tstate);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_event(input string what, input int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never seen: %s", what); end
    else $display("  %-34s %0d", what, n);
  endtask

  initial begin
    flip = '0; force_bad = '0;
    t.htotal = 48; t.vtotal = 14; t.hstart = 10; t.vstart = 3; t.hsw = 4; t.vsw = 2;
    t.hwidth = 32; t.vheight = 8;
    repeat (5) @(posedge lclk);
    rst_n = 1;
    wait (stable);
    checks++; if (lane_count != 3'd4) begin failures++; $display("FAIL lane count %0d", lane_count); end
    wait (n_vgood_frames >= 3 && n_words >= 50);
    // packet ECC
    @(posedge lclk) arm = 1;
    wait (injected);
    repeat (5000) @(posedge lclk);
    // loss of clock recovery on lane 2 -> IRQ -> retraining
    @(negedge lclk) force_bad[2] = 1;
    wait (tstate == 2);
    repeat (300) @(negedge lclk);
    force_bad[2] = 0;
    wait (stable);
    begin
      int f0, w0;
      f0 = n_vgood_frames; w0 = n_words;
      wait (n_vgood_frames >= f0 + 3 && n_words >= w0 + 50);
    end
    checks++; if (!rmsa_valid || rmsa != t) begin failures++; $display("FAIL recovered attributes %p", rmsa); end
    checks++; if (!edid_ok) begin failures++; $display("FAIL EDID header not read"); end
    checks++; if (rnaud == 0 || rmaud == 0) begin failures++; $display("FAIL no audio time stamp"); end
    checks++; if (n_fail != 0) begin failures++; $display("FAIL %0d packets not correctable", n_fail); end
    $display("mechanisms:");
    expect_event("AUX DEFER while DPCD initialises", n_defer);
    expect_event("training 1 -> 2 (TPS1)", n_t12);
    expect_event("training 2 -> 3 (TPS2)", n_t23);
    expect_event("training 3 -> 4 (normal)", n_t34);
    expect_event("hpd IRQ pulse", n_irq);
    expect_event("training 4 -> 2 (retrain)", n_t42);
    expect_event("lane deskew aligned", n_align);
    expect_event("transfer unit stuffing", n_stuff);
    expect_event("main stream attribute packet", n_msa);
    expect_event("secondary data packet", n_sdp);
    expect_event("audio packet", n_apkt);
    expect_event("ECC correction", n_corr);
    expect_event("video frames checked", n_vgood_frames);
    expect_event("audio words checked", n_words);
    $display("pixels=%0d 3->2=%0d maud=%0d naud=%0d", n_px, n_t32, rmaud, rnaud);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
