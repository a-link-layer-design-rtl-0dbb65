// tb_dp_video: video transmitter to receiver loopback through the 10-bit
// lane codes. A pattern generator drives a small raster; the receiver's
// regenerated raster is checked pixel by pixel against the pattern formula
// (G = line, B = column + 3*line, R ^ column constant over a frame), the
// line width and frame height are checked, and the link is seen to insert
// stuffing, an attribute packet and BS symbols.
module tb_dp_video;
  import dp_pkg::*;
  logic pclk = 0, lclk = 0, rst_n = 0;
  always #5 pclk = ~pclk;
  always #4 lclk = ~lclk;
  int checks = 0, failures = 0;

  msa_t t;
  logic hs, vs, de;
  logic [23:0] rgb;
  logic [MAX_LANES-1:0][9:0] codes;
  logic [2:0] lane_count = 3'd4;
  logic [1:0] tps = 2'd0;
  logic sdp_pop, msa_valid_tx, line_tick, vblank_tick, ev_fill, ev_underflow, ev_msa, ev_sdp, ev_ff;
  logic [MAX_LANES-1:0] cr_done, sym_locked;
  logic aligned, msa_valid, vbid_valid, tbc_ovf, rhs, rvs, rde, underflow, sync_err;
  sym_t lane0;
  msa_t rmsa;
  logic [7:0] vbid;
  logic [23:0] rrgb;

  dvi_pattern_gen u_src (.clk(pclk), .rst_n, .run(1'b1), .t, .hs, .vs, .de, .rgb);
  dp_video_tx #(.BS_PERIOD(64)) u_tx (.pclk, .prst_n(rst_n), .hs, .vs, .de, .rgb,
    .lclk, .lrst_n(rst_n), .lane_count, .tu_size(7'd32), .tu_valid(7'd24), .tps, .video_en(1'b1), .maud(8'h00),
    .sdp_avail(1'b0), .sdp_sym('0), .sdp_last(1'b0), .sdp_pop, .codes,
    .msa_valid(msa_valid_tx), .line_tick, .vblank_tick, .ev_fill, .ev_underflow, .ev_msa, .ev_sdp,
    .ev_fifo_full(ev_ff));
  dp_video_rx #(.TBC_DEPTH(64), .START_GROUPS(6)) u_rx (.lclk, .lrst_n(rst_n), .codes, .lane_count, .tps, .video_en(1'b1),
    .cr_done, .sym_locked, .aligned, .lane0, .msa(rmsa), .msa_valid, .vbid_valid, .vbid,
    .tbc_overflow(tbc_ovf), .pclk, .prst_n(rst_n), .hs(rhs), .vs(rvs), .de(rde), .rgb(rrgb),
    .underflow, .sync_err);

  int n_fill = 0, n_msa = 0, n_bs = 0, n_under = 0, n_frames = 0, n_px = 0;
  always @(posedge lclk) begin
    if (ev_fill) n_fill++;
    if (ev_msa) n_msa++;
    if (line_tick) n_bs++;
    if (tbc_ovf) begin failures++; if (failures < 5) $display("FAIL receiver buffer overflow at %0t", $time); end
  end

  // receiver raster checker
  int x = 0, y = -1, rfirst = 1;
  logic rde_q = 0, rvs_q = 0;
  logic [7:0] rkey;
  always @(posedge pclk) begin
    rde_q <= rde; rvs_q <= rvs;
    if (underflow) n_under++;
    if (sync_err) begin failures++; $display("FAIL sync_err"); end
    if (rvs && !rvs_q) begin
      if (y >= 0) begin
        checks++;
        if (y + 1 != int'(t.vheight)) begin failures++; $display("FAIL frame height %0d", y + 1); end
        n_frames++;
      end
      y = -1;
    end
    if (rde && !rde_q) begin y++; x = 0; end
    if (rde) begin
      checks++;
      n_px++;
      if (x == 0 && y == 0) rkey = rrgb[23:16] ^ 8'(x);
      if (rrgb[15:8] != 8'(y) || rrgb[7:0] != 8'(x + 3*y) || (rrgb[23:16] ^ 8'(x)) != rkey) begin
        failures++;
        if (failures < 10) $display("FAIL pixel (%0d,%0d) got %h", x, y, rrgb);
      end
      x++;
    end
    if (!rde && rde_q) begin
      checks++;
      if (x != int'(t.hwidth)) begin failures++; $display("FAIL line width %0d", x); end
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    t.htotal = 48; t.vtotal = 14; t.hstart = 10; t.vstart = 3; t.hsw = 4; t.vsw = 2;
    t.hwidth = 32; t.vheight = 8;
    repeat (5) @(posedge pclk);
    rst_n = 1;
    wait (n_frames == 4);
    checks++; if (n_fill == 0) begin failures++; $display("FAIL no stuffing"); end
    checks++; if (n_msa == 0) begin failures++; $display("FAIL no attribute packet"); end
    checks++; if (rmsa != t) begin failures++; $display("FAIL recovered attributes %p", rmsa); end
    checks++; if (!aligned) begin failures++; $display("FAIL lanes not aligned"); end
    $display("fills=%0d msa=%0d bs=%0d underflow=%0d px=%0d", n_fill, n_msa, n_bs, n_under, n_px);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
