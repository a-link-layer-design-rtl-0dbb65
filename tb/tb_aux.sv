// tb_aux: AUX channel requester and replier over one shared line, with the
// DPCD memory and the EDID ROM behind the replier. Checks:
//   * a native read while the DPCD is still initialising is answered with
//     DEFER and retried until the ACK, which carries 11h, the link rate
//     and 04h from the capability field;
//   * a native write of LINK_BW_SET, LANE_COUNT_SET and
//     TRAINING_PATTERN_SET is ACKed, reaches the DPCD outputs and reads back;
//   * a native write to the read-only capability field gets NACK;
//   * the lane status bytes follow the receiver status inputs;
//   * an I2C write of offset 0 to address 50h and eight 16-byte I2C reads
//     return the EDID: header 00 FF FF FF FF FF FF 00, bytes summing to 0;
//   * an I2C request to another address gets NACK;
//   * with the replier cut off the requester gives up with timeout after
//     its retries.
module tb_aux;
  import dp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int HALF = 4;

  logic req = 0, busy, done, tmo, cut = 0;
  logic [3:0] cmd = '0, reply, ndefer;
  logic [19:0] addr = '0;
  logic [4:0] len = 5'd1, rlen;
  logic [AUX_MAX_BYTES-1:0][7:0] wdata = '0, rdata;
  logic s_out, s_oe, k_out, k_oe, line;
  logic [19:0] d_addr;
  logic [7:0] d_rdata, d_wdata, e_rdata, bw;
  logic d_we, d_ok, d_ready, hpd, ev_defer, ev_nack, ev_edid;
  logic [6:0] e_addr;
  logic [2:0] lcs;
  logic [1:0] tps;
  logic [3:0] cr = '0, lk = '0;
  logic al = 0;

  assign line = s_oe ? s_out : (k_oe && !cut) ? k_out : 1'b0;

  aux_source_fsm #(.HALF(HALF), .REPLY_TIMEOUT(2000), .RETRY_GAP(300), .MAX_RETRY(7)) u_src (
    .clk, .rst_n, .req, .cmd, .addr, .len, .wdata, .busy, .done, .reply, .timeout(tmo), .rdata,
    .rlen, .ndefer, .aux_in(line), .aux_out(s_out), .aux_oe(s_oe), .phase_delay(4'd1));
  aux_sink_fsm #(.HALF(HALF), .TURNAROUND(20)) u_snk (.clk, .rst_n, .aux_in(line), .aux_out(k_out),
    .aux_oe(k_oe), .phase_delay(4'd3), .dpcd_addr(d_addr), .dpcd_rdata(d_rdata), .dpcd_we(d_we),
    .dpcd_wdata(d_wdata), .dpcd_wr_ok(d_ok), .dpcd_ready(d_ready), .edid_addr(e_addr),
    .edid_rdata(e_rdata), .ev_defer, .ev_nack, .ev_edid);
  dpcd_mem #(.MAX_LINK_RATE(8'h0A), .MAX_LANE_COUNT(8'h04), .INIT_CYCLES(3000), .IRQ_LEN(20)) u_dpcd (
    .clk, .rst_n, .rd_addr(d_addr), .rd_data(d_rdata), .wr_en(d_we), .wr_addr(d_addr),
    .wr_data(d_wdata), .wr_ok(d_ok), .ready(d_ready), .cr_done(cr), .eq_done(lk), .sym_locked(lk),
    .aligned(al), .link_bw_set(bw), .lane_count_set(lcs), .tps, .hpd);
  edid_rom u_edid (.addr(e_addr), .rdata(e_rdata));

  task automatic xfer(input logic [3:0] c, input logic [19:0] a, input int n);
    @(negedge clk); req = 1; cmd = c; addr = a; len = 5'(n);
    @(negedge clk); req = 0;
    while (!done) @(negedge clk);
  endtask
  task automatic expect_reply(input string what, input logic [3:0] r);
    checks++;
    if (tmo || reply != r) begin failures++; $display("FAIL %s: reply %0d timeout %0d", what, reply, tmo); end
  endtask

  initial begin
    #50000000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [7:0] sum;
    repeat (3) @(posedge clk); rst_n = 1;
    // capability read during DPCD initialisation
    xfer(AUX_NATIVE_RD, 20'h00000, 3);
    expect_reply("capability read", AUX_ACK);
    checks++; if (ndefer == 0) begin failures++; $display("FAIL no DEFER while initialising"); end
    checks++; if (rdata[0] != 8'h11 || rdata[1] != 8'h0A || rdata[2] != 8'h04 || rlen != 5'd3) begin
      failures++; $display("FAIL capability %h %h %h (%0d bytes)", rdata[0], rdata[1], rdata[2], rlen); end
    $display("capability read took %0d DEFER replies", ndefer);
    // link configuration write and read back
    wdata = '0; wdata[0] = 8'h0A; wdata[1] = 8'h02; wdata[2] = 8'h01;
    xfer(AUX_NATIVE_WR, 20'h00100, 3);
    expect_reply("configuration write", AUX_ACK);
    checks++; if (bw != 8'h0A || lcs != 3'd2 || tps != 2'd1) begin failures++; $display("FAIL DPCD outputs %h %0d %0d", bw, lcs, tps); end
    xfer(AUX_NATIVE_RD, 20'h00100, 3);
    expect_reply("configuration read", AUX_ACK);
    checks++; if (rdata[0] != 8'h0A || rdata[1] != 8'h02 || rdata[2] != 8'h01) begin failures++; $display("FAIL read back"); end
    // write to read-only field
    wdata[0] = 8'h55;
    xfer(AUX_NATIVE_WR, 20'h00001, 1);
    expect_reply("write to capability", AUX_NACK);
    // lane status
    cr = 4'b0011; lk = 4'b0001; al = 1;
    xfer(AUX_NATIVE_RD, 20'h00202, 3);
    expect_reply("status read", AUX_ACK);
    checks++; if (rdata[0] != 8'h17 || rdata[1] != 8'h00 || rdata[2] != 8'h01) begin
      failures++; $display("FAIL status %h %h %h", rdata[0], rdata[1], rdata[2]); end
    // EDID over I2C
    wdata = '0;
    xfer(AUX_I2C_WR, 20'h00050, 1);
    expect_reply("EDID offset write", AUX_ACK);
    sum = 0;
    for (int blk = 0; blk < 8; blk++) begin
      xfer(AUX_I2C_RD, 20'h00050, 16);
      expect_reply("EDID read", AUX_ACK);
      if (blk == 0) begin
        checks++;
        if (rdata[7:0] != {8'h00, {6{8'hFF}}, 8'h00}) begin failures++; $display("FAIL EDID header %h", rdata[7:0]); end
      end
      for (int i = 0; i < 16; i++) sum += rdata[i];
    end
    checks++; if (sum != 0) begin failures++; $display("FAIL EDID checksum %h", sum); end
    xfer(AUX_I2C_RD, 20'h00051, 1);
    expect_reply("I2C other address", AUX_NACK);
    // no replier
    cut = 1;
    xfer(AUX_NATIVE_RD, 20'h00000, 1);
    checks++; if (!tmo) begin failures++; $display("FAIL no timeout without replier"); end
    cut = 0;
    xfer(AUX_NATIVE_RD, 20'h00000, 1);
    expect_reply("read after timeout", AUX_ACK);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
