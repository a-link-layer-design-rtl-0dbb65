// tb_manchester: AUX channel coding. A Manchester-II encoder sends frames
// of 1 to 20 random bytes; the line passes through the data shifter with a
// random phase setting into the decoder. Checks: the decoder returns every
// byte in order, frame_start and frame_end with the right byte count, the
// first bit of SYNC is high then low (a zero, second half = bit value),
// and the frame lasts (16 + 4 + 8*bytes + 4) bit times (SYNC end and STOP are two bit times high, two low) with aux_oe high.
module tb_manchester;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int HALF = 8;
  logic start = 0;
  logic [19:0][7:0] bytes = '0;
  logic [4:0] nb = '0, dnb;
  logic line, oe, done, dly, bv, fs, fe;
  logic [7:0] bo;
  logic [3:0] delay = '0;
  manchester_enc #(.HALF(HALF), .MAXBYTES(20)) u_enc (.clk, .rst_n, .start, .bytes, .nbytes(nb),
    .aux_out(line), .aux_oe(oe), .done);
  aux_data_shifter #(.MAXDLY(15)) u_sh (.clk, .rst_n, .aux_in(oe ? line : 1'b0), .delay, .aux_dly(dly));
  manchester_dec #(.HALF(HALF)) u_dec (.clk, .rst_n, .en(1'b1), .aux_in(dly), .byte_valid(bv),
    .byte_out(bo), .frame_start(fs), .frame_end(fe), .nbytes(dnb));

  logic [7:0] q[$];
  int n_fs = 0, n_fe = 0;
  always @(posedge clk) if (rst_n) begin
    if (fs) n_fs++;
    if (bv) begin
      checks++;
      if (q.size() == 0) begin failures++; $display("FAIL extra byte %h", bo); end
      else if (bo != q.pop_front()) begin failures++; $display("FAIL byte %h", bo); end
    end
    if (fe) begin
      n_fe++;
      checks++;
      if (dnb != nb) begin failures++; $display("FAIL byte count %0d exp %0d", dnb, nb); end
    end
  end

  initial begin
    #20000000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int f = 0; f < 60; f++) begin
      int len, oe_cycles;
      len = $urandom_range(1, 20);
      @(negedge clk);
      nb = 5'(len); delay = 4'($urandom_range(0, 15));
      for (int i = 0; i < 20; i++) begin bytes[i] = 8'($urandom); if (i < len) q.push_back(bytes[i]); end
      start = 1;
      @(negedge clk); start = 0;
      oe_cycles = 0;
      // first half of the first SYNC bit high, second half low
      repeat (HALF / 2) @(negedge clk);
      checks++; if (!(oe && line)) begin failures++; $display("FAIL SYNC first half not high"); end
      repeat (HALF) @(negedge clk);
      checks++; if (!(oe && !line)) begin failures++; $display("FAIL SYNC second half not low"); end
      oe_cycles = HALF / 2 + HALF + 1;
      while (oe) begin @(negedge clk); oe_cycles++; end
      checks++;
      if (oe_cycles < 2 * HALF * (24 + 8 * len) - 2 || oe_cycles > 2 * HALF * (24 + 8 * len) + 2) begin
        failures++; $display("FAIL frame of %0d bytes lasted %0d clocks", len, oe_cycles);
      end
      repeat (12 * HALF) @(negedge clk);
      checks++; if (q.size() != 0) begin failures++; $display("FAIL %0d bytes lost", q.size()); q.delete(); end
    end
    checks++; if (n_fs != 60 || n_fe != 60) begin failures++; $display("FAIL frames %0d %0d", n_fs, n_fe); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
