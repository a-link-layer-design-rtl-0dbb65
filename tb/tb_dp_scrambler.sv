// tb_dp_scrambler: checks the lane scrambler against the published
// scrambling sequence of the x^16+x^5+x^4+x^3+1 LFSR seeded with FFFFh
// (data 00h after a BS gives FF 17 C0 14 B2 E7 02 82), checks that control
// symbols pass unchanged, that a BS restarts the sequence, that a second
// instance used as descrambler restores random data, and that with en low
// data passes unchanged.
module tb_dp_scrambler;
  import dp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic en = 1, iv = 0, sv, dv;
  sym_t is = '0, ss, ds;
  dp_scrambler u_scr (.clk, .rst_n, .en, .in_valid(iv), .in_sym(is), .out_valid(sv), .out_sym(ss));
  dp_scrambler u_dsc (.clk, .rst_n, .en, .in_valid(sv), .in_sym(ss), .out_valid(dv), .out_sym(ds));

  localparam logic [7:0] SEQ [8] = '{8'hFF, 8'h17, 8'hC0, 8'h14, 8'hB2, 8'hE7, 8'h02, 8'h82};
  sym_t sent_q[$];
  sym_t scr_q[$];
  logic check_seq = 0;
  int   seq_i = 0;

  function automatic sym_t mk(input logic k, input logic [7:0] d);
    sym_t s; s.k = k; s.d = d; return s;
  endfunction
  task automatic send(input sym_t s);
    @(negedge clk); iv = 1; is = s; sent_q.push_back(s);
  endtask

  always @(posedge clk) begin
    if (sv) scr_q.push_back(ss);
    if (dv) begin
      sym_t e;
      e = sent_q.pop_front();
      checks++;
      if (ds != e) begin failures++; if (failures < 10) $display("FAIL descrambled %h exp %h", ds, e); end
    end
  end

  initial begin
    #1000000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    // sequence check: BS then eight 00h, twice (BS restarts the LFSR)
    for (int r = 0; r < 2; r++) begin
      send(mk(1'b1, K_BS));
      for (int i = 0; i < 8; i++) send(mk(1'b0, 8'h00));
    end
    // random traffic with control symbols
    for (int i = 0; i < 2000; i++) begin
      if ($urandom_range(0, 15) == 0) send(mk(1'b1, ($urandom_range(0, 3) == 0) ? K_BS : K_FS));
      else send(mk(1'b0, 8'($urandom)));
    end
    @(negedge clk); iv = 0;
    repeat (5) @(posedge clk);
    // scrambled sequence
    for (int r = 0; r < 2; r++) begin
      sym_t s;
      s = scr_q.pop_front();
      checks++; if (s != mk(1'b1, K_BS)) begin failures++; $display("FAIL BS changed: %h", s); end
      for (int i = 0; i < 8; i++) begin
        s = scr_q.pop_front();
        checks++;
        if (s.k || s.d != SEQ[i]) begin failures++; $display("FAIL sequence byte %0d: %h exp %h", i, s.d, SEQ[i]); end
      end
    end
    // control symbols untouched
    begin
      for (int i = 0; i < 2000; i++) begin
        sym_t s;
        s = scr_q.pop_front();
        if (s.k) begin checks++; if (s.d != K_BS && s.d != K_FS) begin failures++; $display("FAIL control %h", s.d); end end
      end
    end
    // bypass
    en = 0;
    for (int i = 0; i < 50; i++) begin
      send(mk(1'b0, 8'(i * 7)));
      @(posedge clk); #1;
      checks++; if (ss.d != 8'(i * 7)) begin failures++; $display("FAIL bypass %h", ss.d); end
    end
    @(negedge clk); iv = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
