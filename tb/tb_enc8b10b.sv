// tb_enc8b10b: checks the 8B/10B encoder against code groups from the
// standard tables (K28.5 in both disparities, a few data codes), checks
// that the running disparity stays within +-1 over a random stream, and
// that every data and control code decodes back to its symbol.
module tb_enc8b10b;
  import dp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  sym_t in_sym = '0;
  logic out_valid;
  logic [9:0] out_code;
  logic dvalid, derr;
  sym_t dsym;
  int checks = 0, failures = 0;
  int disp = -1;

  enc8b10b dut (.clk, .rst_n, .in_valid, .in_sym, .out_valid, .out_code);
  dec8b10b chk (.clk, .rst_n, .in_valid(out_valid), .in_code(out_code),
                .out_valid(dvalid), .out_sym(dsym), .out_err(derr));

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic sym_t mk(input logic k, input logic [7:0] d);
    sym_t s; s.k = k; s.d = d; return s;
  endfunction
  task automatic send(input logic k, input logic [7:0] d);
    in_valid = 1; in_sym = mk(k, d);
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic expect_code(input logic [9:0] exp, input string what);
    checks++;
    if (out_code !== exp) begin
      failures++;
      $display("FAIL %s: got %b exp %b", what, out_code, exp);
    end
  endtask

  sym_t q[$];
  always @(posedge clk) if (rst_n && dvalid) begin
    sym_t e;
    e = q.pop_front();
    checks++;
    if (derr || dsym != e) begin
      failures++;
      $display("FAIL roundtrip exp k%0d %h got k%0d %h err %0d", e.k, e.d, dsym.k, dsym.d, derr);
    end
  end
  always @(posedge clk) if (rst_n && out_valid) begin
    disp += 2*$countones(out_code) - 10;
    checks++;
    if (disp > 1 || disp < -1) begin
      failures++;
      $display("FAIL disparity %0d", disp);
    end
    // record the symbol that produced this code for the decode check
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // RD- K28.5 = 001111 1010, then RD+ K28.5 = 110000 0101
    q.push_back(mk(1'b1, K_BS)); send(1, K_BS); expect_code(10'b0011111010, "K28.5-");
    q.push_back(mk(1'b1, K_BS)); send(1, K_BS); expect_code(10'b1100000101, "K28.5+");
    // now RD-: D10.2 = 010101 0101 (neutral)
    q.push_back(mk(1'b0, D10_2)); send(0, D10_2); expect_code(10'b0101010101, "D10.2");
    // D0.0 RD- = 100111 0100
    q.push_back(mk(1'b0, 8'h00)); send(0, 8'h00); expect_code(10'b1001110100, "D0.0-");
    // RD- again: D21.5 = 101010 1010
    q.push_back(mk(1'b0, 8'hB5)); send(0, 8'hB5); expect_code(10'b1010101010, "D21.5");
    // all data values, then all control codes, twice
    for (int r = 0; r < 2; r++) begin
      for (int i = 0; i < 256; i++) begin q.push_back(mk(1'b0, 8'(i))); send(0, 8'(i)); end
      q.push_back(mk(1'b1, K_BE)); send(1, K_BE);
      q.push_back(mk(1'b1, K_FS)); send(1, K_FS);
      q.push_back(mk(1'b1, K_FE)); send(1, K_FE);
      q.push_back(mk(1'b1, K_SS)); send(1, K_SS);
      q.push_back(mk(1'b1, K_SE)); send(1, K_SE);
      q.push_back(mk(1'b1, K_SR)); send(1, K_SR);
      q.push_back(mk(1'b1, K_BS)); send(1, K_BS);
      for (int y = 0; y < 8; y++) begin q.push_back(mk(1'b1, {3'(y), 5'd28})); send(1, {3'(y), 5'd28}); end
    end
    for (int i = 0; i < 2000; i++) begin
      logic [7:0] d; d = 8'($urandom);
      q.push_back(mk(1'b0, d)); send(0, d);
    end
    repeat (5) @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL %0d symbols not decoded", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
