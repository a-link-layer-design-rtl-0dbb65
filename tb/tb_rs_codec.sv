// tb_rs_codec: RS(15,13) encoder and decoder over GF(16) (x^4 + x + 1).
// The encoder's parity is checked by evaluating the whole codeword at
// alpha^0 and alpha^1 with the testbench's own field arithmetic (both must
// give zero). Each codeword then goes through the decoder with no error
// (must pass unchanged), one random nibble error (must be corrected and
// flagged) or two errors (must not come out as a clean, unflagged
// codeword). Full-length (13 data nibbles) and shortened (4 data nibbles)
// codewords are used. The decoder's latency (n in, one, n out) is checked.
module tb_rs_codec;
  import dp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       clr = 0, ev = 0, dvld = 0, dlast = 0;
  logic [3:0] enib = '0, dnib = '0, p0, p1;
  logic       ov, olast, ocorr, ofail;
  logic [3:0] onib;
  rs_encoder u_enc (.clk, .rst_n, .clr, .in_valid(ev), .in_nib(enib), .p0, .p1);
  rs_decoder u_dec (.clk, .rst_n, .in_valid(dvld), .in_nib(dnib), .in_last(dlast),
                    .out_valid(ov), .out_nib(onib), .out_last(olast), .out_corrected(ocorr),
                    .out_fail(ofail));

  // own GF(16) arithmetic, x^4 + x + 1
  function automatic logic [3:0] mul(input logic [3:0] a, input logic [3:0] b);
    logic [3:0] r; logic [3:0] x;
    r = 0; x = a;
    for (int i = 0; i < 4; i++) begin
      if (b[i]) r ^= x;
      x = {x[2:0], 1'b0} ^ (x[3] ? 4'b0011 : 4'b0000);
    end
    return r;
  endfunction
  function automatic logic [3:0] eval(input logic [3:0] c [15], input int n, input logic [3:0] a);
    logic [3:0] s; s = 0;
    for (int i = 0; i < n; i++) s = mul(s, a) ^ c[i];   // Horner, first = highest degree
    return s;
  endfunction

  int n_corr = 0, n_fail2 = 0;

  initial begin
    #5000000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [3:0] cw [15];
    logic [3:0] rx [15];
    logic [3:0] got [15];
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      int nd, n, mode, e1, e2, k, lat, start;
      nd = (t % 2 == 0) ? 13 : 4; n = nd + 2; mode = t % 3;
      // encode
      @(negedge clk); clr = 1;
      @(negedge clk); clr = 0;
      for (int i = 0; i < nd; i++) begin
        cw[i] = 4'($urandom); enib = cw[i]; ev = 1; @(negedge clk);
      end
      ev = 0;
      cw[nd] = p0; cw[nd + 1] = p1;
      checks++;
      if (eval(cw, n, 4'd1) != 0 || eval(cw, n, 4'd2) != 0) begin
        failures++; if (failures < 10) $display("FAIL parity: syndromes %h %h", eval(cw, n, 4'd1), eval(cw, n, 4'd2));
      end
      // channel
      for (int i = 0; i < n; i++) rx[i] = cw[i];
      e1 = $urandom_range(0, n - 1);
      e2 = (e1 + 1 + $urandom_range(0, n - 2)) % n;
      if (mode >= 1) rx[e1] ^= 4'($urandom_range(1, 15));
      if (mode == 2) rx[e2] ^= 4'($urandom_range(1, 15));
      // decode
      k = 0; lat = 0;
      fork
        begin
          for (int i = 0; i < n; i++) begin
            dvld = 1; dnib = rx[i]; dlast = (i == n - 1); @(negedge clk);
          end
          dvld = 0; dlast = 0;
        end
        begin
          start = 0;
          while (k < n) begin
            @(posedge clk); #1;
            lat++;
            if (ov) begin
              got[k] = onib; k++;
              if (olast) begin
                checks++;
                if (mode == 0 && (ocorr || ofail)) begin failures++; $display("FAIL clean word flagged"); end
                if (mode == 1 && !ocorr) begin failures++; $display("FAIL single error not flagged corrected"); end
                if (mode == 2 && ofail) n_fail2++;
              end
            end
            if (lat > 4 * n + 10) begin failures++; $display("FAIL decoder gave no output"); k = n; end
          end
        end
      join
      checks++;
      if (lat != 2 * n + 1) begin failures++; if (failures < 10) $display("FAIL latency %0d for n=%0d", lat, n); end
      begin
        logic same; same = 1;
        for (int i = 0; i < n; i++) if (got[i] != cw[i]) same = 0;
        checks++;
        if (mode < 2 && !same) begin failures++; if (failures < 10) $display("FAIL codeword %0d not restored (mode %0d)", t, mode); end
        if (mode == 1 && same) n_corr++;
      end
    end
    checks++; if (n_corr == 0) begin failures++; $display("FAIL no corrections"); end
    checks++; if (n_fail2 == 0) begin failures++; $display("FAIL double errors never detected"); end
    $display("corrected=%0d double-error detected=%0d", n_corr, n_fail2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
