// dp_scrambler: parallel (one symbol per clock) scrambler for one lane.
//
// Data symbols are XORed with 8 bits of a 16-bit LFSR, x^16+x^5+x^4+x^3+1,
// all eight LFSR steps being taken in one clock. Control symbols pass
// unchanged but still advance the LFSR. The LFSR is reset to FFFFh on every
// BS control symbol, so scrambler and descrambler stay in step without any
// extra signalling. The same module is the descrambler: XOR is its own
// inverse. With en low (link training) symbols pass unscrambled.
// Latency: one clock.
module dp_scrambler
  import dp_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic in_valid,
  input  sym_t in_sym,
  output logic out_valid,
  output sym_t out_sym
);
  logic [15:0] lfsr;
  logic [15:0] lfsr_n;
  logic [7:0]  key;

  always_comb begin
    logic [15:0] l;
    l = lfsr;
    for (int i = 0; i < 8; i++) begin
      key[i] = l[15];
      l = {l[14:0], 1'b0} ^ (l[15] ? 16'h0039 : 16'h0000);
    end
    lfsr_n = l;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr      <= 16'hFFFF;
      out_valid <= 1'b0;
      out_sym   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        if (in_sym.k && in_sym.d == K_BS) lfsr <= 16'hFFFF;
        else                              lfsr <= lfsr_n;
        out_sym.k <= in_sym.k;
        out_sym.d <= (en && !in_sym.k) ? (in_sym.d ^ key) : in_sym.d;
      end
    end
  end
endmodule
