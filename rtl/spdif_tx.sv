// spdif_tx: S/PDIF transmitter (secondary data sink output stage).
//
// Sends 32-bit audio words (format of spdif_rx: sample in [23:0], V U C in
// [26:24], preamble code in [29:28]) as biphase-mark-coded subframes of 64
// cells, CELL clocks per cidx. A subframe is an 8-cidx preamble (B
// 11101000, M 11100010, W 11100100, inverted when the line was high) and
// slots 4..31, each bit starting with a transition and a 1 having a second
// one in mid-bit. The parity bit (slot 31) is regenerated for even parity.
// A new word is taken (word_pop) at the start of each subframe; with none
// available the line holds its level and the next cidx tries again.
module spdif_tx #(
  parameter int CELL = 26
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        word_avail,
  input  logic [31:0] word_in,
  output logic        word_pop,
  output logic        spdif_out
);
  localparam int CW = $clog2(CELL + 1);
  logic [CW-1:0] ccnt;
  logic [5:0]    cidx;
  logic          busy;
  logic [7:0]    pre;
  logic [27:0]   slots;  // slots 4..31, slot 4 at bit 0
  logic          lvl0;   // line level before the preamble

  assign word_pop = !busy && word_avail && ccnt == '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ccnt <= '0; cidx <= '0; busy <= 1'b0; pre <= '0; slots <= '0; lvl0 <= 1'b0;
      spdif_out <= 1'b0;
    end else begin
      ccnt <= (ccnt == CW'(CELL - 1)) ? '0 : ccnt + 1'b1;
      if (ccnt == '0) begin
        if (!busy) begin
          if (word_avail) begin
            logic [26:0] d;
            d     = word_in[26:0];
            slots <= {^d, d};
            case (word_in[29:28])
              2'd0:    pre <= 8'b11101000;
              2'd1:    pre <= 8'b11100010;
              default: pre <= 8'b11100100;
            endcase
            busy <= 1'b1;
            cidx <= 6'd1;
            lvl0 <= spdif_out;
            spdif_out <= ~spdif_out; // every preamble starts with a transition
          end
        end else begin
          if (cidx < 6'd8) begin
            spdif_out <= pre[7 - cidx[2:0]] ^ lvl0;
          end else if (!cidx[0]) begin
            spdif_out <= ~spdif_out;
          end else if (slots[cidx[5:1] - 5'd4]) begin
            spdif_out <= ~spdif_out;
          end
          if (cidx == 6'd63) busy <= 1'b0;
          cidx <= cidx + 1'b1;
        end
      end
    end
  end
endmodule
