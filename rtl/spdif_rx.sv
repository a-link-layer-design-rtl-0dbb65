// spdif_rx: S/PDIF receiver (secondary data source input stage).
//
// Decodes a biphase-mark-coded S/PDIF line sampled by clk. The line is
// synchronized, edges are found and the time between edges is classed as
// one, two or three cells (a cell is half a bit, CELL clocks nominal).
// Three-cell intervals exist only in preambles; the preamble type is told by
// the interval after it (B: 3,1,1,3  M: 3,3,1,1  W: 3,2,1,2). Then 28 bits
// (time slots 4..31) follow: a two-cell interval is a 0, two one-cell
// intervals are a 1. Each subframe gives one 32-bit audio word:
//   word[23:0] audio sample (slot 4 = LSB), word[24] V, [25] U, [26] C,
//   [27] P, word[29:28] preamble (0 = B, 1 = M, 2 = W), word[31:30] = 0.
// sample_tick pulses with every B or M subframe (one per stereo sample).
// A subframe is not checked against its parity bit here.
module spdif_rx #(
  parameter int CELL = 26
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        spdif_in,
  output logic        word_valid,
  output logic [31:0] word,
  output logic        sample_tick
);
  localparam int CW = $clog2(4*CELL + 1);
  logic s1, s2, s3;
  logic [CW-1:0] len;
  typedef enum logic [1:0] {R_HUNT, R_PRE, R_DATA} rst_t;
  rst_t st;
  logic [2:0]  pcells;
  logic [1:0]  ptype;
  logic [1:0]  pfirst; // second interval of the preamble
  logic        half;   // saw the first short interval of a 1
  logic [4:0]  nbits;
  logic [27:0] sh;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= 1'b0; s2 <= 1'b0; s3 <= 1'b0; len <= '0; st <= R_HUNT;
      pcells <= '0; ptype <= '0; pfirst <= '0; half <= 1'b0; nbits <= '0; sh <= '0;
      word_valid <= 1'b0; word <= '0; sample_tick <= 1'b0;
    end else begin
      s1 <= spdif_in; s2 <= s1; s3 <= s2;
      word_valid  <= 1'b0;
      sample_tick <= 1'b0;
      if (len != '1) len <= len + 1'b1;
      if (s2 != s3) begin
        logic [1:0] c;
        // interval class in cells, counting this clock
        if (int'(len) + 1 < (3*CELL)/2)      c = 2'd1;
        else if (int'(len) + 1 < (5*CELL)/2) c = 2'd2;
        else                                 c = 2'd3;
        len <= '0;
        case (st)
          R_HUNT: if (c == 2'd3) begin st <= R_PRE; pcells <= 3'd3; pfirst <= 2'd0; end
          R_PRE: begin
            if (pfirst == 2'd0) begin
              pfirst <= c;
              ptype  <= (c == 2'd1) ? 2'd0 : (c == 2'd3) ? 2'd1 : 2'd2;
            end
            if (pcells + 3'(c) == 3'd0) begin // 8 cells done (3-bit wrap)
              st <= R_DATA; nbits <= '0; half <= 1'b0;
            end
            pcells <= pcells + 3'(c);
          end
          R_DATA: begin
            if (c == 2'd2 && !half) begin
              sh <= {1'b0, sh[27:1]}; nbits <= nbits + 1'b1;
            end else if (c == 2'd1 && !half) begin
              half <= 1'b1;
            end else if (c == 2'd1 && half) begin
              half <= 1'b0;
              sh <= {1'b1, sh[27:1]}; nbits <= nbits + 1'b1;
            end else begin
              st <= (c == 2'd3) ? R_PRE : R_HUNT; pcells <= 3'd3; pfirst <= 2'd0;
            end
            if (nbits == 5'd27 && ((c == 2'd2 && !half) || (c == 2'd1 && half))) begin
              word_valid <= 1'b1;
              word <= {2'b00, ptype, (c == 2'd1), sh[27:1]};
              sample_tick <= (ptype != 2'd2);
              st <= R_HUNT;
            end
          end
          default: st <= R_HUNT;
        endcase
      end
    end
  end
endmodule
