// msa_gen: main stream attribute generator (transmit side).
//
// Measures the incoming raster in the pixel-clock domain: pixels per line
// (htotal), lines per frame (vtotal), sync widths, the position of the
// first active pixel and line relative to the sync rising edges, and the
// active width and height. Counters restart on the HSYNC and VSYNC rising
// edges (positive sync polarity). A set of attributes is published at each
// VSYNC rising edge; msa_valid rises after two complete frames and stays
// high while successive frames agree.
module msa_gen
  import dp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        hs,
  input  logic        vs,
  input  logic        de,
  output msa_t        msa,
  output logic        msa_valid
);
  logic        hs_q, vs_q, de_q, line_has_de, first_de_line_seen;
  logic [15:0] h, v;
  msa_t        m;      // being measured
  logic [1:0]  frames;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hs_q <= 1'b0; vs_q <= 1'b0; de_q <= 1'b0; h <= '0; v <= '0;
      line_has_de <= 1'b0; first_de_line_seen <= 1'b0;
      m <= '0; msa <= '0; msa_valid <= 1'b0; frames <= '0;
    end else begin
      hs_q <= hs; vs_q <= vs; de_q <= de;
      h <= h + 1'b1;
      if (hs && !hs_q) begin
        h <= 16'd1;
        m.htotal <= h;
        if (line_has_de) begin
          m.vheight <= first_de_line_seen ? m.vheight + 1'b1 : 16'd1;
          if (!first_de_line_seen) m.vstart <= v - 1'b1;
          first_de_line_seen <= 1'b1;
        end
        line_has_de <= 1'b0;
        v <= v + 1'b1;
      end
      if (!hs && hs_q) m.hsw <= h;
      if (de && !de_q) begin
        m.hstart <= h;
        line_has_de <= 1'b1;
      end
      if (!de && de_q) m.hwidth <= h - m.hstart;
      if (!vs && vs_q) m.vsw <= v;
      if (vs && !vs_q) begin
        // this HSYNC edge (same clock) starts line 0 of the next frame
        m.vtotal <= v;
        v <= 16'd1;
        first_de_line_seen <= 1'b0;
        if (frames != 2'd3) frames <= frames + 1'b1;
        msa <= m;
        msa_valid <= (frames >= 2'd2) && (m == msa);
      end
    end
  end
endmodule
