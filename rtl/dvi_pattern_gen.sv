// dvi_pattern_gen: test video source in DVI form (HSYNC, VSYNC, DE, RGB).
//
// Drives a raster from video_timing_gen and fills the active window with a
// deterministic pattern that changes every pixel, line and frame, so a
// receiver can check every pixel it gets back:
//   R = x[7:0] ^ frame, G = y[7:0], B = (x + 3*y)[7:0]
// where x, y are the active coordinates and frame counts frames mod 256.
// Outputs are delayed one clock from the timing generator together.
module dvi_pattern_gen
  import dp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        run,
  input  msa_t        t,
  output logic        hs,
  output logic        vs,
  output logic        de,
  output logic [23:0] rgb
);
  logic        ths, tvs, tde, tvs_d;
  logic [15:0] x, y;
  logic [7:0]  frame;

  video_timing_gen u_tg (.clk, .rst_n, .run, .start_active(1'b0), .t,
                         .hs(ths), .vs(tvs), .de(tde), .x, .y);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hs <= 1'b0; vs <= 1'b0; de <= 1'b0; rgb <= '0; frame <= '0; tvs_d <= 1'b0;
    end else begin
      tvs_d <= tvs;
      if (tvs && !tvs_d) frame <= frame + 1'b1;
      hs  <= ths;
      vs  <= tvs;
      de  <= tde;
      rgb <= tde ? {x[7:0] ^ frame, y[7:0], 8'(x + 3*y)} : 24'h0;
    end
  end
endmodule
