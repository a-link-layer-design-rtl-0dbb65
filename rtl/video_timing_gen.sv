// video_timing_gen: raster timing generator (HSYNC, VSYNC, DE).
//
// Counts pixels and lines over the total raster given by the main stream
// attributes: HSYNC is high for the first hsw pixels of a line, VSYNC for
// the first vsw lines of a frame, and DE is high over the hwidth x vheight
// active window starting at (hstart, vstart). Sync polarity is positive.
// x and y give the active-pixel coordinates while DE is high. run low holds
// the counters; start_active loads them so the next clock is the first
// active pixel of a frame (used by the receiver to start on a new frame).
// Outputs are registered.
module video_timing_gen
  import dp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        run,
  input  logic        start_active,
  input  msa_t        t,
  output logic        hs,
  output logic        vs,
  output logic        de,
  output logic [15:0] x,
  output logic [15:0] y
);
  logic [15:0] h, v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h <= '0; v <= '0;
      hs <= 1'b0; vs <= 1'b0; de <= 1'b0; x <= '0; y <= '0;
    end else begin
      if (start_active) begin
        h <= t.hstart;
        v <= t.vstart;
      end else if (run) begin
        if (h >= t.htotal - 1'b1) begin
          h <= '0;
          v <= (v >= t.vtotal - 1'b1) ? '0 : v + 1'b1;
        end else begin
          h <= h + 1'b1;
        end
      end
      hs <= run && (h < t.hsw);
      vs <= run && (v < t.vsw);
      de <= run && !start_active && (h >= t.hstart) && (h < t.hstart + t.hwidth) &&
            (v >= t.vstart) && (v < t.vstart + t.vheight);
      x  <= h - t.hstart;
      y  <= v - t.vstart;
    end
  end
endmodule
