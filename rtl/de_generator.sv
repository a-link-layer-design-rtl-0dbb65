// de_generator: data-enable generator on the transmit pixel-clock side.
//
// Takes DVI video (HSYNC, VSYNC, DE, RGB) and regenerates the data enable
// one pixel clock later, together with the position flags the link layer
// needs: start of frame (first active pixel after a VSYNC rising edge),
// end of line (DE falls after this pixel) and end of frame (end of the
// vheight-th active line). Lines are at least two pixels wide. Holding each pixel one clock is what makes the
// end-of-line flag available with the pixel itself.
module de_generator
  import dp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] vheight,
  input  logic        hs_in,
  input  logic        vs_in,
  input  logic        de_in,
  input  logic [23:0] rgb_in,
  output logic        de_gen,
  output logic [23:0] rgb,
  output logic        sof,
  output logic        eol,
  output logic        eof,
  output logic        hs,
  output logic        vs
);
  logic        de_q, vs_q, first_q, new_frame;
  logic [23:0] rgb_q;
  logic [15:0] line;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      de_q <= 1'b0; vs_q <= 1'b0; rgb_q <= '0; first_q <= 1'b0; new_frame <= 1'b0;
      line <= '0;
      de_gen <= 1'b0; rgb <= '0; sof <= 1'b0; eol <= 1'b0; eof <= 1'b0;
      hs <= 1'b0; vs <= 1'b0;
    end else begin
      vs_q  <= vs_in;
      de_q  <= de_in;
      rgb_q <= rgb_in;
      hs    <= hs_in;
      vs    <= vs_q;
      if (vs_in && !vs_q) new_frame <= 1'b1;
      // the first pixel of a frame is the first DE pixel after VSYNC rose
      first_q <= de_in && !de_q && (new_frame || (vs_in && !vs_q));
      if (de_in && !de_q && (new_frame || (vs_in && !vs_q))) new_frame <= 1'b0;
      // outputs: pixel held one clock; DE falling marks end of line
      de_gen <= de_q;
      rgb    <= rgb_q;
      sof    <= first_q;
      eol    <= de_q && !de_in;
      eof    <= de_q && !de_in && (line == vheight - 1'b1);
      if (first_q)             line <= '0;
      else if (de_q && !de_in) line <= line + 1'b1;
    end
  end
endmodule
