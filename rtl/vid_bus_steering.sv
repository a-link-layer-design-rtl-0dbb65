// vid_bus_steering: steers pixels onto the active lanes (transmit side).
//
// Consecutive pixels are assigned round-robin to lanes 0..lane_count-1,
// so pixel n of a line travels on lane n mod lane_count. One group of
// lane_count pixels (one per lane) is written into the clock-crossing FIFO
// as a single word, together with the start-of-frame, end-of-line and
// end-of-frame flags. A line whose width is not a multiple of lane_count
// closes with a partial group (unused lanes zero). lane_count is 1, 2 or 4
// and must only change while no video is flowing.
module vid_bus_steering
  import dp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [2:0]  lane_count,
  input  logic        px_valid,
  input  logic [23:0] px,
  input  logic        sof,
  input  logic        eol,
  input  logic        eof,
  output logic        grp_valid,
  output pix_group_t  grp
);
  pix_group_t acc;
  logic [1:0] idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0; idx <= '0; grp_valid <= 1'b0; grp <= '0;
    end else begin
      grp_valid <= 1'b0;
      if (px_valid) begin
        pix_group_t a;
        a = (idx == 0) ? '0 : acc;
        a.px[idx] = px;
        if (sof) a.sof = 1'b1;
        if (eol || (3'(idx) + 3'd1 == lane_count)) begin
          a.eol     = eol;
          a.eof     = eof;
          grp       <= a;
          grp_valid <= 1'b1;
          idx       <= '0;
        end else begin
          idx <= idx + 1'b1;
        end
        acc <= a;
      end
    end
  end
endmodule
