// lane_decision: chooses the lane count and transfer-unit fill.
//
// The video stream needs pclk_khz * 3 bytes per microsecond-scale unit at
// 24 bits per pixel; each lane carries one byte per link symbol clock.
// The lane count is the smallest of 1, 2, 4 (not above max_lanes) whose
// capacity covers the stream, or max_lanes if none does. The number of
// data symbols per transfer unit of TU_SIZE symbols is
//   tu_valid = ceil(TU_SIZE * 3 * pclk_khz / (lanes * lclk_khz)) + 1,
// capped at TU_SIZE; the extra symbol gives the link a small margin over
// the stream so the transmit FIFO does not fill. Results are registered
// (one clock).
module lane_decision #(
  parameter int TU_SIZE = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [19:0] pclk_khz,
  input  logic [19:0] lclk_khz,
  input  logic [2:0]  max_lanes,
  output logic [2:0]  lane_count,
  output logic [6:0]  tu_size,
  output logic [6:0]  tu_valid
);
  logic [31:0] need, cap1, cap2, cap4, capl, num, q;
  logic [2:0]  l;

  always_comb begin
    need = 32'(pclk_khz) * 3;
    cap1 = 32'(lclk_khz);
    cap2 = cap1 * 2;
    cap4 = cap1 * 4;
    if (cap1 >= need || max_lanes < 3'd2)      l = 3'd1;
    else if (cap2 >= need || max_lanes < 3'd4) l = 3'd2;
    else                                       l = 3'd4;
    capl = (l == 3'd1) ? cap1 : (l == 3'd2) ? cap2 : cap4;
    num  = need * 32'(TU_SIZE);
    q    = (capl == 0) ? 32'(TU_SIZE) : (num + capl - 1) / capl + 1;
    if (q > 32'(TU_SIZE)) q = 32'(TU_SIZE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lane_count <= 3'd1; tu_size <= 7'(TU_SIZE); tu_valid <= 7'(TU_SIZE);
    end else begin
      lane_count <= l;
      tu_size    <= 7'(TU_SIZE);
      tu_valid   <= q[6:0];
    end
  end
endmodule
