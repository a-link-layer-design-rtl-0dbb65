// skew_insert: inter-lane skew insertion on the transmit side.
//
// Lane l is delayed by SKEW_STEP*l symbol clocks, so lane 0 leads and lane
// 3 trails by 3*SKEW_STEP symbols. Spreading the lanes in time keeps their
// switching from lining up; the receiver's deskew block removes the offset
// using the BS symbols and training sequence. Registers start at zero.
module skew_insert
  import dp_pkg::*;
#(
  parameter int SKEW_STEP = 2
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  sym_t [MAX_LANES-1:0]       in_lanes,
  output sym_t [MAX_LANES-1:0]       out_lanes
);
  localparam int DMAX = SKEW_STEP * (MAX_LANES - 1);
  sym_t dl [MAX_LANES][DMAX+1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < MAX_LANES; l++)
        for (int i = 0; i <= DMAX; i++) dl[l][i] <= '0;
    end else begin
      for (int l = 0; l < MAX_LANES; l++) begin
        dl[l][0] <= in_lanes[l];
        for (int i = 1; i <= DMAX; i++) dl[l][i] <= dl[l][i-1];
      end
    end
  end

  always_comb begin
    for (int l = 0; l < MAX_LANES; l++)
      out_lanes[l] = (l == 0) ? in_lanes[0] : dl[l][SKEW_STEP*l-1];
  end
endmodule
