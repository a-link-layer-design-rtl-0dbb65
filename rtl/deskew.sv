// deskew: inter-lane deskew on the receive side.
//
// Every lane is passed through a delay line of up to MAX_SKEW symbols. A
// lane marker is a K28.5 symbol (BS, or the first K28.5 of training pattern
// 2, i.e. one not preceded by D11.6, while training is high; in normal
// operation every BS is a marker). The first marker on any active lane
// opens a window of MAX_SKEW+1 clocks; each active lane records when its
// own marker arrives in the window. If all active lanes saw one, every lane
// is delayed by (latest arrival - own arrival) so that the markers line up,
// and aligned is set; an incomplete window clears aligned. Lane symbols
// leave one clock after entry plus the lane's delay.
module deskew
  import dp_pkg::*;
#(
  parameter int MAX_SKEW = 7
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [2:0]           lane_count,
  input  logic                 training,
  input  sym_t [MAX_LANES-1:0] in_lanes,
  output sym_t [MAX_LANES-1:0] out_lanes,
  output logic                 aligned
);
  localparam int CW = $clog2(MAX_SKEW + 1);
  sym_t dl [MAX_LANES][MAX_SKEW+1];
  sym_t prev [MAX_LANES];
  logic [CW-1:0] off [MAX_LANES];
  logic [CW-1:0] dly [MAX_LANES];
  logic [MAX_LANES-1:0] seen;
  logic [CW:0] wcnt;
  logic win;
  logic [MAX_LANES-1:0] marker, active;

  always_comb begin
    for (int l = 0; l < MAX_LANES; l++) begin
      active[l] = 3'(l) < lane_count;
      marker[l] = active[l] && in_lanes[l].k && in_lanes[l].d == K_BS &&
                  !(training && !prev[l].k && prev[l].d == D11_6);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < MAX_LANES; l++) begin
        for (int i = 0; i <= MAX_SKEW; i++) dl[l][i] <= '0;
        prev[l] <= '0; off[l] <= '0; dly[l] <= '0;
      end
      seen <= '0; wcnt <= '0; win <= 1'b0; aligned <= 1'b0; out_lanes <= '0;
    end else begin
      for (int l = 0; l < MAX_LANES; l++) begin
        prev[l]  <= in_lanes[l];
        dl[l][0] <= in_lanes[l];
        for (int i = 1; i <= MAX_SKEW; i++) dl[l][i] <= dl[l][i-1];
        out_lanes[l] <= (dly[l] == '0) ? in_lanes[l] : dl[l][dly[l] - 1'b1];
      end
      if (!win) begin
        if (|marker) begin
          win  <= 1'b1;
          wcnt <= 1;
          seen <= marker;
          for (int l = 0; l < MAX_LANES; l++) off[l] <= '0;
        end
      end else begin
        for (int l = 0; l < MAX_LANES; l++)
          if (marker[l] && !seen[l]) begin
            seen[l] <= 1'b1;
            off[l]  <= CW'(wcnt);
          end
        wcnt <= wcnt + 1'b1;
        if (wcnt == (CW+1)'(MAX_SKEW)) begin
          logic [CW-1:0] mx;
          logic [MAX_LANES-1:0] s;
          win <= 1'b0;
          s  = seen;
          mx = '0;
          for (int l = 0; l < MAX_LANES; l++) begin
            if (marker[l] && !seen[l]) s[l] = 1'b1;
          end
          for (int l = 0; l < MAX_LANES; l++)
            if (active[l]) begin
              logic [CW-1:0] o;
              o = (marker[l] && !seen[l]) ? CW'(wcnt) : off[l];
              if (o > mx) mx = o;
            end
          if ((s & active) == active) begin
            aligned <= 1'b1;
            for (int l = 0; l < MAX_LANES; l++) begin
              logic [CW-1:0] o;
              o = (marker[l] && !seen[l]) ? CW'(wcnt) : off[l];
              dly[l] <= active[l] ? mx - o : '0;
            end
          end else begin
            aligned <= 1'b0;
          end
        end
      end
    end
  end
endmodule
