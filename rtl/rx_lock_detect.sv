// rx_lock_detect: per-lane link-training status of the receiver (the part
// of the sink's link policy that reports to DPCD).
//
// cr_done[l]: set after LOCK_COUNT consecutive code groups on lane l
// decoded without a code violation; cleared by any violation. While
// training pattern 1 is on the lanes, this is the receiver's "clock
// recovery done" indication for that lane.
// sym_locked[l]: set when lane l shows K28.5 D11.6 K28.5 D11.6 (the start of
// training pattern 2) while cr_done[l]; cleared with cr_done.
// Lanes at or above lane_count read as not locked.
module rx_lock_detect
  import dp_pkg::*;
#(
  parameter int LOCK_COUNT = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [2:0]           lane_count,
  input  logic [MAX_LANES-1:0] sym_valid,
  input  sym_t [MAX_LANES-1:0] sym,
  input  logic [MAX_LANES-1:0] code_err,
  output logic [MAX_LANES-1:0] cr_done,
  output logic [MAX_LANES-1:0] sym_locked
);
  logic [$clog2(LOCK_COUNT+1)-1:0] good [MAX_LANES];
  logic [1:0] pst [MAX_LANES]; // progress through K28.5 D11.6 K28.5 D11.6

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < MAX_LANES; l++) begin good[l] <= '0; pst[l] <= '0; end
      cr_done <= '0; sym_locked <= '0;
    end else begin
      for (int l = 0; l < MAX_LANES; l++) begin
        if (3'(l) >= lane_count) begin
          good[l] <= '0; cr_done[l] <= 1'b0; sym_locked[l] <= 1'b0; pst[l] <= '0;
        end else if (sym_valid[l]) begin
          if (code_err[l]) begin
            good[l] <= '0; cr_done[l] <= 1'b0; sym_locked[l] <= 1'b0; pst[l] <= '0;
          end else begin
            if (good[l] < ($clog2(LOCK_COUNT+1))'(LOCK_COUNT)) good[l] <= good[l] + 1'b1;
            else cr_done[l] <= 1'b1;
            case (pst[l])
              2'd0: pst[l] <= (sym[l].k && sym[l].d == K_BS) ? 2'd1 : 2'd0;
              2'd1: pst[l] <= (!sym[l].k && sym[l].d == D11_6) ? 2'd2 : 2'd0;
              2'd2: pst[l] <= (sym[l].k && sym[l].d == K_BS) ? 2'd3 : 2'd0;
              default: begin
                pst[l] <= 2'd0;
                if (!sym[l].k && sym[l].d == D11_6 && cr_done[l]) sym_locked[l] <= 1'b1;
              end
            endcase
          end
        end
      end
    end
  end
endmodule
