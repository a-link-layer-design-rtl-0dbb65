// link_policy_src: link policy maker of the source (link training FSM).
//
// Follows the link training state diagram of the source:
//   1 Main Link Disable -> 2 Clock Recovery Pattern -> 3 Channel
//   Equalization Pattern -> 4 Normal Operation, with 3 -> 2 when clock
//   recovery is lost during equalization and 4 -> 2 (retraining) when a
//   status read after an interrupt request shows a lane without CR_DONE.
// All sink access goes through the AUX requester (req/cmd/addr/len/wdata,
// done/reply/timeout/rdata):
//   state 1: after hot plug, link inquiry: EDID header read over I2C (50h),
//            receiver capability read (DPCD 000h-002h); lane count from the
//            lane count decision block (limited to the sink's maximum);
//            write LINK_BW_SET, LANE_COUNT_SET and TRAINING_PATTERN_SET=01.
//   state 2: send TPS1; after TRAIN_WAIT clocks read lane status (202h-203h)
//            until all active lanes report CR_DONE; then write TPS=10.
//   state 3: send TPS2; after TRAIN_WAIT read 202h-204h. Any lane without
//            CR_DONE: write TPS=01, back to 2. All CR_DONE, SYMBOL_LOCKED
//            and INTERLANE_ALIGN_DONE: write TPS=00, go to 4.
//   state 4: normal video; on an hpd pulse (IRQ) read the status again and
//            retrain if CR_DONE is lost.
// A NACK or a timed-out request returns the FSM to state 1. tps is the
// pattern driven on the main link (0 = video). The number of the state is
// given on fstate; ev_trans pulses for every state change.
module link_policy_src
  import dp_pkg::*;
#(
  parameter logic [7:0] LINK_BW    = 8'h06,   // 06h = 1.62 Gbps, 0Ah = 2.7 Gbps
  parameter int         TRAIN_WAIT = 100 * 162
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        hpd,
  // lane count decision
  output logic [2:0]  sink_max_lanes,
  input  logic [2:0]  ld_lanes,
  output logic [2:0]  lane_count,
  output logic [1:0]  tps,
  output logic [2:0]  fstate,
  output logic        ev_trans,
  output logic        edid_ok,
  // AUX requester
  output logic        req,
  output logic [3:0]  cmd,
  output logic [19:0] addr,
  output logic [4:0]  len,
  output logic [AUX_MAX_BYTES-1:0][7:0] wdata,
  input  logic        done,
  input  logic [3:0]  reply,
  input  logic        timeout,
  input  logic [AUX_MAX_BYTES-1:0][7:0] rdata
);
  typedef enum logic [3:0] {
    P_HPD, P_EDID_W, P_EDID_R, P_CAP, P_LD, P_SET, P_CR_WAIT, P_CR_READ, P_EQ_SET,
    P_EQ_WAIT, P_EQ_READ, P_TPS_WR, P_NORMAL, P_IRQ_READ
  } pst_t;
  pst_t  st, after;        // after: state to enter when the pending write completes
  logic  busy;
  logic [2:0] next_f;
  logic [$clog2(TRAIN_WAIT+1)-1:0] tmr;
  logic  hpd_q;
  logic [7:0] s01, s23, s4;
  logic  all_cr, all_lock;

  // status bytes of the last read: rdata[0] = 202h, [1] = 203h, [2] = 204h
  always_comb begin
    s01 = rdata[0]; s23 = rdata[1]; s4 = rdata[2];
    all_cr = s01[0];
    all_lock = s01[0] && s01[2];
    if (lane_count > 3'd1) begin
      all_cr   = all_cr && s01[4];
      all_lock = all_lock && s01[4] && s01[6];
    end
    if (lane_count > 3'd2) begin
      all_cr   = all_cr && s23[0] && s23[4];
      all_lock = all_lock && s23[0] && s23[2] && s23[4] && s23[6];
    end
  end

  task automatic issue(input logic [3:0] c, input logic [19:0] a, input logic [4:0] n);
    req <= 1'b1; cmd <= c; addr <= a; len <= n; busy <= 1'b1;
  endtask

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= P_HPD; after <= P_HPD; busy <= 1'b0; req <= 1'b0; cmd <= '0; addr <= '0;
      len <= '0; wdata <= '0; tmr <= '0; hpd_q <= 1'b0; sink_max_lanes <= 3'd1;
      lane_count <= 3'd1; tps <= 2'd0; fstate <= 3'd1; next_f <= 3'd1; ev_trans <= 1'b0;
      edid_ok <= 1'b0;
    end else begin
      req <= 1'b0; ev_trans <= 1'b0;
      hpd_q <= hpd;
      if (busy && done) busy <= 1'b0;
      if (busy && done && (timeout || reply != AUX_ACK)) begin
        // failed request: back to main link disable
        st <= P_HPD; tps <= 2'd0;
        if (fstate != 3'd1) begin fstate <= 3'd1; ev_trans <= 1'b1; end
      end else if (!busy || done) begin
        case (st)
          P_HPD: if (hpd) begin
            wdata <= '0;                                     // EDID offset 0
            issue(AUX_I2C_WR, 20'h00050, 5'd1); st <= P_EDID_W;
          end
          P_EDID_W: if (done) begin issue(AUX_I2C_RD, 20'h00050, 5'd8); st <= P_EDID_R; end
          P_EDID_R: if (done) begin
            edid_ok <= rdata[7:0] == {8'h00, {6{8'hFF}}, 8'h00};
            issue(AUX_NATIVE_RD, DPCD_REV, 5'd3); st <= P_CAP;
          end
          P_CAP: if (done) begin
            sink_max_lanes <= (rdata[2][4:0] >= 5'd4) ? 3'd4 : (rdata[2][4:0] >= 5'd2) ? 3'd2 : 3'd1;
            tmr <= '0; st <= P_LD;
          end
          P_LD: begin                                        // let the lane decision settle
            tmr <= tmr + 1'b1;
            if (tmr == 3) begin
              lane_count <= ld_lanes;
              wdata <= '0;
              wdata[0] <= LINK_BW; wdata[1] <= {5'd0, ld_lanes}; wdata[2] <= 8'h01;
              issue(AUX_NATIVE_WR, DPCD_LINK_BW_SET, 5'd3);
              tps <= 2'd1; st <= P_SET;
            end
          end
          P_SET: if (done) begin
            fstate <= 3'd2; ev_trans <= 1'b1; tmr <= '0; st <= P_CR_WAIT;
          end
          P_CR_WAIT: begin
            tmr <= tmr + 1'b1;
            if (int'(tmr) >= TRAIN_WAIT) begin issue(AUX_NATIVE_RD, DPCD_LANE0_1_STATUS, 5'd2); st <= P_CR_READ; end
          end
          P_CR_READ: if (done) begin
            tmr <= '0;
            if (all_cr) begin
              wdata <= '0; wdata[0] <= 8'h02;
              issue(AUX_NATIVE_WR, DPCD_TRAINING_PATTERN_SET, 5'd1);
              tps <= 2'd2; next_f <= 3'd3; st <= P_TPS_WR; after <= P_EQ_WAIT;
            end else st <= P_CR_WAIT;
          end
          P_EQ_WAIT: begin
            tmr <= tmr + 1'b1;
            if (int'(tmr) >= TRAIN_WAIT) begin issue(AUX_NATIVE_RD, DPCD_LANE0_1_STATUS, 5'd3); st <= P_EQ_READ; end
          end
          P_EQ_READ: if (done) begin
            tmr <= '0;
            if (!all_cr) begin
              wdata <= '0; wdata[0] <= 8'h01;
              issue(AUX_NATIVE_WR, DPCD_TRAINING_PATTERN_SET, 5'd1);
              tps <= 2'd1; next_f <= 3'd2; st <= P_TPS_WR; after <= P_CR_WAIT;
            end else if (all_lock && s4[0]) begin
              wdata <= '0; wdata[0] <= 8'h00;
              issue(AUX_NATIVE_WR, DPCD_TRAINING_PATTERN_SET, 5'd1);
              tps <= 2'd0; next_f <= 3'd4; st <= P_TPS_WR; after <= P_NORMAL;
            end else st <= P_EQ_WAIT;
          end
          P_TPS_WR: if (done) begin
            fstate <= next_f; ev_trans <= 1'b1; tmr <= '0; st <= after;
          end
          P_NORMAL: if (hpd && !hpd_q) begin                 // end of an IRQ pulse
            issue(AUX_NATIVE_RD, DPCD_LANE0_1_STATUS, 5'd2); st <= P_IRQ_READ;
          end
          P_IRQ_READ: if (done) begin
            if (!all_cr) begin
              wdata <= '0; wdata[0] <= 8'h01;
              issue(AUX_NATIVE_WR, DPCD_TRAINING_PATTERN_SET, 5'd1);
              tps <= 2'd1; next_f <= 3'd2; st <= P_TPS_WR; after <= P_CR_WAIT;
            end else st <= P_NORMAL;
          end
          default: st <= P_HPD;
        endcase
      end
    end
  end
endmodule
