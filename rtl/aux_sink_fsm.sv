// aux_sink_fsm: AUX channel replier (sink FSM with data shifter,
// Manchester decoder and encoder).
//
// Decodes each request (COMM[3:0], ADDR[19:0], LEN, data) and answers it
// after TURNAROUND clocks:
//  * native write (1000b): if the DPCD is not ready, DEFER; otherwise the
//    bytes are written one per clock to consecutive addresses and the reply
//    is ACK, or NACK if any address does not accept writes;
//  * native read (1001b): DEFER if not ready, otherwise ACK followed by
//    LEN+1 bytes read from consecutive DPCD addresses;
//  * I2C over AUX (COMM[3] = 0) to I2C address 50h, the EDID: a write sets
//    the EDID offset from its first data byte, a read returns LEN+1 bytes
//    from the offset onwards (the offset advances); other I2C addresses
//    get NACK.
// The reply is COMM[3:0] 0000 followed by any read data.
module aux_sink_fsm
  import dp_pkg::*;
#(
  parameter int HALF       = 81,
  parameter int TURNAROUND = 20 * 162
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        aux_in,
  output logic        aux_out,
  output logic        aux_oe,
  input  logic [3:0]  phase_delay,
  // DPCD
  output logic [19:0] dpcd_addr,
  input  logic [7:0]  dpcd_rdata,
  output logic        dpcd_we,
  output logic [7:0]  dpcd_wdata,
  input  logic        dpcd_wr_ok,
  input  logic        dpcd_ready,
  // EDID
  output logic [6:0]  edid_addr,
  input  logic [7:0]  edid_rdata,
  // events
  output logic        ev_defer,
  output logic        ev_nack,
  output logic        ev_edid
);
  typedef enum logic [2:0] {S_RX, S_EXEC, S_TURN, S_TX} sst_t;
  sst_t       st;
  logic       bv, fs, fe, aux_dly, enc_start, enc_done;
  logic [7:0] by;
  logic [4:0] nrx, ridx, i;
  logic [7:0] rb [20];
  logic [19:0][7:0] tx;
  logic [4:0] ntx;
  logic [6:0] edid_off;
  logic       nack;
  logic [$clog2(TURNAROUND+1)-1:0] tcnt;

  logic [3:0]  cmd;
  logic [19:0] addr;
  logic [4:0]  len;
  assign cmd  = rb[0][7:4];
  assign addr = {rb[0][3:0], rb[1], rb[2]};
  assign len  = 5'(rb[3][3:0]) + 5'd1;

  aux_data_shifter u_shift (.clk, .rst_n, .aux_in, .delay(phase_delay), .aux_dly);
  manchester_dec #(.HALF(HALF)) u_dec (.clk, .rst_n, .en(st == S_RX), .aux_in(aux_dly),
    .byte_valid(bv), .byte_out(by), .frame_start(fs), .frame_end(fe), .nbytes(nrx));
  manchester_enc #(.HALF(HALF), .MAXBYTES(20)) u_enc (.clk, .rst_n, .start(enc_start),
    .bytes(tx), .nbytes(ntx), .aux_out, .aux_oe, .done(enc_done));

  assign dpcd_addr  = addr + 20'(i);
  assign dpcd_wdata = rb[4 + i];
  assign dpcd_we    = (st == S_EXEC) && cmd == AUX_NATIVE_WR && dpcd_ready && i < len;
  assign edid_addr  = edid_off;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_RX; ridx <= '0; i <= '0; tx <= '0; ntx <= '0; edid_off <= '0; nack <= 1'b0;
      tcnt <= '0; enc_start <= 1'b0; ev_defer <= 1'b0; ev_nack <= 1'b0; ev_edid <= 1'b0;
      for (int k = 0; k < 20; k++) rb[k] <= '0;
    end else begin
      enc_start <= 1'b0; ev_defer <= 1'b0; ev_nack <= 1'b0; ev_edid <= 1'b0;
      case (st)
        S_RX: begin
          if (fs) ridx <= '0;
          if (bv) begin
            if (ridx < 5'd20) rb[ridx] <= by;
            ridx <= ridx + 1'b1;
          end
          if (fe) begin
            if (ridx >= 5'd4) begin st <= S_EXEC; i <= '0; nack <= 1'b0; tx <= '0; end
          end
        end
        S_EXEC: begin
          if (cmd[3]) begin
            // native AUX
            if (!dpcd_ready) begin
              tx[0] <= {AUX_DEFER, 4'h0}; ntx <= 5'd1; st <= S_TURN; tcnt <= '0;
              ev_defer <= 1'b1;
            end else if (i < len) begin
              if (cmd == AUX_NATIVE_WR && !dpcd_wr_ok) nack <= 1'b1;
              if (cmd == AUX_NATIVE_RD) tx[1 + i] <= dpcd_rdata;
              i <= i + 1'b1;
            end else begin
              if (cmd == AUX_NATIVE_RD) begin
                tx[0] <= {AUX_ACK, 4'h0}; ntx <= len + 1'b1;
              end else begin
                tx[0] <= {nack ? AUX_NACK : AUX_ACK, 4'h0}; ntx <= 5'd1;
                ev_nack <= nack;
              end
              st <= S_TURN; tcnt <= '0;
            end
          end else begin
            // I2C over AUX, EDID at 50h
            if (addr[6:0] != 7'h50) begin
              tx[0] <= {AUX_NACK, 4'h0}; ntx <= 5'd1; st <= S_TURN; tcnt <= '0;
              ev_nack <= 1'b1;
            end else if (cmd[1:0] == 2'b00) begin
              edid_off <= rb[4][6:0];
              tx[0] <= {AUX_ACK, 4'h0}; ntx <= 5'd1; st <= S_TURN; tcnt <= '0;
            end else if (i < len) begin
              tx[1 + i] <= edid_rdata;
              edid_off <= edid_off + 1'b1;
              i <= i + 1'b1;
            end else begin
              tx[0] <= {AUX_ACK, 4'h0}; ntx <= len + 1'b1; st <= S_TURN; tcnt <= '0;
              ev_edid <= 1'b1;
            end
          end
        end
        S_TURN: begin
          tcnt <= tcnt + 1'b1;
          if (int'(tcnt) >= TURNAROUND) begin st <= S_TX; enc_start <= 1'b1; end
        end
        default: if (enc_done) begin st <= S_RX; ridx <= '0; end
      endcase
    end
  end
  logic unused_dec;
  assign unused_dec = ^nrx;
endmodule
