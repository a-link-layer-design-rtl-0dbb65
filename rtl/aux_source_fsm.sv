// aux_source_fsm: AUX channel requester (source FSM with its Manchester
// encoder, data shifter and Manchester decoder).
//
// Takes a request from the link policy maker (cmd, 20-bit address, number
// of bytes, write data) and sends it as COMM[3:0] ADDR[19:0], LEN[7:0]
// (number of bytes minus one), then the write data. It then releases the
// line and waits up to REPLY_TIMEOUT clocks for the reply
// COMM[3:0] 0000 followed by read data. ACK or NACK completes the request
// (done, with reply and rdata). DEFER, or no reply in time, sends the same
// request again after RETRY_GAP clocks, up to MAX_RETRY times; after that
// done is given with timeout set.
module aux_source_fsm
  import dp_pkg::*;
#(
  parameter int HALF          = 81,
  parameter int REPLY_TIMEOUT = 400 * 162,
  parameter int RETRY_GAP     = 100 * 162,
  parameter int MAX_RETRY     = 7
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          req,
  input  logic [3:0]                    cmd,
  input  logic [19:0]                   addr,
  input  logic [4:0]                    len,     // bytes, 1..16
  input  logic [AUX_MAX_BYTES-1:0][7:0] wdata,
  output logic                          busy,
  output logic                          done,
  output logic [3:0]                    reply,
  output logic                          timeout,
  output logic [AUX_MAX_BYTES-1:0][7:0] rdata,
  output logic [4:0]                    rlen,
  output logic [3:0]                    ndefer,  // DEFER replies seen for this request
  // AUX line
  input  logic                          aux_in,
  output logic                          aux_out,
  output logic                          aux_oe,
  input  logic [3:0]                    phase_delay
);
  typedef enum logic [2:0] {A_IDLE, A_SEND, A_WAIT, A_GAP, A_DONE} ast_t;
  ast_t  st;
  logic  enc_start, enc_done;
  logic [19:0][7:0] tx;
  logic [4:0] ntx;
  logic [3:0] tries;
  logic [$clog2(REPLY_TIMEOUT + RETRY_GAP + 1)-1:0] tcnt;
  logic  bv, fs, fe, aux_dly;
  logic [7:0] by;
  logic [4:0] nrx;
  logic [4:0] ridx;
  logic [3:0] rcmd;

  always_comb begin
    tx = '0;
    tx[0] = {cmd, addr[19:16]};
    tx[1] = addr[15:8];
    tx[2] = addr[7:0];
    tx[3] = 8'(len - 1'b1);
    for (int i = 0; i < AUX_MAX_BYTES; i++) tx[4 + i] = wdata[i];
    ntx = (cmd[0] == 1'b0) ? 5'd4 + len : 5'd4; // writes carry data
  end

  manchester_enc #(.HALF(HALF), .MAXBYTES(20)) u_enc (.clk, .rst_n, .start(enc_start),
    .bytes(tx), .nbytes(ntx), .aux_out, .aux_oe, .done(enc_done));
  aux_data_shifter u_shift (.clk, .rst_n, .aux_in, .delay(phase_delay), .aux_dly);
  manchester_dec #(.HALF(HALF)) u_dec (.clk, .rst_n, .en(st == A_WAIT), .aux_in(aux_dly),
    .byte_valid(bv), .byte_out(by), .frame_start(fs), .frame_end(fe), .nbytes(nrx));

  assign busy = st != A_IDLE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= A_IDLE; enc_start <= 1'b0; tries <= '0; tcnt <= '0; done <= 1'b0; reply <= '0;
      timeout <= 1'b0; rdata <= '0; rlen <= '0; ridx <= '0; rcmd <= '0; ndefer <= '0;
    end else begin
      enc_start <= 1'b0;
      done      <= 1'b0;
      case (st)
        A_IDLE: if (req) begin
          st <= A_SEND; enc_start <= 1'b1; tries <= '0; ndefer <= '0; timeout <= 1'b0;
        end
        A_SEND: if (enc_done) begin st <= A_WAIT; tcnt <= '0; ridx <= '0; end
        A_WAIT: begin
          tcnt <= tcnt + 1'b1;
          if (bv) begin
            if (ridx == '0) rcmd <= by[7:4];
            else if (ridx <= 5'(AUX_MAX_BYTES)) rdata[ridx - 1'b1] <= by;
            ridx <= ridx + 1'b1;
          end
          if (fe && ridx != '0) begin
            if (rcmd == AUX_DEFER) begin
              ndefer <= ndefer + 1'b1;
              st <= A_GAP; tcnt <= '0;
            end else begin
              reply <= rcmd; rlen <= ridx - 1'b1; st <= A_DONE;
            end
          end else if (int'(tcnt) >= REPLY_TIMEOUT) begin
            st <= A_GAP; tcnt <= '0;
          end
        end
        A_GAP: begin
          tcnt <= tcnt + 1'b1;
          if (tries == 4'(MAX_RETRY)) begin
            timeout <= 1'b1; st <= A_DONE;
          end else if (int'(tcnt) >= RETRY_GAP) begin
            tries <= tries + 1'b1; st <= A_SEND; enc_start <= 1'b1;
          end
        end
        default: begin done <= 1'b1; st <= A_IDLE; end
      endcase
    end
  end
  // frame_start and the decoder's byte count are not needed: the first byte
  // of a reply is recognised by its index
  logic unused_dec;
  assign unused_dec = fs ^ (^nrx);
endmodule
