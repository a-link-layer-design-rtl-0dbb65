// manchester_enc: Manchester-II encoder of the AUX channel.
//
// Sends one AUX transaction: the SYNC preamble (16 zero bits in
// Manchester-II, then the SYNC end pattern: two bit times high, two low),
// nbytes bytes MSB first, and STOP (two bit times high, two low). In
// Manchester-II every bit has a transition in mid-bit: here the second half
// carries the bit value (a 1 is low then high, a 0 high then low). HALF is
// the number of clocks per half bit (1 Mbit/s: HALF = f_clk / 2 MHz).
// aux_oe is high from start until the end of STOP; done pulses then.
module manchester_enc #(
  parameter int HALF     = 81,
  parameter int MAXBYTES = 20
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic [MAXBYTES-1:0][7:0]  bytes,   // bytes[0] is sent first
  input  logic [$clog2(MAXBYTES+1)-1:0] nbytes,
  output logic                      aux_out,
  output logic                      aux_oe,
  output logic                      done
);
  localparam int HW = $clog2(HALF + 1);
  typedef enum logic [2:0] {E_IDLE, E_PRE, E_SYNC, E_DATA, E_STOP} est_t;
  est_t          st;
  logic [HW-1:0] hc;      // clocks within the half bit
  logic [8:0]    hidx;    // half-bit index within the current phase
  logic [$clog2(MAXBYTES+1)-1:0] bi;
  logic [MAXBYTES-1:0][7:0] buf_q;
  logic [$clog2(MAXBYTES+1)-1:0] nb;

  // level of half bit h of the current phase
  function automatic logic manch(input logic b, input logic second);
    return second ? b : ~b;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= E_IDLE; hc <= '0; hidx <= '0; bi <= '0; buf_q <= '0; nb <= '0;
      aux_out <= 1'b0; aux_oe <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (st == E_IDLE) begin
        aux_oe <= 1'b0; aux_out <= 1'b0;
        if (start) begin
          st <= E_PRE; hc <= '0; hidx <= '0; buf_q <= bytes; nb <= nbytes; bi <= '0;
          aux_oe <= 1'b1; aux_out <= manch(1'b0, 1'b0);
        end
      end else begin
        logic [8:0] h;
        est_t       s;
        hc <= hc + 1'b1;
        if (hc == HW'(HALF - 1)) begin
          hc <= '0;
          // advance to the next half bit
          h = hidx + 1'b1;
          s = st;
          case (st)
            E_PRE:  if (h == 9'd32) begin s = E_SYNC; h = '0; end
            E_SYNC: if (h == 9'd8)  begin s = (nb == '0) ? E_STOP : E_DATA; h = '0; end
            E_DATA: if (h == 9'd16) begin
                      h = '0;
                      if (bi + 1'b1 == nb) s = E_STOP;
                      bi <= bi + 1'b1;
                    end
            E_STOP: if (h == 9'd8)  begin s = E_IDLE; end
            default: ;
          endcase
          st   <= s;
          hidx <= h;
          case (s)
            E_PRE:  aux_out <= manch(1'b0, h[0]);
            E_SYNC, E_STOP: aux_out <= (h < 9'd4);
            E_DATA: begin
              logic [7:0] by;
              by = (h == '0 && st == E_DATA) ? buf_q[bi + 1'b1] : buf_q[bi];
              aux_out <= manch(by[7 - h[3:1]], h[0]);
            end
            default: begin aux_out <= 1'b0; aux_oe <= 1'b0; done <= 1'b1; end
          endcase
        end
      end
    end
  end
endmodule
