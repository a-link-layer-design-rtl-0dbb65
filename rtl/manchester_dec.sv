// manchester_dec: Manchester-II decoder of the AUX channel.
//
// Recovers the bit clock from the line itself. During the SYNC preamble
// every bit has a mid-bit edge; an edge is taken as mid-bit when more than
// 3/4 of a bit time has passed since the previous mid-bit edge, otherwise
// it is a bit-boundary edge and is ignored. More than 1.5 bit times with no
// edge while the line is high is the SYNC end pattern; its falling edge
// marks a point two bit times before the first data bit, so the first
// boundary edge (at two bit times) is ignored and the first mid-bit edge is
// accepted after 2.25 bit times. Each mid-bit edge gives one bit: rising is
// 1, falling is 0. Bits are assembled MSB first into bytes (byte_valid).
// More than 1.5 bit times without an edge in the data ends the frame
// (STOP); frame_end pulses with the number of bytes received. HALF is the
// number of clocks per half bit. en low holds the decoder idle.
module manchester_dec #(
  parameter int HALF = 81
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       aux_in,
  output logic       byte_valid,
  output logic [7:0] byte_out,
  output logic       frame_start,
  output logic       frame_end,
  output logic [4:0] nbytes
);
  localparam int T  = 2 * HALF;
  localparam int CW = $clog2(4 * T + 1);
  typedef enum logic [2:0] {M_IDLE, M_PRE, M_SYNCH, M_FIRST, M_DATA} mst_t;
  mst_t          st;
  logic          q;
  logic [CW-1:0] cnt;
  logic [2:0]    nb;
  logic [7:0]    sh;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= M_IDLE; q <= 1'b0; cnt <= '0; nb <= '0; sh <= '0;
      byte_valid <= 1'b0; byte_out <= '0; frame_start <= 1'b0; frame_end <= 1'b0; nbytes <= '0;
    end else begin
      logic edge_seen;
      byte_valid <= 1'b0; frame_start <= 1'b0; frame_end <= 1'b0;
      q <= aux_in;
      edge_seen = (aux_in != q);
      if (cnt != '1) cnt <= cnt + 1'b1;
      if (!en) begin
        st <= M_IDLE;
      end else begin
        case (st)
          M_IDLE: if (edge_seen) begin st <= M_PRE; cnt <= '0; end
          M_PRE: begin
            if (edge_seen && int'(cnt) > (3 * T) / 4) cnt <= '0;
            else if (int'(cnt) > (3 * T) / 2) begin
              st <= aux_in ? M_SYNCH : M_IDLE;
            end
          end
          M_SYNCH: begin
            if (edge_seen && !aux_in) begin st <= M_FIRST; cnt <= '0; end
            else if (int'(cnt) > 4 * T) st <= M_IDLE;
          end
          M_FIRST: begin
            // SYNC end low part (2T), then the first data bit
            if (edge_seen && int'(cnt) > (9 * T) / 4) begin
              cnt <= '0;
              sh  <= {sh[6:0], aux_in};
              nb  <= 3'd1;
              nbytes <= '0;
              st  <= M_DATA;
              frame_start <= 1'b1;
            end else if (int'(cnt) > 3 * T) st <= M_IDLE;
          end
          M_DATA: begin
            if (edge_seen && int'(cnt) > (3 * T) / 4) begin
              cnt <= '0;
              sh  <= {sh[6:0], aux_in};
              nb  <= nb + 1'b1;
              if (nb == 3'd7) begin
                byte_valid <= 1'b1;
                byte_out   <= {sh[6:0], aux_in};
                nbytes     <= nbytes + 1'b1;
              end
            end else if (int'(cnt) > (3 * T) / 2) begin
              frame_end <= 1'b1;
              st <= M_IDLE;
            end
          end
          default: st <= M_IDLE;
        endcase
      end
    end
  end
endmodule
