// rs_decoder: Reed-Solomon RS(15,13) decoder over GF(16), single-error
// correcting, one nibble per clock.
//
// A codeword of up to 15 nibbles (data then the two parity nibbles, most
// significant first) is written with in_valid, the last one with in_last.
// While it arrives, the syndrome block evaluates it at the roots alpha^0 and
// alpha^1 (S0, S1) and the nibbles are held in a FIFO. The key equation
// block then solves the one-error locator: X = S1 / S0 = alpha^p for an
// error at degree p, and the error value is S0. The Chien search steps
// alpha^deg down the codeword as the FIFO is read out, and where it equals
// X the Forney value S0 is added to the delayed nibble. Zero syndromes mean
// no error; one zero syndrome, or a locator that matches no position, means
// more errors than the code corrects (out_fail with out_last).
// Timing: n clocks in, one clock for the key equation, n clocks out. A new
// codeword may be written once out_last has been given.
module rs_decoder
  import dp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [3:0] in_nib,
  input  logic       in_last,
  output logic       out_valid,
  output logic [3:0] out_nib,
  output logic       out_last,
  output logic       out_corrected,
  output logic       out_fail
);
  localparam logic [3:0] ALPHA_INV = 4'd9; // alpha^14 for x^4+x+1
  typedef enum logic [1:0] {D_IN, D_KES, D_OUT} dst_t;
  dst_t       st;
  logic [3:0] fifo [15];
  logic [3:0] n, wp, rp;
  logic [3:0] s0, s1, xloc, a;
  logic       ok, found;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= D_IN; n <= '0; wp <= '0; rp <= '0; s0 <= '0; s1 <= '0; xloc <= '0; a <= '0;
      ok <= 1'b0; found <= 1'b0;
      out_valid <= 1'b0; out_nib <= '0; out_last <= 1'b0; out_corrected <= 1'b0;
      out_fail <= 1'b0;
      for (int i = 0; i < 15; i++) fifo[i] <= '0;
    end else begin
      out_valid <= 1'b0; out_last <= 1'b0; out_corrected <= 1'b0; out_fail <= 1'b0;
      case (st)
        D_IN: if (in_valid) begin
          // syndrome computation (Horner) and delay FIFO
          fifo[wp] <= in_nib;
          s0 <= s0 ^ in_nib;
          s1 <= gf_mul(s1, 4'd2) ^ in_nib;
          wp <= wp + 1'b1;
          if (in_last) begin
            n  <= wp + 1'b1;
            st <= D_KES;
          end
        end
        D_KES: begin
          // key equation for one error: locator X = S1/S0, value S0
          ok    <= (s0 == '0) == (s1 == '0);
          xloc  <= gf_mul(s1, gf_inv(s0));
          a     <= gf_pow(32'(n - 1'b1));
          found <= 1'b0;
          rp    <= '0;
          st    <= D_OUT;
        end
        default: begin
          // Chien search and Forney correction
          logic hit;
          hit = ok && (s0 != '0) && (a == xloc);
          out_valid <= 1'b1;
          out_nib   <= fifo[rp] ^ (hit ? s0 : 4'd0);
          if (hit) found <= 1'b1;
          a  <= gf_mul(a, ALPHA_INV);
          rp <= rp + 1'b1;
          if (rp == n - 1'b1) begin
            out_last      <= 1'b1;
            out_corrected <= found || hit;
            out_fail      <= !ok || ((s0 != '0) && !(found || hit));
            st <= D_IN; wp <= '0; s0 <= '0; s1 <= '0;
          end
        end
      endcase
    end
  end
endmodule
