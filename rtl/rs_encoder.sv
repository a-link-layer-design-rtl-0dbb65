// rs_encoder: Reed-Solomon RS(15,13) encoder over GF(16), one nibble per
// clock (shortened codewords are allowed).
//
// Data nibbles enter most significant coefficient first. A two-stage LFSR
// divides by the generator g(x) = (x + 1)(x + alpha) = x^2 + 3x + 2, so the
// remainder {p0, p1} is the two parity nibbles that follow the data
// (p0 first). clr starts a new codeword; parity is valid the clock after the
// last data nibble.
module rs_encoder
  import dp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clr,
  input  logic       in_valid,
  input  logic [3:0] in_nib,
  output logic [3:0] p0,
  output logic [3:0] p1
);
  localparam logic [3:0] G1 = 4'd3;
  localparam logic [3:0] G0 = 4'd2;
  logic [3:0] r1, r0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r1 <= '0; r0 <= '0;
    end else if (clr) begin
      r1 <= '0; r0 <= '0;
    end else if (in_valid) begin
      logic [3:0] fb;
      fb = in_nib ^ r1;
      r1 <= r0 ^ gf_mul(fb, G1);
      r0 <= gf_mul(fb, G0);
    end
  end
  assign p0 = r1;
  assign p1 = r0;
endmodule
