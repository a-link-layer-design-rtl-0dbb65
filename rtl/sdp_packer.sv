// sdp_packer: secondary data packer with ECC encoding and nibble
// interleaving (transmit side).
//
// A packet of 4 header bytes and 16 payload bytes is loaded with load
// (when idle). Each block is split into nibbles, nibble n (2*byte for the
// low nibble, 2*byte+1 for the high one) going to RS codeword n mod 4, so
// two adjacent bytes are spread over four codewords. Four RS(15,13)
// encoders produce two parity nibbles per codeword: 4 parity bytes for the
// header (shortened (4,2) codewords) and 4 for the payload ((10,8)
// codewords), interleaved the same way. The packet sent on the lane is
//   SS, HB0..HB3, PB0..PB3, DB0..DB15, PB4..PB7, SE   (30 symbols).
// Building takes 24 clocks; then avail is high and the framer pops one
// symbol per clock (sym, last on SE). Parity byte m holds parity nibble
// index 2m (low) and 2m+1 (high); parity nibble q is parity q/4 of
// codeword q mod 4.
module sdp_packer
  import dp_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  load,
  input  sdp_t  pkt,
  output logic  idle,
  output logic  avail,
  output sym_t  sym,
  output logic  last,
  input  logic  pop
);
  typedef enum logic [2:0] {P_IDLE, P_HDR, P_HPAR, P_PAY, P_PPAR, P_SEND} pst_t;
  pst_t       st;
  logic [4:0] idx;
  sdp_t       p;
  logic [7:0] pb [8];
  logic [3:0] enc_clr, enc_v;
  logic [3:0] enc_in [4];
  logic [3:0] par0 [4];
  logic [3:0] par1 [4];

  for (genvar c = 0; c < 4; c++) begin : g_enc
    rs_encoder u_enc (.clk, .rst_n, .clr(enc_clr[c]), .in_valid(enc_v[c]), .in_nib(enc_in[c]),
                      .p0(par0[c]), .p1(par1[c]));
  end

  // byte b of a block feeds nibble 2b (low) to codeword (2b)%4 and nibble
  // 2b+1 (high) to codeword (2b+1)%4
  always_comb begin
    logic [7:0] b;
    enc_v = '0;
    enc_clr = '0;
    for (int c = 0; c < 4; c++) enc_in[c] = '0;
    b = (st == P_HDR) ? p.hb[3 - idx[1:0]] : p.db[15 - idx[3:0]];
    if (st == P_HDR || st == P_PAY) begin
      enc_v[(2*idx) % 4]       = 1'b1;
      enc_in[(2*idx) % 4]      = b[3:0];
      enc_v[(2*idx + 1) % 4]   = 1'b1;
      enc_in[(2*idx + 1) % 4]  = b[7:4];
    end
    if (st == P_IDLE || st == P_HPAR) enc_clr = '1;
  end

  assign idle  = (st == P_IDLE);
  assign avail = (st == P_SEND);
  assign last  = (st == P_SEND) && idx == 5'd29;

  always_comb begin
    sym.k = 1'b0;
    sym.d = 8'h00;
    if (idx == 5'd0)       begin sym.k = 1'b1; sym.d = K_SS; end
    else if (idx <= 5'd4)  sym.d = p.hb[4 - idx];
    else if (idx <= 5'd8)  sym.d = pb[3'(idx - 5'd5)];
    else if (idx <= 5'd24) sym.d = p.db[24 - idx];
    else if (idx <= 5'd28) sym.d = pb[3'(idx - 5'd21)];
    else                   begin sym.k = 1'b1; sym.d = K_SE; end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= P_IDLE; idx <= '0; p <= '0;
      for (int i = 0; i < 8; i++) pb[i] <= '0;
    end else begin
      case (st)
        P_IDLE: if (load) begin p <= pkt; st <= P_HDR; idx <= '0; end
        P_HDR: begin
          idx <= idx + 1'b1;
          if (idx == 5'd3) st <= P_HPAR;
        end
        P_HPAR: begin
          pb[0] <= {par0[1], par0[0]}; pb[1] <= {par0[3], par0[2]};
          pb[2] <= {par1[1], par1[0]}; pb[3] <= {par1[3], par1[2]};
          st <= P_PAY; idx <= '0;
        end
        P_PAY: begin
          idx <= idx + 1'b1;
          if (idx == 5'd15) st <= P_PPAR;
        end
        P_PPAR: begin
          pb[4] <= {par0[1], par0[0]}; pb[5] <= {par0[3], par0[2]};
          pb[6] <= {par1[1], par1[0]}; pb[7] <= {par1[3], par1[2]};
          st <= P_SEND; idx <= '0;
        end
        default: if (pop) begin
          idx <= idx + 1'b1;
          if (idx == 5'd29) begin st <= P_IDLE; idx <= '0; end
        end
      endcase
    end
  end
endmodule
