// sdp_unpacker: secondary data unpacker with nibble de-interleaving and
// Reed-Solomon error correction (receive side).
//
// Watches lane 0 for SS followed by a data symbol (an attribute packet
// starts SS SS and is ignored) and collects the 28 bytes HB0..3, PB0..3,
// DB0..15, PB4..7 up to SE. The nibbles are then de-interleaved into four
// codewords (nibble n to codeword n mod 4, the inverse of the packer) and
// fed, header codewords first, then payload codewords, to four RS(15,13)
// decoders in parallel, one nibble per codeword per clock. The corrected
// nibbles are re-interleaved into bytes. pkt_valid pulses with the
// corrected packet; corrected counts codewords that needed a correction and
// fail is set if any codeword held more errors than it could correct.
// A packet of the wrong length is dropped.
module sdp_unpacker
  import dp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  sym_t       lane0,
  output logic       pkt_valid,
  output sdp_t       pkt,
  output logic [2:0] corrected,
  output logic       fail
);
  typedef enum logic [1:0] {C_IDLE, C_SS, C_COL} cst_t;
  typedef enum logic [2:0] {U_IDLE, U_HDR, U_HWAIT, U_PAY, U_PWAIT} ust_t;
  cst_t       cst;
  ust_t       st;
  logic [7:0] cb [28];   // packet being collected
  logic [7:0] b [28];    // packet being decoded
  logic [4:0] cnt;
  logic [3:0] j;
  logic [3:0] dv, dlast, ov, olast, ocorr, ofail;
  logic [3:0] din [4];
  logic [3:0] dout [4];
  logic [3:0] oj [4];
  logic [3:0] nib_h [8];
  logic [3:0] nib_p [32];
  logic [2:0] ncorr;
  logic       anyfail;

  function automatic logic [3:0] nib_of(input logic [7:0] by, input int unsigned hi);
    return hi != 0 ? by[7:4] : by[3:0];
  endfunction

  // feed: codeword c, position j. Header codeword: j=0,1 data nibbles c,
  // c+4 of HB; j=2,3 parity nibbles c, c+4 of PB0..3. Payload codeword:
  // j=0..7 data nibbles c+4j of DB; j=8,9 parity nibbles c, c+4 of PB4..7.
  always_comb begin
    for (int c = 0; c < 4; c++) begin
      int unsigned q;
      q        = 0;
      din[c]   = '0;
      dv[c]    = 1'b0;
      dlast[c] = 1'b0;
      if (st == U_HDR) begin
        dv[c] = 1'b1;
        if (j < 4'd2) begin
          q = c + 4 * j;
          din[c] = nib_of(b[q/2], q % 2);
        end else begin
          q = c + 4 * (32'(j) - 2);
          din[c] = nib_of(b[4 + q/2], q % 2);
        end
        dlast[c] = (j == 4'd3);
      end else if (st == U_PAY) begin
        dv[c] = 1'b1;
        if (j < 4'd8) begin
          q = c + 4 * j;
          din[c] = nib_of(b[8 + q/2], q % 2);
        end else begin
          q = c + 4 * (32'(j) - 8);
          din[c] = nib_of(b[24 + q/2], q % 2);
        end
        dlast[c] = (j == 4'd9);
      end
    end
  end

  for (genvar c = 0; c < 4; c++) begin : g_dec
    rs_decoder u_dec (.clk, .rst_n, .in_valid(dv[c]), .in_nib(din[c]), .in_last(dlast[c]),
                      .out_valid(ov[c]), .out_nib(dout[c]), .out_last(olast[c]),
                      .out_corrected(ocorr[c]), .out_fail(ofail[c]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= U_IDLE; cst <= C_IDLE; cnt <= '0; j <= '0; ncorr <= '0; anyfail <= 1'b0;
      pkt_valid <= 1'b0; pkt <= '0; corrected <= '0; fail <= 1'b0;
      for (int i = 0; i < 28; i++) begin b[i] <= '0; cb[i] <= '0; end
      for (int i = 0; i < 8; i++) nib_h[i] <= '0;
      for (int i = 0; i < 32; i++) nib_p[i] <= '0;
      for (int c = 0; c < 4; c++) oj[c] <= '0;
    end else begin
      logic [2:0] nc;
      logic       nf;
      pkt_valid <= 1'b0;
      nc = '0;
      nf = 1'b0;
      // collect decoder outputs: data positions only
      for (int c = 0; c < 4; c++) begin
        if (ov[c]) begin
          if (st == U_HWAIT || st == U_HDR) begin
            if (oj[c] < 4'd2) nib_h[c + 4 * oj[c]] <= dout[c];
          end else begin
            if (oj[c] < 4'd8) nib_p[c + 4 * oj[c]] <= dout[c];
          end
          oj[c] <= olast[c] ? 4'd0 : oj[c] + 1'b1;
          if (olast[c] && ocorr[c]) nc = nc + 1'b1;
          if (olast[c] && ofail[c]) nf = 1'b1;
        end
      end
      ncorr   <= ncorr + nc;
      anyfail <= anyfail || nf;
      // collector: runs while the previous packet is being decoded
      case (cst)
        C_IDLE: if (lane0.k && lane0.d == K_SS) cst <= C_SS;
        C_SS: begin
          if (!lane0.k) begin
            cb[0] <= lane0.d; cnt <= 5'd1; cst <= C_COL;
          end else begin
            cst <= C_IDLE;
          end
        end
        default: begin
          if (lane0.k) begin
            if (lane0.d == K_SE && cnt == 5'd28 && st == U_IDLE) begin
              for (int i = 0; i < 28; i++) b[i] <= cb[i];
              st <= U_HDR; j <= '0; ncorr <= '0; anyfail <= 1'b0;
              for (int c = 0; c < 4; c++) oj[c] <= '0;
            end
            cst <= (lane0.d == K_SS) ? C_SS : C_IDLE;
          end else if (cnt < 5'd28) begin
            cb[cnt] <= lane0.d; cnt <= cnt + 1'b1;
          end else begin
            cst <= C_IDLE;
          end
        end
      endcase
      case (st)
        U_IDLE: ;
        U_HDR: begin
          j <= j + 1'b1;
          if (j == 4'd3) st <= U_HWAIT;
        end
        U_HWAIT: if (olast[0]) begin st <= U_PAY; j <= '0; end
        U_PAY: begin
          j <= j + 1'b1;
          if (j == 4'd9) st <= U_PWAIT;
        end
        default: if (olast[0]) begin
          sdp_t r;
          for (int i = 0; i < 4; i++)  r.hb[3 - i]  = {nib_h[2*i+1], nib_h[2*i]};
          for (int i = 0; i < 16; i++) r.db[15 - i] = {nib_p[2*i+1], nib_p[2*i]};
          pkt <= r;
          pkt_valid <= 1'b1;
          corrected <= ncorr + nc;
          fail      <= anyfail || nf;
          st <= U_IDLE;
        end
      endcase
    end
  end
endmodule
