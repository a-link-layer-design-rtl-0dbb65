// dp_pkg: constants, types and small functions shared by the DisplayPort
// link-layer modules.
//
// Control symbols: the framing symbols (BS, BE, FS, FE, SS, SE, SR) are
// K-codes of the 8B/10B code. Their names follow the DisplayPort framing
// vocabulary; the particular K-code assigned to each is the usual
// DisplayPort one and is a choice of this design.
//
// GF(16) arithmetic for the RS(15,13) code of the secondary-data ECC uses
// the primitive polynomial x^4 + x + 1 (a design choice; the field, the
// symbol size of one nibble and the code length are what the design
// requires). Codewords have two parity nibbles with roots alpha^0, alpha^1.
package dp_pkg;

  localparam int MAX_LANES = 4;

  // Control symbol byte values (sent with the K flag set)
  localparam logic [7:0] K_BS = 8'hBC; // K28.5 blanking start
  localparam logic [7:0] K_BE = 8'hFB; // K27.7 blanking end
  localparam logic [7:0] K_FS = 8'hFE; // K30.7 fill start
  localparam logic [7:0] K_FE = 8'hF7; // K23.7 fill end
  localparam logic [7:0] K_SS = 8'h5C; // K28.2 secondary-data start
  localparam logic [7:0] K_SE = 8'hFD; // K29.7 secondary-data end
  localparam logic [7:0] K_SR = 8'h1C; // K28.0 scrambler reset

  // Training pattern data symbols
  localparam logic [7:0] D10_2 = 8'h4A;
  localparam logic [7:0] D11_6 = 8'hCB;

  // One link symbol on one lane, before channel coding
  typedef struct packed {
    logic       k;    // 1: control symbol
    logic [7:0] d;
  } sym_t;

  // A group of pixels, one per active lane, moved between the pixel-clock
  // and link-clock domains as one FIFO entry
  typedef struct packed {
    logic                         sof;  // first group of a frame
    logic                         eol;  // last group of a line
    logic                         eof;  // last group of a frame
    logic [MAX_LANES-1:0][23:0]   px;   // px[l] travels on lane l, {R,G,B}
  } pix_group_t;

  // Video timing of one stream (main stream attributes)
  typedef struct packed {
    logic [15:0] htotal;
    logic [15:0] vtotal;
    logic [15:0] hstart;  // first active pixel, counted from HSYNC start
    logic [15:0] vstart;  // first active line, counted from VSYNC start
    logic [15:0] hsw;     // HSYNC width
    logic [15:0] vsw;     // VSYNC width
    logic [15:0] hwidth;  // active pixels per line
    logic [15:0] vheight; // active lines per frame
  } msa_t;

  // Secondary data packet types (header byte 1)
  localparam logic [7:0] SDP_TIMESTAMP = 8'h01;
  localparam logic [7:0] SDP_AUDIO     = 8'h02;
  localparam logic [7:0] SDP_INFOFRAME = 8'h84;

  // Secondary data packet: 4 header bytes, 16 payload bytes
  typedef struct packed {
    logic [3:0][7:0]  hb;
    logic [15:0][7:0] db;
  } sdp_t;

  // AUX channel request/reply commands
  localparam logic [3:0] AUX_NATIVE_WR = 4'b1000;
  localparam logic [3:0] AUX_NATIVE_RD = 4'b1001;
  localparam logic [3:0] AUX_I2C_WR    = 4'b0000;
  localparam logic [3:0] AUX_I2C_RD    = 4'b0001;
  localparam logic [3:0] AUX_ACK       = 4'b0000;
  localparam logic [3:0] AUX_NACK      = 4'b0001;
  localparam logic [3:0] AUX_DEFER     = 4'b0010;

  localparam int AUX_MAX_BYTES = 16;

  // DPCD addresses used by link training
  localparam logic [19:0] DPCD_REV            = 20'h00000;
  localparam logic [19:0] DPCD_LINK_BW_SET    = 20'h00100;
  localparam logic [19:0] DPCD_TRAINING_PATTERN_SET = 20'h00102;
  localparam logic [19:0] DPCD_LANE0_1_STATUS = 20'h00202;

  // ---------------- GF(16), x^4 + x + 1 ----------------
  function automatic logic [3:0] gf_mul(input logic [3:0] a, input logic [3:0] b);
    logic [3:0] p, aa;
    p  = '0;
    aa = a;
    for (int i = 0; i < 4; i++) begin
      if (b[i]) p ^= aa;
      aa = aa[3] ? ({aa[2:0], 1'b0} ^ 4'b0011) : {aa[2:0], 1'b0};
    end
    return p;
  endfunction

  function automatic logic [3:0] gf_pow(input int unsigned e); // alpha^e
    logic [3:0] r;
    r = 4'd1;
    for (int i = 0; i < 15; i++)
      if (i < int'(e % 15)) r = gf_mul(r, 4'd2);
    return r;
  endfunction

  function automatic logic [3:0] gf_inv(input logic [3:0] a);
    logic [3:0] r;
    r = '0;
    for (int i = 1; i < 16; i++)
      if (gf_mul(a, 4'(i)) == 4'd1) r = 4'(i);
    return r;
  endfunction

  // Nibble interleaving of a secondary-data block: nibble n of the block
  // (n = 2*byte + 0 for the low nibble, +1 for the high nibble) belongs to
  // codeword n % 4, so two adjacent bytes spread over all four codewords.
  function automatic int unsigned nib_cw(input int unsigned n);
    return n % 4;
  endfunction

endpackage
