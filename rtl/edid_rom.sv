// edid_rom: EDID memory of the sink (128-byte base block, read only).
//
// The contents are computed by a constant function rather than loaded from
// a file: the fixed EDID header 00 FF FF FF FF FF FF 00, a manufacturer and
// product ID, EDID version 1.3, digital input, and one detailed timing
// descriptor for the preferred mode, 1600 x 1200 at 60 Hz (162 MHz pixel
// clock, 2160 x 1250 total, sync 192 / 3, front porch 64 / 1), followed by
// a checksum byte that makes the 128 bytes sum to zero modulo 256.
// Read is asynchronous: rdata = EDID[addr].
module edid_rom (
  input  logic [6:0] addr,
  output logic [7:0] rdata
);
  typedef logic [7:0] edid_t [128];

  function automatic edid_t build();
    edid_t e;
    logic [7:0] sum;
    for (int i = 0; i < 128; i++) e[i] = 8'h00;
    e[0] = 8'h00; for (int i = 1; i < 7; i++) e[i] = 8'hFF; e[7] = 8'h00;
    e[8] = 8'h04; e[9] = 8'h21;       // manufacturer ID
    e[10] = 8'h00; e[11] = 8'h16;     // product code
    e[18] = 8'h01; e[19] = 8'h03;     // EDID 1.3
    e[20] = 8'h80;                    // digital input
    e[21] = 8'd43; e[22] = 8'd32;     // image size, cm
    e[23] = 8'h78;                    // gamma 2.2
    e[24] = 8'h0A;                    // preferred timing in first descriptor
    for (int i = 38; i < 54; i++) e[i] = 8'h01; // no standard timings
    // detailed timing descriptor: 1600x1200@60
    e[54] = 8'h48; e[55] = 8'h3F;     // 16200 x 10 kHz
    e[56] = 8'h40; e[57] = 8'h30; e[58] = 8'h62; // hactive 1600, hblank 560
    e[59] = 8'hB0; e[60] = 8'h32; e[61] = 8'h40; // vactive 1200, vblank 50
    e[62] = 8'h40; e[63] = 8'hC0; e[64] = 8'h13; e[65] = 8'h00; // porches/syncs
    e[66] = 8'hAF; e[67] = 8'h40; e[68] = 8'h21; // image size mm
    e[71] = 8'h1E;                    // separate syncs, positive
    sum = 8'h00;
    for (int i = 0; i < 127; i++) sum = sum + e[i];
    e[127] = 8'h00 - sum;
    return e;
  endfunction

  localparam edid_t EDID = build();
  assign rdata = EDID[addr];
endmodule
