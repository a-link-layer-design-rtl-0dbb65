// audio_timestamp_gen: audio time stamp (Maud, Naud) generator.
//
// The stream needs Maud/Naud = 512 * fs / f_LS_clk. The block counts link
// symbol clocks over K audio sample periods (K sample_ticks, one per stereo
// sample); with that count as Naud and Maud = 512 * K the ratio is exactly
// 512 * fs / f_LS_clk. Both are 24-bit values. After each measurement the
// time stamp packet (header type 01h) is refreshed:
//   DB0..DB2 = Maud[23:16], [15:8], [7:0];  DB4..DB6 = Naud[23:16], [15:8], [7:0]
// and valid is set. maud_lsb is Maud[7:0] for the byte after VB-ID.
module audio_timestamp_gen
  import dp_pkg::*;
#(
  parameter int K = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sample_tick,
  output logic [23:0] maud,
  output logic [23:0] naud,
  output logic        valid,
  output logic [7:0]  maud_lsb,
  output sdp_t        pkt
);
  logic [23:0] lcnt;
  logic [$clog2(K+1)-1:0] scnt;
  logic started;

  assign maud     = 24'(512 * K);
  assign maud_lsb = maud[7:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lcnt <= '0; scnt <= '0; started <= 1'b0; naud <= '0; valid <= 1'b0;
    end else begin
      if (started && lcnt != '1) lcnt <= lcnt + 1'b1;
      if (sample_tick) begin
        if (!started) begin
          started <= 1'b1; lcnt <= 24'd1; scnt <= '0;
        end else if (scnt == ($clog2(K+1))'(K - 1)) begin
          naud  <= lcnt;
          valid <= 1'b1;
          lcnt  <= 24'd1;
          scnt  <= '0;
        end else begin
          scnt <= scnt + 1'b1;
        end
      end
    end
  end

  always_comb begin
    pkt = '0;
    pkt.hb[2] = SDP_TIMESTAMP; // hb[3] is HB0
    pkt.db[15] = maud[23:16]; pkt.db[14] = maud[15:8]; pkt.db[13] = maud[7:0];
    pkt.db[11] = naud[23:16]; pkt.db[10] = naud[15:8]; pkt.db[9]  = naud[7:0];
  end
endmodule
