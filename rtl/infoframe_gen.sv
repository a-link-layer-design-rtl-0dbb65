// infoframe_gen: audio InfoFrame data generator.
//
// Builds the audio InfoFrame packet (header type 84h) in the CEA-861 audio
// InfoFrame layout:
//   DB0 = coding type [7:4], channel count - 1 [2:0]
//   DB1 = sampling frequency code [4:2], sample size code [1:0]
//   DB2 = 0, DB3 = speaker allocation, DB4 = 0
// The sampling frequency is not an input: it is derived from the measured
// audio time stamp. K samples took naud link clocks, so fs = K * f_LS / naud;
// the code of the standard rate nearest to that (32, 44.1, 48, 88.2, 96,
// 176.4, 192 kHz -> codes 1..7) is chosen by comparing naud * f against
// K * f_LS for each candidate, and is also output as sampling_frequency.
// Registered, one clock.
module infoframe_gen
  import dp_pkg::*;
#(
  parameter int K = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [23:0] naud,
  input  logic [19:0] lclk_khz,
  input  logic [2:0]  channels_m1,
  input  logic [1:0]  sample_size,
  input  logic [7:0]  speaker_alloc,
  output logic [2:0]  sampling_frequency,
  output sdp_t        pkt
);
  // candidate rates in units of 100 Hz
  localparam int unsigned RATE [7] = '{320, 441, 480, 882, 960, 1764, 1920};

  logic [2:0]  code;
  logic [47:0] target, err [7];
  assign target = 48'(K) * 48'(lclk_khz) * 48'd10;  // K * f_LS in 100 Hz units
  for (genvar i = 0; i < 7; i++) begin : g_err
    logic [47:0] v;
    assign v      = 48'(naud) * 48'(RATE[i]);
    assign err[i] = (v > target) ? v - target : target - v;
  end

  always_comb begin
    logic [47:0] best;
    best = err[0];
    code = 3'd1;
    for (int i = 1; i < 7; i++)
      if (err[i] < best) begin best = err[i]; code = 3'(i + 1); end
    if (naud == '0) code = 3'd0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sampling_frequency <= '0; pkt <= '0;
    end else begin
      pkt        <= '0;
      pkt.hb[2]  <= SDP_INFOFRAME;
      pkt.hb[1]  <= 8'h1B;
      pkt.hb[0]  <= 8'h44;
      pkt.db[15] <= {4'h0, 1'b0, channels_m1};
      pkt.db[14] <= {3'b000, code, sample_size};
      pkt.db[12] <= speaker_alloc;
      sampling_frequency <= code;
    end
  end
endmodule
