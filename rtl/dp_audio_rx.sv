// dp_audio_rx: main-link audio receiver (link clock domain).
//
// The secondary data unpacker takes packets off lane 0 and corrects them.
// Audio stream packets put their words into a word FIFO (the audio time
// base converter); the time stamp packet updates maud/naud and the
// InfoFrame packet updates the stream description. The secondary data sink
// turns the words back into S/PDIF; it starts only once START_WORDS words
// are buffered so that the bursty packet arrival does not starve it.
module dp_audio_rx
  import dp_pkg::*;
#(
  parameter int CELL        = 26,
  parameter int START_WORDS = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  sym_t        lane0,
  output logic        spdif_out,
  output logic [23:0] maud,
  output logic [23:0] naud,
  output logic [7:0]  infoframe_db0,
  output logic [7:0]  infoframe_db1,
  output logic        ev_pkt,
  output logic        ev_corrected,
  output logic        ev_fail,
  output logic        ev_underrun
);
  logic       pv, fail;
  sdp_t       pkt;
  logic [2:0] corr;

  sdp_unpacker u_unp (.clk, .rst_n, .lane0, .pkt_valid(pv), .pkt, .corrected(corr), .fail);

  // write the 4 words of an audio packet, one per clock
  logic [2:0]  wq;
  logic [3:0][31:0] words;
  logic        wen, full, empty, pop, primed;
  logic [31:0] wdata, rdata;
  logic [5:0]  count;

  assign wen   = wq != 3'd0;
  assign wdata = words[3'd4 - wq];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wq <= '0; words <= '0; maud <= '0; naud <= '0; infoframe_db0 <= '0; infoframe_db1 <= '0;
      ev_pkt <= 1'b0; ev_corrected <= 1'b0; ev_fail <= 1'b0; primed <= 1'b0;
    end else begin
      ev_pkt <= pv; ev_corrected <= pv && corr != '0; ev_fail <= pv && fail;
      if (wen) wq <= wq - 1'b1;
      if (pv && !fail) begin
        case (pkt.hb[2])
          SDP_AUDIO: begin
            for (int i = 0; i < 4; i++)
              words[i] <= {pkt.db[15-4*i-3], pkt.db[15-4*i-2], pkt.db[15-4*i-1], pkt.db[15-4*i]};
            wq <= 3'd4;
          end
          SDP_TIMESTAMP: begin
            maud <= {pkt.db[15], pkt.db[14], pkt.db[13]};
            naud <= {pkt.db[11], pkt.db[10], pkt.db[9]};
          end
          SDP_INFOFRAME: begin
            infoframe_db0 <= pkt.db[15];
            infoframe_db1 <= pkt.db[14];
          end
          default: ;
        endcase
      end
      if (count >= 6'(START_WORDS)) primed <= 1'b1;
    end
  end

  sync_fifo #(.WIDTH(32), .DEPTH(32)) u_tbc (.clk, .rst_n, .wr_en(wen), .wr_data(wdata),
    .full, .rd_en(pop), .rd_data(rdata), .empty, .count);

  logic popped;
  spdif_tx #(.CELL(CELL)) u_sink (.clk, .rst_n, .word_avail(primed && !empty), .word_in(rdata),
                                  .word_pop(popped), .spdif_out);
  assign pop = popped;

  // a subframe slot that found no word after the sink had started
  logic [$clog2(66*CELL)-1:0] gap;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin gap <= '0; ev_underrun <= 1'b0; end
    else begin
      ev_underrun <= 1'b0;
      if (popped || !primed) gap <= '0;
      else if (gap == ($clog2(66*CELL))'(64*CELL + CELL)) begin
        gap <= '0; ev_underrun <= 1'b1;
      end else gap <= gap + 1'b1;
    end
  end
endmodule
