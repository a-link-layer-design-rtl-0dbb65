// dpcd_mem: DPCD memory wrapper of the sink.
//
// Holds the DisplayPort Configuration Data seen through the AUX channel:
//   000h-00Fh receiver capability (read only): 000h DPCD revision,
//             001h MAX_LINK_RATE, 002h MAX_LANE_COUNT
//   100h-10Fh link configuration (read/write): 100h LINK_BW_SET,
//             101h LANE_COUNT_SET, 102h TRAINING_PATTERN_SET, ...
//   200h-20Fh link status (read only, from the receiver): 200h SINK_COUNT,
//             202h lanes 0/1, 203h lanes 2/3 (per lane nibble: bit 0
//             CR_DONE, bit 1 CHANNEL_EQ_DONE, bit 2 SYMBOL_LOCKED),
//             204h bit 0 INTERLANE_ALIGN_DONE
// Other addresses read as zero. A write is accepted (wr_ok) only in the
// configuration area; elsewhere the requester is to be told NACK. For
// INIT_CYCLES clocks after reset the memory is being prepared and ready is
// low (requests are to be answered with DEFER). hpd is high from reset
// (the sink is attached and powered) even while the memory is not ready; if
// clock recovery is lost on an active lane while the link is in normal
// operation, hpd drops for IRQ_LEN clocks as an interrupt request.
// Reads are asynchronous; writes take effect at the clock edge.
module dpcd_mem
  import dp_pkg::*;
#(
  parameter logic [7:0] MAX_LINK_RATE  = 8'h0A,
  parameter logic [7:0] MAX_LANE_COUNT = 8'h04,
  parameter int         INIT_CYCLES    = 1000,
  parameter int         IRQ_LEN        = 1000
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [19:0]          rd_addr,
  output logic [7:0]           rd_data,
  input  logic                 wr_en,
  input  logic [19:0]          wr_addr,
  input  logic [7:0]           wr_data,
  output logic                 wr_ok,
  output logic                 ready,
  // receiver status in
  input  logic [MAX_LANES-1:0] cr_done,
  input  logic [MAX_LANES-1:0] eq_done,
  input  logic [MAX_LANES-1:0] sym_locked,
  input  logic                 aligned,
  // link configuration out
  output logic [7:0]           link_bw_set,
  output logic [2:0]           lane_count_set,
  output logic [1:0]           tps,
  output logic                 hpd
);
  logic [7:0] cfg [16];
  logic [$clog2(INIT_CYCLES+1)-1:0] icnt;
  logic [$clog2(IRQ_LEN+1)-1:0]     irq;
  logic [3:0] ln [MAX_LANES];
  logic       all_cr, all_cr_q;

  always_comb begin
    for (int l = 0; l < MAX_LANES; l++) ln[l] = {1'b0, sym_locked[l], eq_done[l], cr_done[l]};
    rd_data = 8'h00;
    case (rd_addr[19:4])
      16'h0000: case (rd_addr[3:0])
                  4'h0: rd_data = 8'h11;
                  4'h1: rd_data = MAX_LINK_RATE;
                  4'h2: rd_data = MAX_LANE_COUNT;
                  default: rd_data = 8'h00;
                endcase
      16'h0010: rd_data = cfg[rd_addr[3:0]];
      16'h0020: case (rd_addr[3:0])
                  4'h0: rd_data = 8'h01;
                  4'h2: rd_data = {ln[1], ln[0]};
                  4'h3: rd_data = {ln[3], ln[2]};
                  4'h4: rd_data = {7'd0, aligned};
                  default: rd_data = 8'h00;
                endcase
      default: rd_data = 8'h00;
    endcase
    wr_ok = (wr_addr[19:4] == 16'h0010);
  end

  assign link_bw_set    = cfg[0];
  assign lane_count_set = cfg[1][2:0];
  assign tps            = cfg[2][1:0];
  assign ready          = icnt == ($clog2(INIT_CYCLES+1))'(INIT_CYCLES);
  assign hpd            = irq == '0;

  always_comb begin
    all_cr = 1'b1;
    for (int l = 0; l < MAX_LANES; l++)
      if (3'(l) < lane_count_set && !cr_done[l]) all_cr = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 16; i++) cfg[i] <= 8'h00;
      icnt <= '0; irq <= '0; all_cr_q <= 1'b0;
    end else begin
      if (!ready) icnt <= icnt + 1'b1;
      if (wr_en && wr_ok) cfg[wr_addr[3:0]] <= wr_data;
      all_cr_q <= all_cr;
      if (irq != '0) irq <= irq - 1'b1;
      else if (all_cr_q && !all_cr && tps == 2'd0 && lane_count_set != '0)
        irq <= ($clog2(IRQ_LEN+1))'(IRQ_LEN);
    end
  end
endmodule
