// async_fifo: dual-clock FIFO with Gray-coded pointers.
//
// Moves words between two unrelated clock domains (pixel clock and link
// symbol clock). Pointers are kept one bit wider than the address, converted
// to Gray code and passed through two-flop synchronizers, so full and empty
// are always conservative. wr_count/rd_count give the fill level as seen from
// each side. Read data is first-word-fall-through: rd_data shows the head
// word whenever rd_empty is low; rd_en pops it. DEPTH must be a power of two.
module async_fifo #(
  parameter int WIDTH = 8,
  parameter int DEPTH = 16
) (
  input  logic                     wr_clk,
  input  logic                     wr_rst_n,
  input  logic                     wr_en,
  input  logic [WIDTH-1:0]         wr_data,
  output logic                     wr_full,
  output logic [$clog2(DEPTH):0]   wr_count,
  input  logic                     rd_clk,
  input  logic                     rd_rst_n,
  input  logic                     rd_en,
  output logic [WIDTH-1:0]         rd_data,
  output logic                     rd_empty,
  output logic [$clog2(DEPTH):0]   rd_count
);
  localparam int AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin, rbin, wgray, rgray;
  logic [AW:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction
  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    for (int i = AW; i >= 0; i--) b[i] = (i == AW) ? g[i] : (b[i+1] ^ g[i]);
    return b;
  endfunction

  // write side
  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (wr_en && !wr_full) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end
  always_ff @(posedge wr_clk) begin
    if (wr_en && !wr_full) mem[wbin[AW-1:0]] <= wr_data;
  end
  assign wr_count = wbin - gray2bin(rgray_w2);
  assign wr_full  = wr_count == (AW+1)'(DEPTH);

  // read side
  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (rd_en && !rd_empty) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end
  assign rd_count = gray2bin(wgray_r2) - rbin;
  assign rd_empty = rd_count == '0;
  assign rd_data  = mem[rbin[AW-1:0]];

endmodule
