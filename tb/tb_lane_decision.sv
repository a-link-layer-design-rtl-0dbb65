// tb_lane_decision: lane count and transfer-unit fill for a set of stream
// and link rates, against values worked out in the testbench with real
// arithmetic: lanes = the fewest of 1, 2, 4 (within the sink's maximum)
// whose byte rate covers 3 bytes per pixel, fill = ceil(64 * need / cap) + 1,
// capped at 64. Includes 1600x1200 at 60 Hz (162 MHz pixel clock) on
// 1.62 and 2.7 Gbps links.
module tb_lane_decision;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [19:0] pk = '0, lk = '0;
  logic [2:0]  ml = 3'd4, lc;
  logic [6:0]  tus, tuv;
  lane_decision #(.TU_SIZE(64)) dut (.clk, .rst_n, .pclk_khz(pk), .lclk_khz(lk), .max_lanes(ml),
                                     .lane_count(lc), .tu_size(tus), .tu_valid(tuv));
  task automatic try(input int p, input int l, input int m);
    real need, cap;
    int el, ev;
    @(negedge clk); pk = 20'(p); lk = 20'(l); ml = 3'(m);
    @(negedge clk);
    need = 3.0 * p;
    if (l >= need || m < 2) el = 1; else if (2.0 * l >= need || m < 4) el = 2; else el = 4;
    cap = real'(el) * l;
    ev = int'($ceil(64.0 * need / cap - 1e-9)) + 1;
    if (ev > 64) ev = 64;
    checks++;
    if (lc != 3'(el) || tuv != 7'(ev) || tus != 7'd64) begin
      failures++; $display("FAIL pclk %0d lclk %0d max %0d: lanes %0d fill %0d, exp %0d %0d", p, l, m, lc, tuv, el, ev);
    end
  endtask
  initial begin
    #1000000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    try(162000, 162000, 4);   // 1600x1200@60 on 1.62 Gbps: 4 lanes
    try(162000, 270000, 4);   // on 2.7 Gbps: 2 lanes
    try(25175, 162000, 4);    // 640x480@60: 1 lane
    try(108000, 162000, 4);
    try(162000, 162000, 2);   // sink limited to 2 lanes: overbooked, fill capped
    try(65000, 270000, 1);
    for (int i = 0; i < 300; i++) try($urandom_range(10000, 300000), ($urandom_range(0, 1) == 1) ? 162000 : 270000,
                                      ($urandom_range(0, 2) == 0) ? 1 : ($urandom_range(0, 1) == 1) ? 2 : 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
