// aux_data_shifter: input stage of the AUX channel receiver.
//
// Synchronizes the received AUX line with two flip-flops and passes it
// through a shift register whose tap (delay, 0..MAXDLY clocks) sets the
// phase at which the Manchester decoder sees the data. The phase can thus
// be moved against the receiver clock when the cable shifts the signal.
// Latency: 2 + delay clocks.
module aux_data_shifter #(
  parameter int MAXDLY = 15
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          aux_in,
  input  logic [$clog2(MAXDLY+1)-1:0]   delay,
  output logic                          aux_dly
);
  logic s1, s2;
  logic [MAXDLY:0] sh;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin s1 <= 1'b0; s2 <= 1'b0; sh <= '0; end
    else begin
      s1 <= aux_in;
      s2 <= s1;
      sh <= {sh[MAXDLY-1:0], s2};
    end
  end
  assign aux_dly = (delay == '0) ? s2 : sh[delay - 1'b1];
endmodule
