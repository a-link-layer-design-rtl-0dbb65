// msa_recovery: main stream attribute recovery (receive side).
//
// Watches lane 0 during blanking for the attribute packet SS SS <16 bytes>
// SE and unpacks the 16 bytes, most significant byte first, into htotal,
// vtotal, hstart, vstart, hsw, vsw, hwidth and vheight. msa_valid goes high
// after the first complete packet and stays high; msa holds the latest one.
// A packet cut short by another control symbol is discarded.
module msa_recovery
  import dp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  sym_t       lane0,
  output msa_t       msa,
  output logic       msa_valid
);
  logic [1:0]        ph;     // 0 idle, 1 saw SS, 2 collecting
  logic [4:0]        cnt;
  logic [15:0][7:0]  buf_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph <= '0; cnt <= '0; buf_q <= '0; msa <= '0; msa_valid <= 1'b0;
    end else begin
      case (ph)
        2'd0: if (lane0.k && lane0.d == K_SS) ph <= 2'd1;
        2'd1: begin
          if (lane0.k && lane0.d == K_SS) begin ph <= 2'd2; cnt <= '0; end
          else ph <= 2'd0;
        end
        default: begin
          if (lane0.k) begin
            if (lane0.d == K_SE && cnt == 5'd16) begin
              msa <= msa_t'(buf_q);
              msa_valid <= 1'b1;
            end
            ph <= 2'd0;
          end else if (cnt < 5'd16) begin
            buf_q[15 - cnt[3:0]] <= lane0.d;
            cnt <= cnt + 1'b1;
          end else begin
            ph <= 2'd0;
          end
        end
      endcase
    end
  end
endmodule
