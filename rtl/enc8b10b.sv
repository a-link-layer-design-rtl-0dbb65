// enc8b10b: 8B/10B encoder for one main-link lane.
//
// Each link symbol (8 data bits plus a K flag for control symbols) becomes a
// 10-bit code group with bounded running disparity, which gives the lane
// DC balance at symbol level. The code tables are the standard 8B/10B ones
// (5B/6B and 3B/4B sub-blocks). The output code is {a,b,c,d,e,i,f,g,h,j}
// with bit 9 ('a') sent first. Running disparity starts negative after
// reset. One symbol per clock when in_valid is high; the code appears one
// clock later (out_valid). Only the K-codes K28.0-K28.7 and K23.7, K27.7,
// K29.7, K30.7 exist; other values with k=1 are coded as data.
module enc8b10b
  import dp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  sym_t       in_sym,
  output logic       out_valid,
  output logic [9:0] out_code
);

  // 5B/6B code for negative running disparity, abcdei
  function automatic logic [5:0] tab6(input logic [4:0] x);
    case (x)
      5'd0:  return 6'b100111; 5'd1:  return 6'b011101; 5'd2:  return 6'b101101;
      5'd3:  return 6'b110001; 5'd4:  return 6'b110101; 5'd5:  return 6'b101001;
      5'd6:  return 6'b011001; 5'd7:  return 6'b111000; 5'd8:  return 6'b111001;
      5'd9:  return 6'b100101; 5'd10: return 6'b010101; 5'd11: return 6'b110100;
      5'd12: return 6'b001101; 5'd13: return 6'b101100; 5'd14: return 6'b011100;
      5'd15: return 6'b010111; 5'd16: return 6'b011011; 5'd17: return 6'b100011;
      5'd18: return 6'b010011; 5'd19: return 6'b110010; 5'd20: return 6'b001011;
      5'd21: return 6'b101010; 5'd22: return 6'b011010; 5'd23: return 6'b111010;
      5'd24: return 6'b110011; 5'd25: return 6'b100110; 5'd26: return 6'b010110;
      5'd27: return 6'b110110; 5'd28: return 6'b001110; 5'd29: return 6'b101110;
      5'd30: return 6'b011110; default: return 6'b101011;
    endcase
  endfunction

  function automatic logic ones_odd_bal6(input logic [5:0] c);
    return $countones(c) != 3;
  endfunction

  logic       rd; // 0: negative running disparity
  logic [9:0] code_n;
  logic       rd_n;

  always_comb begin : encode
    logic [4:0] x;
    logic [2:0] y;
    logic       kk, k28, rd1, a7;
    logic [5:0] c6;
    logic [3:0] c4;
    x   = in_sym.d[4:0];
    y   = in_sym.d[7:5];
    k28 = in_sym.k && (x == 5'd28);
    kk  = in_sym.k && (k28 || (y == 3'd7 && (x == 5'd23 || x == 5'd27 ||
                                              x == 5'd29 || x == 5'd30)));
    // 6-bit sub-block
    c6 = k28 ? 6'b001111 : tab6(x);
    if (rd && (ones_odd_bal6(c6) || (!k28 && x == 5'd7))) c6 = ~c6;
    rd1 = ones_odd_bal6(c6) ? ~rd : rd;
    // 4-bit sub-block
    a7 = (!rd1 && (x == 5'd17 || x == 5'd18 || x == 5'd20)) ||
         ( rd1 && (x == 5'd11 || x == 5'd13 || x == 5'd14));
    if (k28) begin
      case (y)
        3'd0: c4 = 4'b1011; 3'd1: c4 = 4'b0110; 3'd2: c4 = 4'b1010;
        3'd3: c4 = 4'b1100; 3'd4: c4 = 4'b1101; 3'd5: c4 = 4'b0101;
        3'd6: c4 = 4'b1001; default: c4 = 4'b0111;
      endcase
      if (rd1) c4 = ~c4;
    end else begin
      case (y)
        3'd0: c4 = 4'b1011; 3'd1: c4 = 4'b1001; 3'd2: c4 = 4'b0101;
        3'd3: c4 = 4'b1100; 3'd4: c4 = 4'b1101; 3'd5: c4 = 4'b1010;
        3'd6: c4 = 4'b0110;
        default: c4 = (a7 || kk) ? 4'b0111 : 4'b1110;
      endcase
      if (rd1 && (y == 3'd0 || y == 3'd3 || y == 3'd4 || y == 3'd7)) c4 = ~c4;
    end
    code_n = {c6, c4};
    rd_n   = ($countones(c4) != 2) ? ~rd1 : rd1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd        <= 1'b0;
      out_valid <= 1'b0;
      out_code  <= 10'd0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_code <= code_n;
        rd       <= rd_n;
      end
    end
  end

endmodule
