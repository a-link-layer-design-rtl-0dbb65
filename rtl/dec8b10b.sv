// dec8b10b: 8B/10B decoder for one main-link lane.
//
// Turns a 10-bit code group {a,b,c,d,e,i,f,g,h,j} (bit 9 first on the wire)
// back into a link symbol: 8 data bits and a K flag. The 6-bit and 4-bit
// sub-blocks are looked up independently in the standard 8B/10B tables in
// both disparities; a code group that matches no table entry raises
// out_err (code violation). Running-disparity errors are not flagged.
// One code group per clock; the symbol appears one clock later.
module dec8b10b
  import dp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [9:0] in_code,
  output logic       out_valid,
  output sym_t       out_sym,
  output logic       out_err
);

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

  sym_t sym_n;
  logic err_n;

  always_comb begin : decode
    logic [5:0] c6;
    logic [3:0] c4;
    logic       f6, f4, k28, kx7;
    logic [4:0] x;
    logic [2:0] y;
    c6  = in_code[9:4];
    c4  = in_code[3:0];
    x   = '0;
    y   = '0;
    f6  = 1'b0;
    f4  = 1'b0;
    k28 = (c6 == 6'b001111) || (c6 == 6'b110000);
    for (int i = 0; i < 32; i++) begin
      if (tab6(5'(i)) == c6 ||
          ((($countones(tab6(5'(i))) != 3) || i == 7) && ~tab6(5'(i)) == c6)) begin
        x  = 5'(i);
        f6 = 1'b1;
      end
    end
    if (k28) begin
      x  = 5'd28;
      f6 = 1'b1;
    end
    kx7 = 1'b0;
    if (k28) begin
      f4 = 1'b1;
      case (c4)
        4'b1011, 4'b0100: y = 3'd0;
        4'b0110, 4'b1001: y = 3'd1;
        4'b1010, 4'b0101: y = 3'd2;
        4'b1100, 4'b0011: y = 3'd3;
        4'b1101, 4'b0010: y = 3'd4;
        4'b0111, 4'b1000: y = 3'd7;
        default:          f4 = 1'b0;
      endcase
      // 0101/1010 and 1001/0110 are each two K28 codes told apart by the
      // 6-bit disparity: negative 6b (001111) is followed by the RD+ form.
      if (c4 == 4'b1010) y = (c6 == 6'b001111) ? 3'd5 : 3'd2;
      if (c4 == 4'b0101) y = (c6 == 6'b001111) ? 3'd2 : 3'd5;
      if (c4 == 4'b1001) y = (c6 == 6'b001111) ? 3'd1 : 3'd6;
      if (c4 == 4'b0110) y = (c6 == 6'b001111) ? 3'd6 : 3'd1;
    end else begin
      f4 = 1'b1;
      case (c4)
        4'b1011, 4'b0100: y = 3'd0;
        4'b1001:          y = 3'd1;
        4'b0101:          y = 3'd2;
        4'b1100, 4'b0011: y = 3'd3;
        4'b1101, 4'b0010: y = 3'd4;
        4'b1010:          y = 3'd5;
        4'b0110:          y = 3'd6;
        4'b1110, 4'b0001: y = 3'd7;
        4'b0111, 4'b1000: begin
          y   = 3'd7;
          kx7 = (x == 5'd23 || x == 5'd27 || x == 5'd29 || x == 5'd30);
        end
        default:          f4 = 1'b0;
      endcase
    end
    sym_n.d = {y, x};
    sym_n.k = k28 || kx7;
    err_n   = !(f6 && f4);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_sym   <= '0;
      out_err   <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_sym <= sym_n;
        out_err <= err_n;
      end
    end
  end

endmodule
