// enc_8b10b_word: 8b/10b encoder for a word of NBYTES bytes (data characters only).
//
// Standard 8b/10b line code: each byte HGF EDCBA becomes the 6-bit sub-block
// abcdei (from EDCBA) followed by the 4-bit sub-block fghj (from HGF), chosen by
// the running disparity so that the line stays DC balanced. The most significant
// byte is encoded first and the running disparity is passed from byte to byte;
// each 10-bit symbol is placed with bit a as its most significant bit, symbols in
// the same order as the bytes. With these conventions 32'h0001E7F1 at negative
// disparity becomes 40'h9D_1D4E3A31, the value shown for the chip's encoder.
// rd_i / rd_o: running disparity before and after the word, 1 = positive.
// Purely combinational. The chip uses a vendor encoder; this is an independent
// implementation of the standard code.
module enc_8b10b_word #(
  parameter int unsigned NBYTES = 4
) (
  input  logic [8*NBYTES-1:0]  data_i,
  input  logic                 rd_i,
  output logic [10*NBYTES-1:0] code_o,
  output logic                 rd_o
);

  // 5b/6b code for negative running disparity, abcdei with a as bit 5.
  function automatic logic [5:0] code6(input logic [4:0] x);
    unique case (x)
      5'd0:  return 6'b100111;  5'd1:  return 6'b011101;
      5'd2:  return 6'b101101;  5'd3:  return 6'b110001;
      5'd4:  return 6'b110101;  5'd5:  return 6'b101001;
      5'd6:  return 6'b011001;  5'd7:  return 6'b111000;
      5'd8:  return 6'b111001;  5'd9:  return 6'b100101;
      5'd10: return 6'b010101;  5'd11: return 6'b110100;
      5'd12: return 6'b001101;  5'd13: return 6'b101100;
      5'd14: return 6'b011100;  5'd15: return 6'b010111;
      5'd16: return 6'b011011;  5'd17: return 6'b100011;
      5'd18: return 6'b010011;  5'd19: return 6'b110010;
      5'd20: return 6'b001011;  5'd21: return 6'b101010;
      5'd22: return 6'b011010;  5'd23: return 6'b111010;
      5'd24: return 6'b110011;  5'd25: return 6'b100110;
      5'd26: return 6'b010110;  5'd27: return 6'b110110;
      5'd28: return 6'b001110;  5'd29: return 6'b101110;
      5'd30: return 6'b011110;  default: return 6'b101011;
    endcase
  endfunction

  // 3b/4b code for negative running disparity, fghj with f as bit 3.
  function automatic logic [3:0] code4(input logic [2:0] y);
    unique case (y)
      3'd0: return 4'b1011;  3'd1: return 4'b1001;
      3'd2: return 4'b0101;  3'd3: return 4'b1100;
      3'd4: return 4'b1101;  3'd5: return 4'b1010;
      3'd6: return 4'b0110;  default: return 4'b1110;
    endcase
  endfunction

  function automatic logic [10:0] enc_byte(input logic [7:0] b, input logic rd);
    logic [4:0] x;
    logic [2:0] y;
    logic [5:0] c6;
    logic [3:0] c4;
    logic       r;
    logic       alt;
    x  = b[4:0];
    y  = b[7:5];
    r  = rd;
    c6 = code6(x);
    if (r && ($countones(c6) != 3 || x == 5'd7)) c6 = ~c6;
    if ($countones(c6) != 3) r = ~r;
    alt = (!r && (x == 5'd17 || x == 5'd18 || x == 5'd20)) ||
          ( r && (x == 5'd11 || x == 5'd13 || x == 5'd14));
    c4 = (y == 3'd7 && alt) ? 4'b0111 : code4(y);
    if (r && ($countones(c4) != 2 || y == 3'd3 || y == 3'd7)) c4 = ~c4;
    if ($countones(c4) != 2) r = ~r;
    return {c6, c4, r};
  endfunction

  always_comb begin
    logic        r;
    logic [10:0] e;
    r = rd_i;
    code_o = '0;
    for (int i = NBYTES - 1; i >= 0; i--) begin
      e = enc_byte(data_i[8*i +: 8], r);
      code_o[10*i +: 10] = e[10:1];
      r = e[0];
    end
    rd_o = r;
  end

endmodule
