// tb_8b10b_pkg: reference 8b/10b encoder and decoder for the testbenches.
//
// Written from the standard code tables for both running disparities (no
// complement rule), so it checks the RTL encoder independently. Symbols are
// abcdei fghj with bit a as the most significant bit; a 32-bit word is encoded
// most significant byte first. rd: 0 = negative, 1 = positive running disparity.
package tb_8b10b_pkg;

  // 5b/6b: {RD- code, RD+ code}
  function automatic logic [11:0] t6(input int x);
    case (x)
      0:  return {6'b100111, 6'b011000};  1:  return {6'b011101, 6'b100010};
      2:  return {6'b101101, 6'b010010};  3:  return {6'b110001, 6'b110001};
      4:  return {6'b110101, 6'b001010};  5:  return {6'b101001, 6'b101001};
      6:  return {6'b011001, 6'b011001};  7:  return {6'b111000, 6'b000111};
      8:  return {6'b111001, 6'b000110};  9:  return {6'b100101, 6'b100101};
      10: return {6'b010101, 6'b010101};  11: return {6'b110100, 6'b110100};
      12: return {6'b001101, 6'b001101};  13: return {6'b101100, 6'b101100};
      14: return {6'b011100, 6'b011100};  15: return {6'b010111, 6'b101000};
      16: return {6'b011011, 6'b100100};  17: return {6'b100011, 6'b100011};
      18: return {6'b010011, 6'b010011};  19: return {6'b110010, 6'b110010};
      20: return {6'b001011, 6'b001011};  21: return {6'b101010, 6'b101010};
      22: return {6'b011010, 6'b011010};  23: return {6'b111010, 6'b000101};
      24: return {6'b110011, 6'b001100};  25: return {6'b100110, 6'b100110};
      26: return {6'b010110, 6'b010110};  27: return {6'b110110, 6'b001001};
      28: return {6'b001110, 6'b001110};  29: return {6'b101110, 6'b010001};
      30: return {6'b011110, 6'b100001};  default: return {6'b101011, 6'b010100};
    endcase
  endfunction

  // 3b/4b: {RD- code, RD+ code}; index 8 is the alternate A7.
  function automatic logic [7:0] t4(input int y);
    case (y)
      0: return {4'b1011, 4'b0100};  1: return {4'b1001, 4'b1001};
      2: return {4'b0101, 4'b0101};  3: return {4'b1100, 4'b0011};
      4: return {4'b1101, 4'b0010};  5: return {4'b1010, 4'b1010};
      6: return {4'b0110, 4'b0110};  7: return {4'b1110, 4'b0001};
      default: return {4'b0111, 4'b1000};
    endcase
  endfunction

  function automatic int ones(input logic [9:0] v, input int n);
    int k;
    k = 0;
    for (int i = 0; i < n; i++) k += v[i];
    return k;
  endfunction

  // Encodes one byte at running disparity rd; returns {code, new rd}.
  function automatic logic [10:0] enc_byte(input logic [7:0] b, input logic rd);
    int          x, y;
    logic [11:0] e6;
    logic [5:0]  c6;
    logic [7:0]  e4;
    logic [3:0]  c4;
    logic        r;
    x  = int'(b[4:0]);
    y  = int'(b[7:5]);
    r  = rd;
    e6 = t6(x);
    c6 = r ? e6[5:0] : e6[11:6];
    if (ones({4'b0, c6}, 6) != 3) r = !r;
    if (y == 7 && ((!r && (x == 17 || x == 18 || x == 20)) ||
                   ( r && (x == 11 || x == 13 || x == 14)))) e4 = t4(8);
    else e4 = t4(y);
    c4 = r ? e4[3:0] : e4[7:4];
    if (ones({6'b0, c4}, 4) != 2) r = !r;
    return {c6, c4, r};
  endfunction

  // Encodes a 32-bit word; returns {code, new rd}.
  function automatic logic [40:0] enc_word(input logic [31:0] w, input logic rd);
    logic [39:0] c;
    logic [10:0] e;
    logic        r;
    r = rd;
    for (int i = 3; i >= 0; i--) begin
      e = enc_byte(w[8*i +: 8], r);
      c[10*i +: 10] = e[10:1];
      r = e[0];
    end
    return {c, r};
  endfunction

  // Decodes one symbol at running disparity rd by search.
  // Returns {ok, byte, new rd}; ok = 0 if it is no data character valid at rd.
  function automatic logic [9:0] dec_byte(input logic [9:0] s, input logic rd);
    logic [10:0] e;
    for (int b = 0; b < 256; b++) begin
      e = enc_byte(8'(b), rd);
      if (e[10:1] == s) return {1'b1, 8'(b), e[0]};
    end
    return {1'b0, 8'h00, rd};
  endfunction

  // Decodes a 40-bit word. Returns {ok, word, new rd}.
  function automatic logic [33:0] dec_word(input logic [39:0] c, input logic rd);
    logic [31:0] w;
    logic [9:0]  d;
    logic        ok, r;
    ok = 1'b1;
    r  = rd;
    for (int i = 3; i >= 0; i--) begin
      d = dec_byte(c[10*i +: 10], r);
      ok = ok & d[9];
      w[8*i +: 8] = d[8:1];
      r = d[0];
    end
    return {ok, w, r};
  endfunction

endpackage
