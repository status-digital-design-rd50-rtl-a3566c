// tb_enc_8b10b_word: checks the 8b/10b word encoder against the value shown for
// the chip's encoder (32'h0001E7F1 at negative disparity -> 40'h9D_1D4E3A31), and
// against an independent table-based reference for all single bytes at both
// disparities and for a chain of random words with the disparity carried along.
module tb_enc_8b10b_word;
  import tb_8b10b_pkg::*;

  int checks = 0, failures = 0;
  logic [31:0] data;
  logic        rd_in, rd_out, rd_ref;
  logic [39:0] code, exp;

  enc_8b10b_word #(.NBYTES(4)) dut (.data_i(data), .rd_i(rd_in), .code_o(code), .rd_o(rd_out));

  task automatic check(input logic [31:0] d, input logic r);
    logic [40:0] e;
    logic        rr;
    data = d; rd_in = r;
    #1;
    e   = enc_word(d, r);
    exp = e[40:1];
    rr  = e[0];
    checks++;
    if (code !== exp || rd_out !== rr) begin
      failures++;
      $display("FAIL data=%h rd=%0d code=%h exp=%h rd_out=%0d exp=%0d", d, r, code, exp, rd_out, rr);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // value printed for the vendor encoder
    data = 32'h0001E7F1; rd_in = 1'b0;
    #1;
    checks++;
    if (code !== 40'h9D_1D4E3A31) begin
      failures++;
      $display("FAIL known vector: %h", code);
    end
    // every byte value in the low byte position, both disparities
    for (int b = 0; b < 256; b++)
      for (int r = 0; r < 2; r++)
        check({24'h000000, 8'(b)}, 1'(r));
    // disparity chain over random words: every symbol has 4..6 ones
    rd_ref = 1'b0;
    for (int i = 0; i < 500; i++) begin
      logic [31:0] w;
      w = $urandom;
      check(w, rd_ref);
      for (int s = 0; s < 4; s++) begin
        int n;
        n = ones(code[10*s +: 10], 10);
        checks++;
        if (n < 4 || n > 6) begin failures++; $display("FAIL unbalanced symbol %b", code[10*s +: 10]); end
      end
      rd_ref = rd_out;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
