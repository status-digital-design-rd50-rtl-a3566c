// tb_ts_counter: the timestamp counter starts at 0 after reset, advances by one
// per clock while enabled, holds while disabled and wraps from FF to 00.
module tb_ts_counter;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  logic [7:0] ts;
  int exp;

  ts_counter #(.TS_W(8)) dut (.clk(clk), .rst_n(rst_n), .en_i(en), .ts_o(ts));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    exp = 0;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      checks++;
      if (ts !== 8'(exp)) begin failures++; $display("FAIL cycle %0d ts=%h exp=%h", i, ts, 8'(exp)); end
      en = (i % 7) != 3;
      if (en) exp = (exp + 1) % 256;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
