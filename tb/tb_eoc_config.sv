// tb_eoc_config: the end-of-column configuration controller against a behavioural
// chain of three pixels (shift flip-flop plus 8-bit memory each, with the LD and
// SHIFT_EN rules of the pixel). Random writes and reads of every memory bit; a
// read must return what was written. Each operation must last six clocks from
// the request to done, with exactly three shift clocks, one LD pulse (clock 1 with
// SHIFT_EN low for a read, the last clock with SHIFT_EN high for a write).
module tb_eoc_config;
  localparam int N = 3;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic start = 0, rw = 0, busy, done, shift_en, ck_en, ser_o, ser_i;
  logic [2:0] kbit = '0;
  logic [N-1:0] wdata = '0, rdata;
  logic [7:0] ld;
  // behavioural pixel chain
  logic       sdff [N];
  logic [7:0] ram  [N];
  logic [7:0] ref_ram [N];
  int nshift, nld, ld_at, cyc;
  bit ld_shift_en;

  eoc_config #(.N_ROWS(N)) dut (
    .clk(clk), .rst_n(rst_n), .start_i(start), .rw_i(rw), .bit_i(kbit), .wdata_i(wdata),
    .rdata_o(rdata), .busy_o(busy), .done_o(done), .ld_o(ld), .shift_en_o(shift_en),
    .ck_en_o(ck_en), .ser_o(ser_o), .ser_i(ser_i));

  assign ser_i = sdff[N-1];

  always #5 clk = ~clk;

  always @(posedge clk) begin
    for (int r = 0; r < N; r++) begin
      if (shift_en && ck_en) sdff[r] <= (r == 0) ? ser_o : sdff[r-1];
      else if (!shift_en && ld != 0) sdff[r] <= |(ram[r] & ld);
      if (shift_en) for (int k = 0; k < 8; k++) if (ld[k]) ram[r][k] <= sdff[r];
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic op(input bit w, input int k, input logic [N-1:0] d);
    @(negedge clk) start = 1; rw = w; kbit = 3'(k); wdata = d;
    nshift = 0; nld = 0; ld_at = -1; cyc = 0;
    @(negedge clk) start = 0;
    while (!done) begin
      if (ck_en) nshift++;
      if (ld != 0) begin
        nld++; ld_at = cyc; ld_shift_en = shift_en;
        checks++;
        if (ld !== 8'(1 << k)) begin failures++; $display("FAIL LD=%b for bit %0d", ld, k); end
      end
      cyc++;
      @(negedge clk);
    end
    if (ld != 0) begin nld++; ld_at = cyc; ld_shift_en = shift_en; end
    if (ck_en) nshift++;
    cyc++;
    checks++;
    if (cyc != 6 || nshift != N || nld != 1) begin
      failures++;
      $display("FAIL timing: clocks=%0d shifts=%0d ld pulses=%0d", cyc, nshift, nld);
    end
    checks++;
    if (w ? (ld_at != 5 || !ld_shift_en) : (ld_at != 1 || ld_shift_en)) begin
      failures++;
      $display("FAIL LD at clock %0d with SHIFT_EN=%0d (write=%0d)", ld_at, ld_shift_en, w);
    end
    @(negedge clk);
  endtask

  initial begin
    for (int r = 0; r < N; r++) begin sdff[r] = 0; ram[r] = '0; ref_ram[r] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 60; i++) begin
      int k;
      logic [N-1:0] d;
      k = $urandom_range(0, 7);
      d = N'($urandom);
      op(1, k, d);
      for (int r = 0; r < N; r++) ref_ram[r][k] = d[r];
      for (int r = 0; r < N; r++) begin
        checks++;
        if (ram[r] !== ref_ram[r]) begin failures++; $display("FAIL pixel %0d memory %b exp %b", r, ram[r], ref_ram[r]); end
      end
      k = $urandom_range(0, 7);
      op(0, k, N'($urandom));
      for (int r = 0; r < N; r++) begin
        checks++;
        if (rdata[r] !== ref_ram[r][k]) begin failures++; $display("FAIL read pixel %0d bit %0d: %0d", r, k, rdata[r]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
