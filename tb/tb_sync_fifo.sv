// tb_sync_fifo: random pushes and pops on the 8 x 24 EOC FIFO, compared with a
// queue; checks data order, full/empty/count, and simultaneous push and pop.
module tb_sync_fifo;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic push = 0, pop = 0;
  logic [23:0] wdata = '0, rdata;
  logic full, empty;
  logic [3:0] count;
  logic [23:0] q[$];
  int nfull = 0, nboth = 0;

  sync_fifo #(.W(24), .DEPTH(8)) dut (
    .clk(clk), .rst_n(rst_n), .push_i(push), .wdata_i(wdata), .pop_i(pop),
    .rdata_o(rdata), .full_o(full), .empty_o(empty), .count_o(count));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      checks++;
      if (count !== 4'(q.size()) || full !== (q.size() == 8) || empty !== (q.size() == 0)) begin
        failures++;
        $display("FAIL flags count=%0d exp=%0d full=%0d empty=%0d", count, q.size(), full, empty);
      end
      if (q.size() > 0) begin
        checks++;
        if (rdata !== q[0]) begin failures++; $display("FAIL data %h exp %h", rdata, q[0]); end
      end
      // bias towards filling in the first half, draining in the second
      push = !full && ($urandom_range(0, 99) < ((i / 500) % 2 ? 30 : 70));
      pop  = !empty && ($urandom_range(0, 99) < ((i / 500) % 2 ? 70 : 30));
      wdata = 24'($urandom);
      if (full) nfull++;
      if (push && pop) nboth++;
      @(posedge clk);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(wdata);
    end
    checks++;
    if (nfull == 0 || nboth == 0) begin failures++; $display("FAIL coverage full=%0d both=%0d", nfull, nboth); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
