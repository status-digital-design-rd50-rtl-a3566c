// tb_async_fifo: the 4 x 32 TX FIFO between a 40 MHz writer and a 640 MHz reader.
// Random pushes (only when not full) and pops (only when not empty); every word
// read must be the next one written. Also checks that the FIFO fills, that the
// write-side count never understates the occupancy, and that all words arrive.
module tb_async_fifo;
  int checks = 0, failures = 0;
  logic wclk = 0, rclk = 0, rst_n = 0;
  logic push = 0, pop = 0;
  logic [31:0] wdata = '0, rdata;
  logic wfull, rempty;
  logic [2:0] wcount;
  logic [31:0] q[$];
  int nwritten = 0, nread = 0, nfull = 0;
  bit slow_reader = 0;

  async_fifo #(.W(32), .DEPTH(4)) dut (
    .rst_n(rst_n), .wclk(wclk), .push_i(push), .wdata_i(wdata), .wfull_o(wfull),
    .wcount_o(wcount), .rclk(rclk), .pop_i(pop), .rdata_o(rdata), .rempty_o(rempty));

  always #12.5 wclk = ~wclk;
  always #0.78 rclk = ~rclk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writer
  initial begin
    #100 rst_n = 1;
    while (nwritten < 400) begin
      @(negedge wclk);
      checks++;
      if (int'(wcount) < q.size() - (pop ? 1 : 0)) begin
        failures++;
        $display("FAIL wcount %0d below occupancy %0d", wcount, q.size());
      end
      if (wfull) nfull++;
      push  = !wfull && ($urandom_range(0, 3) != 0);
      wdata = $urandom;
      @(posedge wclk);
      if (push) begin q.push_back(wdata); nwritten++; end
    end
    @(negedge wclk) push = 0;
  end

  // reader
  initial begin
    #100;
    while (nread < 400) begin
      @(negedge rclk);
      slow_reader = (nread / 100) % 2 == 1;
      pop = !rempty && ($urandom_range(0, slow_reader ? 40 : 2) == 0);
      if (pop) begin
        checks++;
        if (q.size() == 0 || rdata !== q[0]) begin
          failures++;
          $display("FAIL read %h exp %h", rdata, q.size() ? q[0] : 0);
        end
      end
      @(posedge rclk);
      if (pop) begin void'(q.pop_front()); nread++; end
    end
    @(negedge rclk) pop = 0;
    checks++;
    if (nfull == 0) begin failures++; $display("FAIL FIFO never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
