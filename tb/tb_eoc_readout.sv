// tb_eoc_readout: one end of column against a behavioural column of pixels.
// The column model raises HIT_OUT while any pixel waits and, while READ is high,
// shows the waiting pixel with the highest address on the active-low bus; that
// pixel is cleared by the READ pulse. Checked:
//  - READ first rises three clocks after HIT_OUT (two synchroniser flip-flops,
//    then READ) and then toggles, one hit every two clocks (the last of N hits
//    is cleared 2N-1 clocks after the first READ);
//  - READ stays low while the 8-deep FIFO is full, and resumes after pops;
//  - with the request on, the oldest word is offered as {EOC address, hit word},
//    the flag is raised and the token is not passed on; without the token no word
//    is given out; with token and read the word appears one clock later, the
//    flag drops and the token passes on for the one clock in which the next word
//    is loaded, so continuous reads get a word every two clocks with a zero bus
//    in between; with read and request off the bus holds its word.
module tb_eoc_readout;
  import rd50_pkg::*;
  localparam int NPIX = 4;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic readout_en = 0, hit_out, read;
  col_bus_t bus;
  logic rqt = 0, rd = 0, tok_prev = 0, tok_next, flag;
  data_word_t data;
  fill_state_t fstate;
  logic ffull;

  bit        pend [NPIX];
  hit_word_t hw   [NPIX];
  hit_word_t expq [$];
  int        sel;
  int nfull_stall = 0;

  eoc_readout #(.FIFO_DEPTH(8)) dut (
    .clk(clk), .rst_n(rst_n), .eoc_addr_i(8'h07), .readout_en_i(readout_en),
    .hit_out_i(hit_out), .bus_i(bus), .read_o(read), .eoc_rqt_data_i(rqt), .eoc_rd_i(rd),
    .eoc_token_prev_i(tok_prev), .eoc_token_next_o(tok_next), .eoc_flag_o(flag),
    .eoc_data_o(data), .fill_state_o(fstate), .fifo_full_o(ffull));

  always #5 clk = ~clk;

  // behavioural column
  always_comb begin
    hit_out = 0;
    sel = -1;
    for (int p = 0; p < NPIX; p++) if (pend[p]) begin hit_out = 1; sel = p; end
    bus = COL_BUS_IDLE;
    if (read && sel >= 0) begin
      bus.valid_b = 0; bus.addr_b = ~hw[sel].addr; bus.te_b = ~hw[sel].te; bus.le_b = ~hw[sel].le;
    end
  end
  always @(posedge clk) if (read && sel >= 0) pend[sel] <= 0;

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", msg, $time); end
  endtask

  // raise hits in all pixels; expected order is highest address first
  task automatic fire_all();
    for (int p = 0; p < NPIX; p++) begin
      hw[p].addr = 8'(p); hw[p].le = 8'($urandom); hw[p].te = 8'($urandom);
      pend[p] = 1;
    end
    for (int p = NPIX - 1; p >= 0; p--) expq.push_back(hw[p]);
  endtask

  task automatic wait_column_empty();
    while (hit_out) @(negedge clk);
    repeat (4) @(negedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, t1, lat;
    data_word_t d;
    for (int p = 0; p < NPIX; p++) pend[p] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk) readout_en = 1;
    repeat (2) @(negedge clk);
    chk(fstate == FILL_IDLE, "FILL_IDLE after enable");

    // ---------------- synchroniser latency and READ toggling rate
    fire_all();
    lat = 0;
    while (!read) begin @(negedge clk); lat++; end
    chk(lat == 3, $sformatf("READ after %0d clocks, expected 3", lat));
    t0 = $time;
    while (hit_out) begin
      @(negedge clk);
    end
    t1 = $time;
    chk((t1 - t0) / 10 == 2 * NPIX - 1, $sformatf("%0d hits read in %0d clocks", NPIX, (t1 - t0) / 10));
    wait_column_empty();

    // ---------------- request, token, read: four words, one every two clocks
    chk(!flag && tok_next == 0, "no flag before request");
    @(negedge clk) rqt = 1;
    @(negedge clk);
    chk(flag === 1'b1, "flag after request");
    tok_prev = 0;
    #1 chk(tok_next === 1'b0, "token not passed without token");
    rd = 1;
    @(negedge clk);
    chk(data === '0, "no data without token");
    tok_prev = 1;
    #1 chk(tok_next === 1'b0, "token kept while flag is set");
    for (int i = 0; i < NPIX; i++) begin
      @(negedge clk);
      d = {8'h07, expq.pop_front()};
      chk(data === d, $sformatf("word %0d: %h expected %h", i, data, d));
      chk(tok_next === 1'b1, $sformatf("token passed on while word %0d is replaced", i));
      @(negedge clk);
      chk(data === '0, $sformatf("bus zero after word %0d", i));
      if (i < NPIX - 1) chk(flag === 1'b1, $sformatf("word %0d loaded after one clock", i + 1));
    end
    rd = 0;
    @(negedge clk);
    chk(data === '0, "bus zero after read stops while request is on");
    chk(!flag && tok_next === 1'b1, "flag cleared and token passed when empty");

    // ---------------- fill the FIFO beyond its depth with no reader
    rqt = 0;
    for (int round = 0; round < 3; round++) begin
      fire_all();
      for (int c = 0; c < 20; c++) begin
        @(negedge clk);
        if (ffull && hit_out) begin
          nfull_stall++;
          chk(!read, "READ stays low while the FIFO is full");
        end
      end
    end
    chk(nfull_stall > 0, "FIFO-full stall seen");
    // drain everything; pending pixels resume
    rqt = 1; rd = 1;
    for (int i = 0; i < 3 * NPIX; i++) begin
      while (!flag) @(negedge clk);
      @(negedge clk);
      d = {8'h07, expq.pop_front()};
      chk(data === d, $sformatf("drain word %0d: %h expected %h", i, data, d));
      if (i == 3 * NPIX - 1) begin rd = 0; rqt = 0; end
    end
    // hold: read and request off, bus keeps its word
    repeat (3) @(negedge clk);
    chk(data === d, "output word held with read and request off");
    chk(expq.size() == 0, "all words delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
