// tb_readout_cu: the control unit against behavioural EOCs and a behavioural TX
// FIFO. The EOC model holds a queue per column; the first column with data holds
// the token; a read gives that column's oldest word on the bus one clock later.
// The FIFO model (depth 4) is drained by a reader that pauses for long stretches.
// Checked: CU_UNINIT until enable; request in CU_IDLE; normal mode moves the
// words in order, one per clock while there is room (runs of 4 back-to-back
// pushes), never pushes into a full FIFO and stalls when it is full; debug mode
// pushes exactly one word per read-out cycle and only after the FIFO has emptied,
// with the request dropped meanwhile.
module tb_readout_cu;
  import rd50_pkg::*;
  localparam int NE = 3;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0, debug = 0;
  logic token, token_ret, rqt, rd, push;
  data_word_t eoc_bus = '0, wdata;
  logic [2:0] wcount;
  cu_state_t state;

  data_word_t eq [NE][$];
  data_word_t exp_q [$];
  data_word_t txq [$];
  bit reader_on = 1;
  int run = 0, maxrun = 0, nstall = 0, npush = 0;

  readout_cu #(.TX_DEPTH(4)) dut (
    .clk(clk), .rst_n(rst_n), .en_i(en), .debug_i(debug), .token_o(token),
    .token_return_i(token_ret), .eoc_rqt_data_o(rqt), .eoc_rd_o(rd), .eoc_data_i(eoc_bus),
    .tx_push_o(push), .tx_wdata_o(wdata), .tx_wcount_i(wcount), .state_o(state));

  always #5 clk = ~clk;

  always_comb begin
    token_ret = token;
    for (int e = 0; e < NE; e++) if (eq[e].size() > 0) token_ret = 0;
    wcount = 3'(txq.size());
  end

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", msg, $time); end
  endtask

  // EOC model, FIFO model and reader
  always @(posedge clk) if (rst_n) begin
    int sel;
    sel = -1;
    for (int e = NE - 1; e >= 0; e--) if (eq[e].size() > 0) sel = e;
    if (rd && sel >= 0) eoc_bus <= eq[sel].pop_front();
    else if (rd || rqt) eoc_bus <= '0;
    if (push) begin
      chk(txq.size() < 4, "push into a full TX FIFO");
      chk(exp_q.size() > 0 && wdata === exp_q[0], $sformatf("pushed %h", wdata));
      if (exp_q.size() > 0) void'(exp_q.pop_front());
      txq.push_back(wdata);
      npush++;
      run++;
      if (run > maxrun) maxrun = run;
    end else run = 0;
    if (rd === 1'b0 && !token_ret && txq.size() == 4) nstall++;
    if (reader_on && txq.size() > 0 && ($urandom_range(0, 2) == 0)) void'(txq.pop_front());
  end

  task automatic load(input int n);
    for (int i = 0; i < n; i++) begin
      int e;
      data_word_t w;
      e = $urandom_range(0, NE - 1);
      w = {8'(e), 24'($urandom)};
      eq[e].push_back(w);
    end
    // expected order: the token visits columns in order, each emptied in turn
    // (new words only arrive when all queues are empty in this test)
    for (int e = 0; e < NE; e++) foreach (eq[e][i]) exp_q.push_back(eq[e][i]);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    chk(state == CU_UNINIT && !rqt && !rd, "idle in CU_UNINIT before enable");
    en = 1;
    @(negedge clk);
    chk(state == CU_IDLE && rqt, "request in CU_IDLE");

    // ---------------- normal mode, reader paused first so the FIFO fills
    reader_on = 0;
    load(12);
    repeat (20) @(negedge clk);
    chk(txq.size() == 4, "TX FIFO filled to its depth");
    chk(state == CU_READ_EOCS, "CU_READ_EOCS while words wait");
    reader_on = 1;
    while (exp_q.size() > 0) @(negedge clk);
    repeat (10) @(negedge clk);
    chk(state == CU_IDLE, "back to CU_IDLE when all EOCs are empty");
    chk(maxrun >= 4, $sformatf("longest run of back-to-back pushes %0d", maxrun));
    chk(nstall > 0, "stall on full TX FIFO seen");

    // ---------------- debug mode: one word per read-out cycle
    while (txq.size() > 0) @(negedge clk);
    debug = 1;
    reader_on = 0;
    load(3);
    n0 = npush;
    repeat (15) @(negedge clk);
    chk(npush - n0 == 1, $sformatf("debug: %0d words pushed n0 the FIFO emptied", npush - n0));
    chk(state == CU_DEBUG && !rqt, "waiting in CU_DEBUG without request");
    for (int i = 0; i < 2; i++) begin
      reader_on = 1;
      while (txq.size() > 0) @(negedge clk);
      reader_on = 0;
      n0 = npush;
      repeat (15) @(negedge clk);
      chk(npush - n0 == 1, "debug: next single word after the FIFO emptied");
    end
    chk(exp_q.size() == 0, "all words moved");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
